// Workload-profile testbench of detl_frontend at its default size.
//
// The front end is measured under back-end stall profiles that stand in for
// benchmark workloads which differ, as seen by the I-cache, in how often the
// fetch unit is idle because the IQ is full. Two profiles are run, each from
// reset: a low idle-cycle rate of about 5 % (the rate reported for the
// libquantum benchmark of SPEC CPU2006) and a high one of about 22 % (the
// rate reported for h264ref). The benchmarks themselves need a whole
// processor and are not run; the same synthetic program as in
// tb_detl_frontend is executed instead, with the same true-path and
// contents checks. For each profile the testbench reports the idle-cycle
// rate and the data-RAM way reads against a cache that always reads all
// ways, and checks that the measured idle rate is near its target and that
// the profile with more bubbles reads fewer data-RAM ways, which is the
// trend the DETL scheme relies on. The two targets and the stall-burst
// settings that reach them are this testbench's own calibration.
module tb_detl_workload_profiles;
  import detl_pkg::*;
  localparam int    WAYS = 4, LB = 32;
  localparam addr_t BASE = 32'h8000_0000;
  localparam int    CODE_BYTES = 256 * 1024;
  localparam int    BLOCKS_TO_RUN = 100000;  // per profile
  localparam int    NPROF = 2;
  localparam string PROF_NAME [NPROF] = '{"low idle (libquantum-like)", "high idle (h264ref-like)"};
  localparam int    PROF_TARGET [NPROF] = '{5, 22};    // idle-cycle rate, percent
  localparam int    PROF_BURST_1IN [NPROF] = '{60, 40};   // a stall burst starts 1 in N cycles
  localparam int    PROF_BURST_MAX [NPROF] = '{16, 16};   // longest burst, cycles
  localparam int    PROF_READY_PCT [NPROF] = '{100, 78};   // back end takes a block, percent of other cycles
  logic hold_mem = 0, mem_busy = 0;

  logic clk = 0, rst_n = 0;
  logic redirect_valid, upd_valid, iq_valid, iq_ready;
  addr_t redirect_pc;
  br_update_t upd;
  iq_entry_t iq_data;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  addr_t mem_req_addr;
  fblock_t mem_resp_data;
  detl_mode_e mode;
  logic [3:0] iq_count;
  logic tag_rd_en;
  logic [WAYS-1:0] data_way_en;
  logic ev_par_access, ev_tag_lookup, ev_etl_access, ev_miss, ev_early_miss, ev_iq_full;
  logic ev_pcq_bypass, ev_btb_hit, ev_ras_push, ev_ras_pop;

  detl_frontend dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_par = 0, n_tag = 0, n_etl = 0, n_miss = 0, n_early = 0, n_full = 0;
  int n_bypass = 0, n_btb = 0, n_push = 0, n_pop = 0, n_mispredict = 0, n_exc = 0;
  int n_etl_exit = 0, n_blocks = 0;
  longint data_reads = 0, tag_reads = 0, fetches = 0;

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d blocks", n_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  function automatic fblock_t memval(addr_t a);
    return {a * 32'h9E37_79B9, a ^ 32'hC0DE_0000};
  endfunction

  function automatic int unsigned hash(addr_t a);
    int unsigned h = a * 32'h2545_F491;
    h ^= h >> 15;
    h *= 32'h2C1B_3C6D;
    h ^= h >> 12;
    return h;
  endfunction

  function automatic addr_t in_code(int unsigned off);
    return BASE + ((off % CODE_BYTES) & ~32'h1);
  endfunction

  // memory model
  initial begin
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = 0;
    forever begin
      @(negedge clk);
      if (mem_req_valid && rst_n && !hold_mem) begin
        addr_t line;
        mem_busy = 1;
        repeat ($urandom % 3) @(negedge clk);
        mem_req_ready = 1;
        line = mem_req_addr;
        @(negedge clk);
        mem_req_ready = 0;
        repeat (4 + $urandom % 8) @(negedge clk);
        for (int b = 0; b < LB / 8; b++) begin
          mem_resp_valid = 1;
          mem_resp_data = memval(line + 32'(b * 8));
          @(negedge clk);
          mem_resp_valid = 0;
        end
        mem_busy = 0;
      end
    end
  end

  // event counters
  detl_mode_e prev_mode = MODE_PARALLEL;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (ev_par_access) n_par++;
    if (ev_tag_lookup) n_tag++;
    if (ev_etl_access) n_etl++;
    if (ev_miss) n_miss++;
    if (ev_early_miss) n_early++;
    if (ev_iq_full) n_full++;
    if (ev_pcq_bypass) n_bypass++;
    if (ev_btb_hit) n_btb++;
    if (ev_ras_push) n_push++;
    if (ev_ras_pop) n_pop++;
    if (ev_par_access || ev_etl_access) fetches++;
    if (tag_rd_en) tag_reads += WAYS;
    data_reads += $countones(data_way_en);
    if (prev_mode == MODE_ETL && mode == MODE_PARALLEL) n_etl_exit++;
    prev_mode <= mode;
  end

  // back end: executes the true path
  int   visits [addr_t];
  addr_t stack [$];
  int   ratio [NPROF];     // data-RAM way reads, percent of all-way reads
  int   idle [NPROF];      // IQ-full cycles, percent of cycles

  task automatic clear_counts();
    cycles = 0; n_par = 0; n_tag = 0; n_etl = 0; n_miss = 0; n_early = 0; n_full = 0;
    n_bypass = 0; n_btb = 0; n_push = 0; n_pop = 0; n_mispredict = 0; n_exc = 0;
    n_etl_exit = 0; n_blocks = 0; data_reads = 0; tag_reads = 0; fetches = 0;
  endtask

  task automatic run_profile(input int p);
    addr_t expect_pc, blk, bpc, tgt, true_next;
    int unsigned h;
    int slot, kind, period;
    bit rvc, applies, taken;
    int stall_left;
    stall_left = 0;
    redirect_valid = 0; redirect_pc = 0; upd_valid = 0; upd = '0; iq_ready = 0;
    // start from reset once the memory model is idle
    @(negedge clk);
    hold_mem = 1;
    while (mem_busy) @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    hold_mem = 0;
    visits.delete();
    stack.delete();
    clear_counts();
    expect_pc = BASE;
    rst_n = 1;
    while (n_blocks < BLOCKS_TO_RUN) begin
      @(negedge clk);
      redirect_valid = 0;
      upd_valid = 0;
      if (stall_left > 0) stall_left--;
      else if ($urandom % PROF_BURST_1IN[p] == 0) stall_left = 1 + $urandom % PROF_BURST_MAX[p];
      iq_ready = (stall_left == 0) && ($urandom % 100 < PROF_READY_PCT[p]);
      #1;
      if (!(iq_valid && iq_ready)) continue;
      n_blocks++;
      check(iq_data.pc == expect_pc, "block on the true path");
      check(iq_data.data == memval({iq_data.pc[31:3], 3'b000}), "block contents");
      blk = {iq_data.pc[31:3], 3'b000};
      h = hash(blk);
      slot = (h >> 4) % 4;
      rvc = (h >> 6) & 1;
      kind = h % 20;            // 0..14 none, 15/16 cond, 17 jump, 18 call, 19 return
      bpc = blk + 32'(slot * 2);
      applies = (kind >= 15) && (slot >= iq_data.pc[2:1]);
      taken = 0;
      tgt = 0;
      true_next = blk + 8;
      if (applies) begin
        upd_valid = 1;
        upd.pc = bpc;
        upd.rvc = rvc;
        case (kind)
          15, 16: begin
            period = 4 + (h >> 20) % 13;
            visits[blk] = visits.exists(blk) ? visits[blk] + 1 : 1;
            taken = (visits[blk] % period) != 0;
            tgt = (kind == 15) ? blk - 32'(8 * (1 + (h >> 8) % 12)) : in_code((h >> 9) * 2);
            upd.kind = BR_COND;
          end
          17: begin taken = 1; tgt = in_code((h >> 9) * 2); upd.kind = BR_JUMP; end
          18: begin
            taken = 1;
            tgt = in_code(((h >> 9) % 256) * 1024);  // 256 function entries
            upd.kind = BR_CALL;
            stack.push_back(bpc + (rvc ? 2 : 4));
          end
          default: begin
            upd.kind = BR_RET;
            if (stack.size() != 0) begin taken = 1; tgt = stack.pop_back(); end
          end
        endcase
        if (taken && (tgt < BASE || tgt >= BASE + CODE_BYTES)) tgt = in_code(tgt - BASE);
        upd.taken = taken;
        upd.target = tgt;
        if (taken) true_next = tgt;
      end
      if (true_next >= BASE + CODE_BYTES) true_next = BASE;
      if ($urandom % 2000 == 0) begin
        n_exc++;
        true_next = in_code(($urandom % 64) * 4096);
        redirect_valid = 1;
        redirect_pc = true_next;
      end else if (iq_data.npc != true_next) begin
        n_mispredict++;
        redirect_valid = 1;
        redirect_pc = true_next;
      end
      expect_pc = true_next;
    end
    @(negedge clk);
    redirect_valid = 0; upd_valid = 0; iq_ready = 0;
    idle[p] = int'(100 * longint'(n_full) / cycles);
    ratio[p] = int'(100 * data_reads / (fetches * WAYS));
    check(n_tag > 0 && n_etl > 0, "ETL mode entered");
    check(data_reads == 4 * longint'(n_par) + longint'(n_etl), "data-RAM reads: 4 per Parallel, 1 per ETL access");
    check(idle[p] >= PROF_TARGET[p] - 3 && idle[p] <= PROF_TARGET[p] + 3, "idle-cycle rate near its target");
    $display("%s: cycles %0d blocks %0d mispredicts %0d misses %0d (early %0d)",
             PROF_NAME[p], cycles, n_blocks, n_mispredict, n_miss, n_early);
    $display("%s: idle cycles %0d%% (target %0d%%), parallel %0d etl %0d, data-RAM way reads %0d%% of all-way reads, all-way accesses cut by %0d%%",
             PROF_NAME[p], idle[p], PROF_TARGET[p], n_par, n_etl, ratio[p],
             int'(100 * longint'(n_etl) / fetches));
  endtask

  initial begin
    for (int p = 0; p < NPROF; p++) begin
      run_profile(p);
    end
    check(ratio[1] < ratio[0], "more fetch bubbles give fewer data-RAM reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
