// End-to-end testbench of detl_frontend at its default size (64 KB 4-way
// I-cache, 8-entry IQ, 4K BTB, 8K PHT, 16-entry RAS).
//
// A synthetic program over 256 KB of code is defined by a hash of each
// 8-byte block address: a block holds no branch, a conditional branch (loop
// like, taken except every N-th visit), a jump, a call or a return, at a
// hashed halfword position. The back-end model drains the IQ with bursts of
// stalls, executes each block on the true path, reports every control
// transfer on the update port, and redirects the front end when the
// predicted NPC is wrong; now and then it also raises an exception that
// redirects to a handler address. A memory model serves refills with random
// delays. Checked: every block reaching the back end is the next block of
// the true path and carries the right bytes. Counted, and required to occur:
// Parallel, Tag and ETL lookups, IQ-full bubbles, early and Parallel-mode
// misses, mis-predictions, exceptions, PC-queue fall-through, BTB hits and
// RAS pushes and pops. The data-RAM way reads are reported against what a
// cache that always reads all ways would make.
module tb_detl_frontend;
  import detl_pkg::*;
  localparam int    WAYS = 4, LB = 32;
  localparam addr_t BASE = 32'h8000_0000;
  localparam int    CODE_BYTES = 256 * 1024;
  localparam int    BLOCKS_TO_RUN = 200000;

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
    repeat (5_000_000) @(posedge clk);
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
      if (mem_req_valid) begin
        addr_t line;
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

  initial begin
    addr_t expect_pc, blk, bpc, tgt, true_next;
    int unsigned h;
    int slot, kind, period;
    bit rvc, applies, taken;
    int stall_left = 0;
    redirect_valid = 0; redirect_pc = 0; upd_valid = 0; upd = '0; iq_ready = 0;
    expect_pc = BASE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n_blocks < BLOCKS_TO_RUN) begin
      @(negedge clk);
      redirect_valid = 0;
      upd_valid = 0;
      // bursts of back-end stalls fill the IQ
      if (stall_left > 0) stall_left--;
      else if ($urandom % 40 == 0) stall_left = 1 + $urandom % 12;
      iq_ready = (stall_left == 0) && ($urandom % 4 != 0);
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
        // keep the synthetic code inside its region
        if (taken && (tgt < BASE || tgt >= BASE + CODE_BYTES)) tgt = in_code(tgt - BASE);
        upd.taken = taken;
        upd.target = tgt;
        if (taken) true_next = tgt;
      end
      if (true_next >= BASE + CODE_BYTES) true_next = BASE;
      if ($urandom % 2000 == 0) begin
        // exception: continue at a handler address
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
    check(n_par > 0, "Parallel-mode fetches");
    check(n_full > 0, "IQ-full bubbles");
    check(n_tag > 0, "Tag-state lookups");
    check(n_etl > 0, "ETL-mode fetches");
    check(n_etl_exit > 0, "return from ETL to Parallel on a redirect");
    check(n_miss > n_early, "Parallel-mode misses");
    check(n_early > 0, "misses found by an early tag lookup");
    check(n_mispredict > 0, "mis-predictions");
    check(n_exc > 0, "exceptions");
    check(n_bypass > 0, "PC-queue fall-through");
    check(n_btb > 0 && n_push > 0 && n_pop > 0, "BTB hits, RAS pushes and pops");
    check(fetches >= n_blocks, "every block delivered was fetched");
    // access counts of the energy model: N tag ways per lookup in every mode,
    // N data ways per Parallel access, one per ETL access
    check(data_reads == 4 * longint'(n_par) + longint'(n_etl), "data-RAM reads: 4 per Parallel, 1 per ETL access");
    check(tag_reads == 4 * longint'(n_par + n_tag + n_etl), "tag-RAM reads: 4 ways per lookup");
    $display("cycles %0d blocks %0d fetches %0d mispredicts %0d exceptions %0d",
             cycles, n_blocks, fetches, n_mispredict, n_exc);
    $display("parallel %0d tag %0d etl %0d iq-full %0d etl-exits %0d misses %0d early %0d bypass %0d btb %0d ras push/pop %0d/%0d",
             n_par, n_tag, n_etl, n_full, n_etl_exit, n_miss, n_early, n_bypass, n_btb, n_push, n_pop);
    $display("data-RAM way reads %0d vs %0d for all-way reads (%0d%%), tag way reads %0d",
             data_reads, fetches * WAYS + 0, int'(100 * data_reads / (fetches * WAYS)), tag_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
