// Testbench for icache_detl on a 1 KB, 4-way cache: a request stream with
// random jumps over 2 KB of code, an instruction-queue model with random
// drain, random redirects and a memory model with random delays. Checks
// that the blocks written to the queue are the requested ones with the right
// contents, that Parallel fetches read all four data ways, ETL fetches one
// and the Tag state none, that the lookup mode follows the control path, and
// that no fetch cycle is lost to the early lookup, and that Tag lookups,
// ETL fetches and early misses all occur.
module tb_icache_detl;
  import detl_pkg::*;
  localparam int CB = 1024, WAYS = 4, LB = 32, IQD = 4;
  localparam addr_t BASE = 32'h0001_0000;
  logic clk = 0, rst_n = 0;
  logic flush, req_valid, req_ready, iq_full, iq_full_next, iq_push;
  fetch_req_t req;
  iq_entry_t iq_wdata;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  addr_t mem_req_addr;
  fblock_t mem_resp_data;
  detl_mode_e state;
  logic tag_rd_en;
  logic [WAYS-1:0] data_way_en;
  logic ev_par_access, ev_tag_lookup, ev_etl_access, ev_miss, ev_early_miss;
  int checks = 0, failures = 0;
  int n_par = 0, n_tag = 0, n_etl = 0, n_miss = 0, n_early = 0, n_flush = 0, n_push = 0;
  int n_data_reads = 0;

  icache_detl #(.CACHE_BYTES(CB), .WAYS(WAYS), .LINE_BYTES(LB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // next fetch block of the synthetic program
  function automatic addr_t next_pc(addr_t pc);
    int unsigned h = (pc * 32'h2545_F491) >> 7;
    if (h % 6 == 0) return BASE + ((h >> 4) % 1024) * 2;
    return {pc[31:3] + 29'd1, 3'b000};
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
        repeat (2 + $urandom % 4) @(negedge clk);
        for (int b = 0; b < LB / 8; b++) begin
          while ($urandom % 3 == 0) @(negedge clk);
          mem_resp_valid = 1;
          mem_resp_data = memval(line + 32'(b * 8));
          @(negedge clk);
          mem_resp_valid = 0;
        end
      end
    end
  end

  initial begin
    int iq_cnt;
    bit pop;
    addr_t pc;
    detl_mode_e exp_state;
    bit prev_full_next, prev_flush, seen_lookup;
    flush = 0; req_valid = 0; req = '0; iq_full = 0; iq_full_next = 0;
    iq_cnt = 0; pc = BASE; exp_state = MODE_PARALLEL; seen_lookup = 0;
    prev_full_next = 0; prev_flush = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      // the lookup mode follows the control path (checked on the registered state)
      check(state == exp_state, "state sequence");
      flush = ($urandom % 150) == 0;
      if (flush) begin
        pc = BASE + ($urandom % 1024) * 2;
        n_flush++;
      end
      req_valid = ($urandom % 8) != 0;
      req.pc = pc;
      req.npc = next_pc(pc);
      iq_full = (iq_cnt == IQD);
      pop = (iq_cnt != 0) && ((i % 2000 < 1000) ? ($urandom % 3 == 0) : ($urandom % 3 != 0));
      #1;
      if (iq_push) begin
        n_push++;
        check(iq_wdata.pc == pc && iq_wdata.npc == next_pc(pc), "pushed block is the requested one");
        check(iq_wdata.data == memval({pc[31:3], 3'b000}), "block contents");
        check(req_ready, "request taken with the push");
        check(!iq_full || flush, "no push into a full IQ");
      end
      if (ev_par_access) begin n_par++; check(data_way_en == 4'hF, "parallel reads all ways"); end
      else if (ev_etl_access) begin n_etl++; check($onehot(data_way_en), "ETL reads one way"); end
      else check(data_way_en == 0, "data RAM off without a fetch");
      if (ev_tag_lookup) begin n_tag++; check(state == MODE_TAG || state == MODE_ETL, "NPC lookup outside Parallel"); end
      // no fetch cycle is lost to the early lookup: whenever a request is
      // waiting, the IQ has room and no refill runs, a fetch access happens
      if (req_valid && (!iq_full || flush) && !dut.busy)
        check(ev_par_access || ev_etl_access, "fetch not delayed by the DETL");
      if (ev_miss) n_miss++;
      if (ev_early_miss) n_early++;
      n_data_reads += $countones(data_way_en);
      // IQ model
      if (flush) iq_cnt = 0;
      else if (pop) iq_cnt--;
      if (iq_push) begin iq_cnt++; pc = next_pc(pc); end
      iq_full_next = (iq_cnt == IQD);
      #1;
      // expected next state of the control path
      if (flush) exp_state = MODE_PARALLEL;
      else case (exp_state)
        MODE_PARALLEL: if (iq_full_next) exp_state = MODE_TAG;
        MODE_TAG: if (!iq_full_next && (dut.wayr_vld_q || ev_tag_lookup)) exp_state = MODE_ETL;
        default: ;
      endcase
    end
    check(n_tag > 0 && n_etl > 0 && n_par > 0, "all three modes fetched or looked up");
    check(n_early > 0 && n_miss > n_early, "early and parallel misses occurred");
    $display("pushes %0d parallel %0d tag %0d etl %0d misses %0d early %0d flushes %0d data-way reads %0d (parallel-only: %0d)",
             n_push, n_par, n_tag, n_etl, n_miss, n_early, n_flush, n_data_reads, n_push * WAYS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
