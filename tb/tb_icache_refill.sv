// Testbench for icache_refill: misses with random set occupancy, a memory
// model with random request and response delays; checks the request address,
// the four block writes in order, the tag write, the victim way (first
// invalid way, else round robin) and the busy window.
module tb_icache_refill;
  import detl_pkg::*;
  localparam int WAYS = 4, LB = 32;
  logic clk = 0, rst_n = 0;
  logic start, busy, mem_req_valid, mem_req_ready, mem_resp_valid;
  logic data_wr_en, tag_wr_en, done;
  addr_t start_addr, mem_req_addr, data_wr_addr, tag_wr_addr;
  logic [WAYS-1:0] set_valid;
  fblock_t mem_resp_data, data_wr_data;
  logic [1:0] wr_way;
  int checks = 0, failures = 0, rr = 0;

  icache_refill #(.WAYS(WAYS), .LINE_BYTES(LB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  function automatic fblock_t memval(addr_t a);
    return {a ^ 32'h5a5a_0000, ~a};
  endfunction

  initial begin
    addr_t line;
    int exp_way, beats;
    start = 0; mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = 0;
    start_addr = 0; set_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      check(!busy, "idle before a miss");
      start = 1;
      start_addr = $urandom & ~32'h1;
      set_valid = (n % 3 == 0) ? 4'hF : 4'($urandom);
      exp_way = -1;
      for (int w = 0; w < WAYS; w++) if (exp_way < 0 && !set_valid[w]) exp_way = w;
      if (exp_way < 0) exp_way = rr % WAYS;
      rr++;
      line = start_addr & ~32'(LB - 1);
      @(negedge clk);
      start = 0;
      check(busy, "busy after start");
      // request phase
      repeat ($urandom % 4) begin
        check(mem_req_valid && mem_req_addr == line, "request held until accepted");
        @(negedge clk);
      end
      check(mem_req_valid && mem_req_addr == line, "request address is the line");
      mem_req_ready = 1;
      @(negedge clk);
      mem_req_ready = 0;
      beats = 0;
      while (beats < LB / 8) begin
        mem_resp_valid = ($urandom % 3) != 0;
        mem_resp_data = memval(line + beats * 8);
        #1;
        check(data_wr_en == mem_resp_valid, "write only with a beat");
        if (mem_resp_valid) begin
          check(data_wr_addr == line + beats * 8 && data_wr_data == mem_resp_data, "beat address and data");
          check(wr_way == 2'(exp_way), "victim way");
          check(tag_wr_en == (beats == LB / 8 - 1) && done == tag_wr_en, "tag written with the last beat");
          if (tag_wr_en) check(tag_wr_addr == line, "tag address");
          beats++;
        end
        @(negedge clk);
      end
      mem_resp_valid = 0;
    end
    @(negedge clk);
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
