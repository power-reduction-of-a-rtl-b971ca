// Testbench for pc_queue: random producer, consumer and flushes; every pair
// leaving the queue is compared with a model FIFO; fall-through on an empty
// queue and the full flag are checked too.
module tb_pc_queue;
  import detl_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic flush, in_valid, in_ready, out_valid, out_ready, bypass;
  fetch_req_t in_data, out_data;
  fetch_req_t model [$];
  int checks = 0, failures = 0, bypasses = 0, fulls = 0;

  pc_queue #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    flush = 0; in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      flush     = ($urandom % 40) == 0;
      in_valid  = ($urandom % 3) != 0;
      out_ready = (i % 200 < 100) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      in_data.pc  = $urandom;
      in_data.npc = $urandom;
      if (flush) model.delete();
      #1;
      check(in_ready == (model.size() < DEPTH), "in_ready reflects occupancy");
      check(out_valid == (model.size() != 0 || in_valid), "out_valid");
      if (model.size() == DEPTH) fulls++;
      if (out_valid) check(out_data == (model.size() != 0 ? model[0] : in_data), "head pair");
      check(bypass == (model.size() == 0 && in_valid && out_ready), "bypass flag");
      if (bypass) bypasses++;
      if (out_valid && out_ready && model.size() != 0) void'(model.pop_front());
      if (in_valid && in_ready && !bypass) model.push_back(in_data);
    end
    check(bypasses > 0 && fulls > 0, "both empty fall-through and full occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
