// Testbench for inst_queue: random pushes (only when not full), pops and
// flushes against a model FIFO; checks head data, full and full_next.
module tb_inst_queue;
  import detl_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic flush, push, full, full_next, out_valid, out_ready;
  iq_entry_t wdata, out_data;
  logic [3:0] count;
  iq_entry_t model [$];
  int checks = 0, failures = 0, fulls = 0, exp_next;

  inst_queue #(.DEPTH(DEPTH)) dut (.*);
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
    flush = 0; push = 0; out_ready = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(full == (model.size() == DEPTH), "full flag");
      check(count == model.size(), "count");
      check(out_valid == (model.size() != 0), "out_valid");
      if (model.size() != 0) check(out_data == model[0], "head entry");
      if (full) fulls++;
      flush     = ($urandom % 50) == 0;
      push      = (flush || !full) && ($urandom % 3 != 0);
      out_ready = (i % 300 < 150) ? ($urandom % 5 == 0) : ($urandom % 2 == 0);
      wdata     = {$urandom, $urandom, $urandom, $urandom};
      if (flush) model.delete();
      else if (out_ready && model.size() != 0) void'(model.pop_front());
      if (push) model.push_back(wdata);
      exp_next = model.size();
      #1;
      check(full_next == (exp_next == DEPTH), "full_next");
    end
    check(fulls > 0, "queue filled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
