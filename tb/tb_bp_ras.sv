// Testbench for bp_ras: random calls and returns, including overflow past
// the 16 entries, compared with a model stack that keeps the newest 16.
module tb_bp_ras;
  import detl_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, push, pop, empty;
  addr_t push_addr, top;
  addr_t model [$];
  int checks = 0, failures = 0, overflows = 0;

  bp_ras #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0)) begin
        failures++; $display("FAIL empty %b size %0d", empty, model.size());
      end
      if (model.size() != 0) begin
        checks++;
        if (top !== model[$]) begin
          failures++; $display("FAIL top %h exp %h", top, model[$]);
        end
      end
      // phases: grow past the depth, then drain, then mix
      push = (i % 400 < 150) ? ($urandom % 4 != 0) : (i % 400 < 300) ? ($urandom % 4 == 0) : $urandom % 2;
      pop  = !push ? ($urandom % 3 != 0) : ($urandom % 8 == 0);
      push_addr = $urandom & ~32'h1;
      if (push && pop) begin
        if (model.size() != 0) void'(model.pop_back());
        model.push_back(push_addr);
      end else if (push) begin
        model.push_back(push_addr);
        if (model.size() > DEPTH) begin void'(model.pop_front()); overflows++; end
      end else if (pop && model.size() != 0) begin
        void'(model.pop_back());
      end
    end
    checks++;
    if (overflows == 0) begin failures++; $display("FAIL no overflow exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
