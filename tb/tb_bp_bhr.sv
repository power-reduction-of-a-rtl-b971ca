// Testbench for bp_bhr: random outcomes shifted in, compared with a model.
module tb_bp_bhr;
  localparam int LEN = 13;
  logic clk = 0, rst_n = 0, shift_en, taken;
  logic [LEN-1:0] history, model;
  int checks = 0, failures = 0;

  bp_bhr #(.LEN(LEN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift_en = 0; taken = 0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (history !== model) begin
        failures++; $display("FAIL history %h exp %h", history, model);
      end
      shift_en = $urandom % 2;
      taken    = $urandom % 2;
      if (shift_en) model = {model[LEN-2:0], taken};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
