// Testbench for bp_pht: random updates on a small table, prediction of
// every touched counter compared with a model of 2-bit saturating counters
// that starts from the table's power-up contents.
module tb_bp_pht;
  localparam int ENTRIES = 64;
  logic clk = 0;
  logic [5:0] rd_idx, upd_idx;
  logic taken, upd_en, upd_taken;
  int model [ENTRIES];
  int checks = 0, failures = 0;

  bp_pht #(.ENTRIES(ENTRIES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_en = 0; upd_idx = 0; upd_taken = 0; rd_idx = 0;
    repeat (2) @(posedge clk);
    // the table is not reset: start the model from its power-up contents
    foreach (model[i]) model[i] = int'(dut.ctr[i]);
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      rd_idx = 6'($urandom);
      #1;
      checks++;
      if (taken !== (model[rd_idx] >= 2)) begin
        failures++; $display("FAIL idx %0d taken %b ctr %0d", rd_idx, taken, model[rd_idx]);
      end
      upd_en    = $urandom % 2;
      upd_idx   = 6'($urandom % 8);    // concentrate on few counters to hit saturation
      upd_taken = ($urandom % 3) != 0;
      if (upd_en) begin
        if (upd_taken && model[upd_idx] < 3) model[upd_idx]++;
        if (!upd_taken && model[upd_idx] > 0) model[upd_idx]--;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
