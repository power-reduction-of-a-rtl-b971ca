// Branch history register (BHR): global history of conditional-branch
// outcomes for the gshare predictor.
//
// Each resolved conditional branch shifts its outcome (1 = taken) in at bit
// 0. The history is updated when the back end resolves a branch, not
// speculatively at prediction time; that, the length (13 bits, the width of
// the 8K-entry PHT index) and the reset value of zero are this design's
// choices.
module bp_bhr #(
  parameter int unsigned LEN = 13
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           taken,
  output logic [LEN-1:0] history
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        history <= '0;
    else if (shift_en) history <= {history[LEN-2:0], taken};
  end
endmodule
