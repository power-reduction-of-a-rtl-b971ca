// Pattern history table (PHT) of the gshare branch predictor.
//
// 8K two-bit saturating counters (the document's size). The caller forms the
// gshare index, fetch-block address XOR global history. A counter value of 2
// or 3 predicts taken. Read is combinational; an update increments the
// counter on a taken branch and decrements it on a not-taken one, saturating
// at 0 and 3. Like an SRAM the table is not reset: counters start at
// whatever value they hold, which only costs early mispredictions. This is
// this design's choice.
module bp_pht #(
  parameter int unsigned ENTRIES = 8192
) (
  input  logic                       clk,
  input  logic [$clog2(ENTRIES)-1:0] rd_idx,
  output logic                       taken,
  input  logic                       upd_en,
  input  logic [$clog2(ENTRIES)-1:0] upd_idx,
  input  logic                       upd_taken
);
  logic [1:0] ctr [ENTRIES];
  logic [1:0] cur;

  assign taken = ctr[rd_idx][1];
  assign cur   = ctr[upd_idx];

  always_ff @(posedge clk) begin
    if (upd_en) begin
      if (upd_taken && cur != 2'd3)       ctr[upd_idx] <= cur + 2'd1;
      else if (!upd_taken && cur != 2'd0) ctr[upd_idx] <= cur - 2'd1;
    end
  end

endmodule
