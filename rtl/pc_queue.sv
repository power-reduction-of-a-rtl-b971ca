// Look-ahead PC queue between the branch predictor and the I-cache.
//
// The queue decouples the branch predictor from the I-cache: the predictor
// keeps producing (PC, NPC) pairs while the I-cache is stalled, which is what
// gives the I-cache an NPC to look up early in a fetch bubble. It is a
// first-in first-out buffer with fall-through: when it is empty the incoming
// pair is offered to the I-cache in the same cycle, so after a redirect the
// target reaches the I-cache in the cycle of the redirect. flush empties the
// queue; a pair arriving in the flush cycle is kept. The depth (4) is this
// design's choice; the document gives none.
module pc_queue
  import detl_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic       in_valid,
  output logic       in_ready,
  input  fetch_req_t in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output fetch_req_t out_data,
  output logic       bypass      // the pair went straight through this cycle
);
  localparam int unsigned PB = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fetch_req_t    mem [DEPTH];
  logic [PB-1:0] rd_q, wr_q, rd_e, wr_e;
  logic [$clog2(DEPTH+1)-1:0] cnt_q, cnt_e;
  logic          empty, store, pop;

  function automatic logic [PB-1:0] inc(input logic [PB-1:0] p);
    return (p == PB'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign cnt_e     = flush ? '0 : cnt_q;
  assign rd_e      = flush ? '0 : rd_q;
  assign wr_e      = flush ? '0 : wr_q;
  assign empty     = (cnt_e == 0);
  assign in_ready  = (cnt_e != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = !empty || in_valid;
  assign out_data  = empty ? in_data : mem[rd_e];
  assign bypass    = empty && in_valid && out_ready;
  assign store     = in_valid && in_ready && !bypass;
  assign pop       = !empty && out_ready;

  always_ff @(posedge clk) begin
    if (store) mem[wr_e] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      rd_q  <= pop   ? inc(rd_e) : rd_e;
      wr_q  <= store ? inc(wr_e) : wr_e;
      cnt_q <= cnt_e + (store ? 1 : 0) - (pop ? 1 : 0);
    end
  end

endmodule
