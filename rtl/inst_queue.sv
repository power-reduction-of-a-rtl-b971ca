// Instruction queue (IQ) between the I-cache and the decoder.
//
// A pointer-based circular buffer of fetch blocks, as the document describes
// it. The I-cache pushes one block per cycle while the IQ is not full; the
// decoder pops from the head with a valid/ready handshake. A flush (redirect
// or exception) empties the queue; a push in the same cycle lands in the
// emptied queue, so the redirect target can be written in the redirect cycle.
// full is registered (the IQ fill state at the start of the cycle); full_next
// is the state the next cycle will start with, and lets the DETL control path
// enter the Tag state in the first bubble cycle. The default depth of 8
// blocks is 64 bytes, this design's reading of the 64-byte instruction stream
// buffer in the processor configuration.
module inst_queue
  import detl_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      flush,
  input  logic      push,
  input  iq_entry_t wdata,
  output logic      full,
  output logic      full_next,
  output logic      out_valid,
  input  logic      out_ready,
  output iq_entry_t out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PB = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  iq_entry_t         mem [DEPTH];
  logic [PB-1:0]     rd_q, wr_q, wr_eff;
  logic [$clog2(DEPTH+1)-1:0] cnt_q, cnt_d;
  logic              do_pop;

  assign count     = cnt_q;
  assign full      = (cnt_q == ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = (cnt_q != 0);
  assign out_data  = mem[rd_q];
  assign do_pop    = out_valid && out_ready && !flush;
  assign wr_eff    = flush ? '0 : wr_q;

  always_comb begin
    if (flush) cnt_d = push ? 1 : 0;
    else       cnt_d = cnt_q + (push ? 1 : 0) - (do_pop ? 1 : 0);
  end
  assign full_next = (cnt_d == ($clog2(DEPTH+1))'(DEPTH));

  function automatic logic [PB-1:0] inc(input logic [PB-1:0] p);
    return (p == PB'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_eff] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      cnt_q <= cnt_d;
      wr_q  <= push ? inc(wr_eff) : wr_eff;
      if (flush)       rd_q <= '0;
      else if (do_pop) rd_q <= inc(rd_q);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !flush));

endmodule
