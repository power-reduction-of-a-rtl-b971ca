// Return address stack (RAS), 16 entries (the document's size).
//
// A call pushes its return address, a return pops it; top is the predicted
// return target. The stack is circular: a push on a full stack overwrites the
// oldest entry, and a pop on an empty stack leaves the pointer in place and
// returns whatever the top slot holds. Push and pop are made at prediction
// time and are not repaired after a misprediction; these rules are this
// design's choices. A push and a pop in the same cycle replace the top.
module bp_ras
  import detl_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  addr_t push_addr,
  input  logic  pop,
  output addr_t top,
  output logic  empty
);
  localparam int unsigned PB = $clog2(DEPTH);

  addr_t             stk [DEPTH];
  logic [PB-1:0]     sp_q;            // index of the top entry
  logic [$clog2(DEPTH+1)-1:0] n_q;    // number of live entries

  assign top   = stk[sp_q];
  assign empty = (n_q == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_q <= '0;
      n_q  <= '0;
      for (int i = 0; i < DEPTH; i++) stk[i] <= '0;
    end else if (push && pop) begin
      stk[sp_q] <= push_addr;
      if (n_q == 0) n_q <= 1;
    end else if (push) begin
      stk[sp_q + 1'b1] <= push_addr;
      sp_q             <= sp_q + 1'b1;
      if (n_q != ($clog2(DEPTH+1))'(DEPTH)) n_q <= n_q + 1'b1;
    end else if (pop && n_q != 0) begin
      sp_q <= sp_q - 1'b1;
      n_q  <= n_q - 1'b1;
    end
  end

endmodule
