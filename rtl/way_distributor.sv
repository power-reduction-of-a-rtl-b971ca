// Distributor in front of the I-cache data RAM and select for the
// multiplexer behind it.
//
// The document describes a decode step that turns the matching way and the
// lookup mode into one Select per data-RAM way, and also drives the output
// multiplexer. In a Parallel-mode access every way is selected and the
// multiplexer takes the way that the tag comparators hit in the same cycle.
// In an ETL-mode access only the way held in the Way register (found one
// cycle or more earlier) is selected, and the multiplexer takes that way. In
// the Tag state, and in any cycle without an access, no way is selected, so
// the data RAM is off. Purely combinational.
module way_distributor
  import detl_pkg::*;
#(
  parameter int unsigned WAYS = 4
) (
  input  logic                    par_access,  // Parallel-mode fetch this cycle
  input  logic                    etl_access,  // ETL-mode fetch this cycle
  input  logic [$clog2(WAYS)-1:0] tag_way,     // way hit by this cycle's tag lookup
  input  logic [$clog2(WAYS)-1:0] stored_way,  // content of the Way register
  output logic [WAYS-1:0]         way_en,      // per-way Select of the data RAM
  output logic [$clog2(WAYS)-1:0] mux_way      // select of the output multiplexer
);
  always_comb begin
    way_en  = '0;
    mux_way = tag_way;
    if (par_access) begin
      way_en = '1;
    end else if (etl_access) begin
      way_en[stored_way] = 1'b1;
      mux_way            = stored_way;
    end
  end

  // The two access kinds are exclusive by construction of the control path
  always_comb assert (!(par_access && etl_access));

endmodule
