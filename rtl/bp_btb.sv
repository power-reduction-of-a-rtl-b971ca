// Branch target buffer (BTB), direct-mapped, one entry per fetch block.
//
// Looked up with the address of the fetch block being predicted. An entry
// records the last taken control transfer seen in that 8-byte block: its
// halfword position in the block, whether it is a 16-bit instruction, its
// kind and its target. Read is combinational; the back end writes an entry
// when it resolves a taken control transfer. The 4K entries are the
// document's size; the direct-mapped organisation and the entry format are
// this design's choices. Valid bits are cleared at reset.
module bp_btb
  import detl_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096
) (
  input  logic     clk,
  input  logic     rst_n,
  // lookup
  input  addr_t    rd_pc,
  output logic     hit,
  output logic [FOFF_BITS-2:0] hit_slot,  // halfword index of the branch
  output logic     hit_rvc,
  output br_kind_e hit_kind,
  output addr_t    hit_target,
  // write
  input  logic     wr_en,
  input  addr_t    wr_pc,                 // address of the branch instruction
  input  logic     wr_rvc,
  input  br_kind_e wr_kind,
  input  addr_t    wr_target
);
  localparam int unsigned IB = $clog2(ENTRIES);
  localparam int unsigned TB = XLEN - IB - FOFF_BITS;

  typedef struct packed {
    logic [TB-1:0]          tag;
    logic [FOFF_BITS-2:0]   slot;
    logic                   rvc;
    br_kind_e               kind;
    addr_t                  target;
  } btb_entry_t;

  btb_entry_t         ent [ENTRIES];
  logic [ENTRIES-1:0] vld;

  logic [IB-1:0] ri, wi;
  btb_entry_t    re;

  assign ri = rd_pc[FOFF_BITS +: IB];
  assign wi = wr_pc[FOFF_BITS +: IB];
  assign re = ent[ri];

  assign hit        = vld[ri] && (re.tag == rd_pc[XLEN-1 -: TB]);
  assign hit_slot   = re.slot;
  assign hit_rvc    = re.rvc;
  assign hit_kind   = re.kind;
  assign hit_target = re.target;

  always_ff @(posedge clk) begin
    if (wr_en) ent[wi] <= '{tag:    wr_pc[XLEN-1 -: TB],
                            slot:   wr_pc[FOFF_BITS-1:1],
                            rvc:    wr_rvc,
                            kind:   wr_kind,
                            target: wr_target};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     vld     <= '0;
    else if (wr_en) vld[wi] <= 1'b1;
  end

endmodule
