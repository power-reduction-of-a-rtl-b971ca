// Tag RAM of the set-associative L1 I-cache, with the two-to-one address
// multiplexer in front of it and the per-way tag comparators behind it.
//
// The document places a 2:1 multiplexer on the tag-RAM address bus: in the
// Parallel mode the tag RAM is looked up with the fetch PC, in the Tag state
// and the ETL mode with the look-ahead NPC. All ways are read at once (a
// lookup costs N tag reads in every mode). The lookup is modelled as one
// cycle: the set is read and compared combinationally while rd_en is high, and
// the caller registers what it needs, which matches the single-access latency
// the document assumes. Valid bits are flip-flops cleared at reset; the tags
// are a plain array written by the refill logic. Geometry defaults follow
// the document's 64 KB, 4-way, 32-byte-line cache; the array organisation is
// this design's own choice.
//
// Ports: sel_npc picks npc over pc; hit / hit_way / set_valid describe the
// looked-up set; lookup_addr is the address that was looked up (used to start
// a refill). A write (wr_en) installs the tag of wr_addr in way wr_way.
module icache_tag_array
  import detl_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 65536,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned LINE_BYTES  = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic            rd_en,
  input  logic            sel_npc,
  input  addr_t           pc,
  input  addr_t           npc,
  output addr_t           lookup_addr,
  output logic            hit,
  output logic [$clog2(WAYS)-1:0] hit_way,
  output logic [WAYS-1:0] set_valid,
  // fill
  input  logic            wr_en,
  input  addr_t           wr_addr,
  input  logic [$clog2(WAYS)-1:0] wr_way
);
  localparam int unsigned SETS     = CACHE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned OFF_BITS = $clog2(LINE_BYTES);
  localparam int unsigned IDX_BITS = $clog2(SETS);
  localparam int unsigned TAG_BITS = XLEN - IDX_BITS - OFF_BITS;

  typedef logic [TAG_BITS-1:0] tag_t;

  logic [IDX_BITS-1:0] rd_idx, wr_idx;
  tag_t                rd_tag;
  logic [WAYS-1:0]     way_match;

  assign lookup_addr = sel_npc ? npc : pc;
  assign rd_idx      = lookup_addr[OFF_BITS +: IDX_BITS];
  assign rd_tag      = lookup_addr[XLEN-1 -: TAG_BITS];
  assign wr_idx      = wr_addr[OFF_BITS +: IDX_BITS];

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    tag_t            tags [SETS];
    logic [SETS-1:0] valid;

    always_ff @(posedge clk) begin
      if (wr_en && wr_way == w) tags[wr_idx] <= wr_addr[XLEN-1 -: TAG_BITS];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                    valid         <= '0;
      else if (wr_en && wr_way == w) valid[wr_idx] <= 1'b1;
    end

    assign set_valid[w] = rd_en && valid[rd_idx];
    assign way_match[w] = rd_en && valid[rd_idx] && (tags[rd_idx] == rd_tag);
  end

  always_comb begin
    hit     = |way_match;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (way_match[w]) hit_way = w[$clog2(WAYS)-1:0];
  end

endmodule
