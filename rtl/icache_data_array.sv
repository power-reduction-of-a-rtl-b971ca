// Data RAM of the set-associative L1 I-cache, one bank per way, with the
// output multiplexer that routes the selected way to the instruction queue.
//
// Each way is a separate bank of 8-byte fetch blocks. way_en is the per-way
// Select from the distributor: a bank is read only while its Select is high,
// so the number of high bits in a cycle is the number of data-RAM accesses
// (all ways in the Parallel mode, one in the ETL mode, none in the Tag state).
// mux_way, also from the distributor, picks which bank drives rdata. The read
// is combinational within the cycle, matching the single-access latency the
// document assumes; a deselected bank drives zero. Refill writes one 8-byte
// beat per cycle. Sizes default to the document's 64 KB, 4-way, 32-byte
// lines; bank organisation and write port are this design's choices.
module icache_data_array
  import detl_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 65536,
  parameter int unsigned WAYS        = 4
) (
  input  logic            clk,
  // read
  input  addr_t           addr,
  input  logic [WAYS-1:0] way_en,
  input  logic [$clog2(WAYS)-1:0] mux_way,
  output fblock_t         rdata,
  // refill write, one fetch block per cycle
  input  logic            wr_en,
  input  logic [$clog2(WAYS)-1:0] wr_way,
  input  addr_t           wr_addr,   // byte address of the block to write
  input  fblock_t         wr_data
);
  localparam int unsigned BLOCKS   = CACHE_BYTES / (WAYS * FETCH_BYTES);
  localparam int unsigned BLK_BITS = $clog2(BLOCKS);

  logic [BLK_BITS-1:0] rd_blk, wr_blk;
  fblock_t             bank_out [WAYS];

  assign rd_blk = addr[FOFF_BITS +: BLK_BITS];
  assign wr_blk = wr_addr[FOFF_BITS +: BLK_BITS];

  for (genvar w = 0; w < WAYS; w++) begin : g_bank
    fblock_t mem [BLOCKS];

    always_ff @(posedge clk) begin
      if (wr_en && wr_way == w) mem[wr_blk] <= wr_data;
    end

    assign bank_out[w] = way_en[w] ? mem[rd_blk] : '0;
  end

  assign rdata = bank_out[mux_way];

endmodule
