// L1 instruction cache with Dynamic Early Tag Lookup (DETL).
//
// The cache takes (PC, NPC) requests from the look-ahead PC queue and writes
// 8-byte fetch blocks into the instruction queue (IQ). It normally works in
// the Parallel mode: tag RAM and all data-RAM ways are read with the PC, and
// the way that hits is multiplexed out. When the IQ fills, the cycle is a
// fetch bubble; the control path (detl_ctrl) uses it to look up the tag of
// the next block (the NPC of the block fetched last) and stores the matching
// way in the Way register. From then on (ETL mode) every fetch reads only the
// stored way of the data RAM with the PC, while the tag RAM is looked up with
// that request's NPC to find the way for the following block. A redirect or
// exception (flush) drops back to the Parallel mode.
//
// Misses: a Parallel-mode miss leaves the request at the head of the queue,
// refills the line and then repeats the lookup. A miss of an early (NPC) tag
// lookup starts the refill at once, while the data RAM stays off; when the
// line is in, the Way register is set to the filled way. No lookup is made
// while a refill is in progress. These miss rules, the single-cycle lookup
// and the refill interface are this design's choices; the modes and their
// address and way selection follow the document.
//
// Interface: req_* is a valid/ready request port (req_ready = request taken);
// iq_push/iq_wdata write the IQ, whose full flags come back as iq_full (this
// cycle) and iq_full_next (next cycle, including this cycle's push and pop);
// mem_* is the refill port. tag_rd_en and data_way_en report RAM activity per
// cycle (a tag read covers all ways), and the remaining outputs are events.
module icache_detl
  import detl_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 65536,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned LINE_BYTES  = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  // request from the look-ahead PC queue
  input  logic            req_valid,
  input  fetch_req_t      req,
  output logic            req_ready,
  // instruction queue
  input  logic            iq_full,
  input  logic            iq_full_next,
  output logic            iq_push,
  output iq_entry_t       iq_wdata,
  // next memory level
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output addr_t           mem_req_addr,
  input  logic            mem_resp_valid,
  input  fblock_t         mem_resp_data,
  // activity and events
  output detl_mode_e      state,
  output logic            tag_rd_en,
  output logic [WAYS-1:0] data_way_en,
  output logic            ev_par_access,
  output logic            ev_tag_lookup,
  output logic            ev_etl_access,
  output logic            ev_miss,
  output logic            ev_early_miss
);
  localparam int unsigned WB = $clog2(WAYS);

  detl_mode_e mode;
  logic       tag_sel_npc, par_access, tag_lookup, etl_access;
  logic       busy;

  // Way register: result of the last early tag lookup
  logic          wayr_vld_q, wayr_hit_q;
  logic [WB-1:0] wayr_way_q;
  // NPC of the block fetched last (the look-ahead address)
  logic          la_vld_q;
  addr_t         la_npc_q;
  // the refill in progress belongs to an early lookup
  logic          fill_for_way_q;

  // tag RAM
  addr_t           lookup_addr;
  logic            tag_hit;
  logic [WB-1:0]   tag_way;
  logic [WAYS-1:0] set_valid;
  // data RAM
  logic [WB-1:0]   mux_way;
  fblock_t         rdata;
  // refill
  logic            rf_start, rf_done;
  logic            rf_data_we, rf_tag_we;
  addr_t           rf_data_addr, rf_tag_addr;
  fblock_t         rf_data;
  logic [WB-1:0]   rf_way;

  detl_ctrl u_ctrl (
    .clk, .rst_n, .flush,
    .req_valid, .iq_full, .iq_full_next, .busy,
    .la_vld   (la_vld_q),
    .wayr_vld (wayr_vld_q),
    .wayr_hit (wayr_hit_q),
    .state, .mode, .tag_sel_npc, .par_access, .tag_lookup, .etl_access
  );

  assign tag_rd_en = par_access || tag_lookup || etl_access;

  icache_tag_array #(.CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES)) u_tag (
    .clk, .rst_n,
    .rd_en       (tag_rd_en),
    .sel_npc     (tag_sel_npc),
    .pc          (req.pc),
    .npc         (etl_access ? req.npc : la_npc_q),
    .lookup_addr,
    .hit         (tag_hit),
    .hit_way     (tag_way),
    .set_valid,
    .wr_en       (rf_tag_we),
    .wr_addr     (rf_tag_addr),
    .wr_way      (rf_way)
  );

  way_distributor #(.WAYS(WAYS)) u_dist (
    .par_access, .etl_access,
    .tag_way,
    .stored_way (wayr_way_q),
    .way_en     (data_way_en),
    .mux_way
  );

  icache_data_array #(.CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS)) u_data (
    .clk,
    .addr    (req.pc),
    .way_en  (data_way_en),
    .mux_way,
    .rdata,
    .wr_en   (rf_data_we),
    .wr_way  (rf_way),
    .wr_addr (rf_data_addr),
    .wr_data (rf_data)
  );

  assign rf_start = tag_rd_en && !tag_hit;

  icache_refill #(.WAYS(WAYS), .LINE_BYTES(LINE_BYTES)) u_refill (
    .clk, .rst_n,
    .start        (rf_start),
    .start_addr   (lookup_addr),
    .set_valid,
    .busy,
    .mem_req_valid, .mem_req_ready, .mem_req_addr,
    .mem_resp_valid, .mem_resp_data,
    .data_wr_en   (rf_data_we),
    .data_wr_addr (rf_data_addr),
    .data_wr_data (rf_data),
    .tag_wr_en    (rf_tag_we),
    .tag_wr_addr  (rf_tag_addr),
    .wr_way       (rf_way),
    .done         (rf_done)
  );

  // a fetch completes on a Parallel hit or on any ETL access
  assign iq_push       = (par_access && tag_hit) || etl_access;
  assign req_ready     = iq_push;
  assign iq_wdata.pc   = req.pc;
  assign iq_wdata.npc  = req.npc;
  assign iq_wdata.data = rdata;

  assign ev_par_access = par_access;
  assign ev_tag_lookup = tag_lookup;
  assign ev_etl_access = etl_access;
  assign ev_miss       = rf_start;
  assign ev_early_miss = rf_start && (tag_lookup || etl_access);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wayr_vld_q     <= 1'b0;
      wayr_hit_q     <= 1'b0;
      wayr_way_q     <= '0;
      la_vld_q       <= 1'b0;
      la_npc_q       <= '0;
      fill_for_way_q <= 1'b0;
    end else begin
      if (flush) begin
        wayr_vld_q     <= 1'b0;
        la_vld_q       <= 1'b0;
        fill_for_way_q <= 1'b0;
      end
      if (rf_done && fill_for_way_q && !flush) begin
        wayr_hit_q     <= 1'b1;
        wayr_way_q     <= rf_way;
        fill_for_way_q <= 1'b0;
      end
      if (iq_push) begin
        la_vld_q <= 1'b1;
        la_npc_q <= req.npc;
      end
      if (tag_lookup || etl_access) begin
        wayr_vld_q     <= 1'b1;
        wayr_hit_q     <= tag_hit;
        wayr_way_q     <= tag_way;
        fill_for_way_q <= !tag_hit;
      end
      if (par_access) wayr_vld_q <= 1'b0;
    end
  end

  // In the ETL mode the block fetched is the one whose tag was looked up early
  assert property (@(posedge clk) disable iff (!rst_n) !etl_access || req.pc == la_npc_q);
  // The tag RAM is addressed with the NPC exactly outside the Parallel mode
  assert property (@(posedge clk) disable iff (!rst_n) tag_sel_npc == (mode != MODE_PARALLEL));
  // Only the stored way is read in the ETL mode
  assert property (@(posedge clk) disable iff (!rst_n) !etl_access || $onehot(data_way_en));

endmodule
