// Instruction-fetch front end with a Dynamic Early Tag Lookup (DETL) I-cache.
//
// The branch prediction unit (BTB, gshare PHT, BHR, RAS) is decoupled from
// the L1 I-cache by a look-ahead PC queue of (PC, NPC) pairs. The I-cache
// writes 8-byte fetch blocks into the instruction queue (IQ) that feeds the
// decoder. Whenever the IQ is full the fetch stalls; the DETL control path
// uses that bubble to look up the tag of the next block and afterwards reads
// only the matching way of the data RAM for every fetch, until a redirect.
//
// The back end (decoder, issue queue, execution units) and the next memory
// level are outside this module:
//   iq_*       : fetch blocks to the decoder (valid/ready)
//   redirect_* : mis-prediction or exception, with the correct PC; flushes
//                the PC queue and the IQ, and the I-cache fetches the target
//                in the same cycle
//   upd_*      : resolved control transfers that train the predictor
//   mem_*      : I-cache line refill port
// The remaining outputs expose the lookup mode, per-cycle RAM activity (for
// energy accounting) and event strobes. Default parameters are the
// document's processor configuration; PC-queue depth and IQ depth in blocks
// are this design's choices.
module detl_frontend
  import detl_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 65536,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned LINE_BYTES  = 32,
  parameter int unsigned IQ_DEPTH    = 8,
  parameter int unsigned PCQ_DEPTH   = 4,
  parameter int unsigned BTB_ENTRIES = 4096,
  parameter int unsigned PHT_ENTRIES = 8192,
  parameter int unsigned RAS_DEPTH   = 16,
  parameter addr_t       RESET_PC    = 32'h8000_0000
) (
  input  logic            clk,
  input  logic            rst_n,
  // back end
  input  logic            redirect_valid,
  input  addr_t           redirect_pc,
  input  logic            upd_valid,
  input  br_update_t      upd,
  output logic            iq_valid,
  input  logic            iq_ready,
  output iq_entry_t       iq_data,
  // next memory level
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output addr_t           mem_req_addr,
  input  logic            mem_resp_valid,
  input  fblock_t         mem_resp_data,
  // activity and events
  output detl_mode_e      mode,
  output logic [$clog2(IQ_DEPTH+1)-1:0] iq_count,
  output logic            tag_rd_en,
  output logic [WAYS-1:0] data_way_en,
  output logic            ev_par_access,
  output logic            ev_tag_lookup,
  output logic            ev_etl_access,
  output logic            ev_miss,
  output logic            ev_early_miss,
  output logic            ev_iq_full,
  output logic            ev_pcq_bypass,
  output logic            ev_btb_hit,
  output logic            ev_ras_push,
  output logic            ev_ras_pop
);
  logic       bp_valid, bp_ready;
  fetch_req_t bp_req;
  logic       fq_valid, fq_ready;
  fetch_req_t fq_req;
  logic       iq_full, iq_full_next, iq_push;
  iq_entry_t  iq_wdata;

  branch_pred #(
    .BTB_ENTRIES(BTB_ENTRIES), .PHT_ENTRIES(PHT_ENTRIES),
    .RAS_DEPTH(RAS_DEPTH), .RESET_PC(RESET_PC)
  ) u_bp (
    .clk, .rst_n,
    .redirect    (redirect_valid),
    .redirect_pc,
    .out_valid   (bp_valid),
    .out_ready   (bp_ready),
    .out         (bp_req),
    .upd_valid, .upd,
    .ev_btb_hit, .ev_ras_push, .ev_ras_pop
  );

  pc_queue #(.DEPTH(PCQ_DEPTH)) u_pcq (
    .clk, .rst_n,
    .flush     (redirect_valid),
    .in_valid  (bp_valid),
    .in_ready  (bp_ready),
    .in_data   (bp_req),
    .out_valid (fq_valid),
    .out_ready (fq_ready),
    .out_data  (fq_req),
    .bypass    (ev_pcq_bypass)
  );

  icache_detl #(.CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES)) u_icache (
    .clk, .rst_n,
    .flush     (redirect_valid),
    .req_valid (fq_valid),
    .req       (fq_req),
    .req_ready (fq_ready),
    .iq_full, .iq_full_next, .iq_push, .iq_wdata,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_resp_valid, .mem_resp_data,
    .state     (mode),
    .tag_rd_en, .data_way_en,
    .ev_par_access, .ev_tag_lookup, .ev_etl_access, .ev_miss, .ev_early_miss
  );

  inst_queue #(.DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n,
    .flush     (redirect_valid),
    .push      (iq_push),
    .wdata     (iq_wdata),
    .full      (iq_full),
    .full_next (iq_full_next),
    .out_valid (iq_valid),
    .out_ready (iq_ready),
    .out_data  (iq_data),
    .count     (iq_count)
  );

  assign ev_iq_full = iq_full && !redirect_valid;

endmodule
