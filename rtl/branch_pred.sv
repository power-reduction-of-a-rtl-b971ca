// Branch prediction unit (BP) of the decoupled fetch front end.
//
// Each cycle the unit predicts one fetch block: for the current PC it looks
// up the BTB, the gshare PHT (indexed by block address XOR the BHR) and the
// RAS, and forms the next PC (NPC): the BTB target of a taken branch, jump
// or call, the RAS top for a return, or else the next sequential 8-byte
// block (also for a return when the RAS is empty). A BTB entry only counts if its branch lies at or after the PC inside
// the block. The (PC, NPC) pair goes to the look-ahead PC queue, and the PC
// register advances to the NPC when the queue takes it. A mis-prediction or
// exception (redirect) replaces the PC in the same cycle through the
// multiplexer in front of the unit, so the redirect target is predicted, and
// can be fetched, at once. The back end reports each resolved control
// transfer on the update port: taken ones are written to the BTB,
// conditional ones train the PHT and shift the BHR.
//
// The document names the structures (BTB 4K, gshare 8K PHT, BHR, RAS 16) and
// what the unit provides; the single-cycle prediction, the block-based
// lookup, non-speculative history and the update interface are this design's
// own choices.
module branch_pred
  import detl_pkg::*;
#(
  parameter int unsigned BTB_ENTRIES = 4096,
  parameter int unsigned PHT_ENTRIES = 8192,
  parameter int unsigned RAS_DEPTH   = 16,
  parameter addr_t       RESET_PC    = 32'h8000_0000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       redirect,
  input  addr_t      redirect_pc,
  output logic       out_valid,
  input  logic       out_ready,
  output fetch_req_t out,
  input  logic       upd_valid,
  input  br_update_t upd,
  output logic       ev_btb_hit,   // a BTB entry applied to this prediction
  output logic       ev_ras_push,
  output logic       ev_ras_pop
);
  localparam int unsigned HB = $clog2(PHT_ENTRIES);

  addr_t          pc_q, pc_cur, fallthrough, target, npc, call_ret;
  logic           btb_hit, btb_use, btb_rvc, pht_taken, taken, fire;
  logic [FOFF_BITS-2:0] btb_slot;
  br_kind_e       btb_kind;
  addr_t          btb_target, ras_top;
  logic [HB-1:0]  bhr;
  logic           ras_empty;

  assign pc_cur = redirect ? redirect_pc : pc_q;

  bp_btb #(.ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n,
    .rd_pc      (pc_cur),
    .hit        (btb_hit),
    .hit_slot   (btb_slot),
    .hit_rvc    (btb_rvc),
    .hit_kind   (btb_kind),
    .hit_target (btb_target),
    .wr_en      (upd_valid && upd.taken),
    .wr_pc      (upd.pc),
    .wr_rvc     (upd.rvc),
    .wr_kind    (upd.kind),
    .wr_target  (upd.target)
  );

  bp_pht #(.ENTRIES(PHT_ENTRIES)) u_pht (
    .clk,
    .rd_idx    (pc_cur[FOFF_BITS +: HB] ^ bhr),
    .taken     (pht_taken),
    .upd_en    (upd_valid && upd.kind == BR_COND),
    .upd_idx   (upd.pc[FOFF_BITS +: HB] ^ bhr),
    .upd_taken (upd.taken)
  );

  bp_bhr #(.LEN(HB)) u_bhr (
    .clk, .rst_n,
    .shift_en (upd_valid && upd.kind == BR_COND),
    .taken    (upd.taken),
    .history  (bhr)
  );

  bp_ras #(.DEPTH(RAS_DEPTH)) u_ras (
    .clk, .rst_n,
    .push      (fire && btb_use && btb_kind == BR_CALL),
    .push_addr (call_ret),
    .pop       (fire && btb_use && btb_kind == BR_RET),
    .top       (ras_top),
    .empty     (ras_empty)
  );

  assign btb_use     = btb_hit && (btb_slot >= pc_cur[FOFF_BITS-1:1]);
  always_comb begin
    unique case (btb_kind)
      BR_COND: taken = btb_use && pht_taken;
      BR_RET:  taken = btb_use && !ras_empty;  // nothing to predict with
      default: taken = btb_use;
    endcase
  end
  assign target      = (btb_kind == BR_RET) ? ras_top : btb_target;
  assign fallthrough = {pc_cur[XLEN-1:FOFF_BITS] + 1'b1, FOFF_BITS'(0)};
  assign npc         = taken ? target : fallthrough;
  assign call_ret    = {pc_cur[XLEN-1:FOFF_BITS], btb_slot, 1'b0} + (btb_rvc ? 32'd2 : 32'd4);

  assign out_valid = 1'b1;
  assign out.pc    = pc_cur;
  assign out.npc   = npc;
  assign fire      = out_valid && out_ready;

  assign ev_btb_hit  = fire && btb_use;
  assign ev_ras_push = fire && btb_use && btb_kind == BR_CALL;
  assign ev_ras_pop  = fire && btb_use && btb_kind == BR_RET;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc_q <= RESET_PC;
    else        pc_q <= fire ? npc : pc_cur;
  end

endmodule
