// Control path of the Dynamic Early Tag Lookup (DETL) I-cache.
//
// Three states, as in the document's control-path diagram:
//   Parallel - after reset; tag and data RAMs (all ways) are looked up with
//              the fetch PC. When the instruction queue (IQ) fills, go to Tag.
//   Tag      - fetch bubble: the tag RAM is looked up with the look-ahead NPC
//              and the result kept in the Way register; the data RAM is off.
//              When the bubble is released, go to ETL.
//   ETL      - the data RAM is read with the PC in the matching way only,
//              while the tag RAM is looked up with the NPC for the next block.
//              Stay until a redirect or exception.
// A redirect/exception (flush) returns to Parallel from any state, and the
// access in that very cycle is already a Parallel one, so the redirect target
// is fetched in the cycle the misprediction is signalled.
//
// This design's own timing choice: the state register is loaded from
// iq_full_next, the IQ fullness of the coming cycle, so the Tag state
// coincides with the first bubble cycle, and the lookup it makes is ready when
// the bubble ends; the switch costs no fetch cycle. The Tag lookup is made
// once per bubble (the Way register keeps it); all fetches wait while a
// refill is in progress (busy).
//
// Outputs are combinational in the current state and inputs: mode (effective
// lookup mode), tag_sel_npc (tag address multiplexer), and the three access
// strobes par_access, tag_lookup and etl_access.
module detl_ctrl
  import detl_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,         // redirect or exception
  input  logic       req_valid,     // a (PC, NPC) request is available
  input  logic       iq_full,       // IQ cannot accept a block this cycle
  input  logic       iq_full_next,  // IQ will be full in the next cycle
  input  logic       busy,          // refill in progress
  input  logic       la_vld,        // look-ahead NPC register is valid
  input  logic       wayr_vld,      // Way register holds the NPC's lookup
  input  logic       wayr_hit,      // ... and it is a hit (not a pending miss)
  output detl_mode_e state,
  output detl_mode_e mode,
  output logic       tag_sel_npc,
  output logic       par_access,
  output logic       tag_lookup,
  output logic       etl_access
);
  detl_mode_e state_q, state_d;
  logic       iq_block;

  assign state       = state_q;
  assign mode        = flush ? MODE_PARALLEL : state_q;
  assign iq_block    = iq_full && !flush;   // a flushed IQ accepts again
  assign tag_sel_npc = (mode != MODE_PARALLEL);

  assign par_access = (mode == MODE_PARALLEL) && req_valid && !iq_block && !busy;
  assign tag_lookup = (mode != MODE_PARALLEL) && la_vld && !wayr_vld && !busy;
  assign etl_access = (mode == MODE_ETL) && req_valid && !iq_block && !busy
                      && wayr_vld && wayr_hit;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      MODE_PARALLEL: if (iq_full_next) state_d = MODE_TAG;
      MODE_TAG:      if (!iq_full_next && (wayr_vld || tag_lookup)) state_d = MODE_ETL;
      MODE_ETL:      state_d = MODE_ETL;
      default:       state_d = MODE_PARALLEL;
    endcase
    if (flush) state_d = MODE_PARALLEL;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= MODE_PARALLEL;
    else        state_q <= state_d;
  end

endmodule
