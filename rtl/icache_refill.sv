// Miss handler of the L1 I-cache.
//
// On start it picks a victim way in the missing line's set (the first invalid
// way, else a round-robin pointer), requests the 32-byte line from the next
// memory level with a valid/ready handshake, and writes the returned 8-byte
// beats, in ascending address order, into the data RAM. With the last beat
// it writes the tag and pulses done with the way it filled. busy is high from
// the cycle after start until and including the done cycle. The document
// only says that a miss issues a miss-handling request; the victim choice,
// the memory handshake and the beat order are this design's own.
module icache_refill
  import detl_pkg::*;
#(
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  addr_t           start_addr,
  input  logic [WAYS-1:0] set_valid,     // valid bits of the missing set
  output logic            busy,
  // next memory level
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output addr_t           mem_req_addr,  // line-aligned
  input  logic            mem_resp_valid,
  input  fblock_t         mem_resp_data,
  // array writes
  output logic            data_wr_en,
  output addr_t           data_wr_addr,
  output fblock_t         data_wr_data,
  output logic            tag_wr_en,
  output addr_t           tag_wr_addr,
  output logic [$clog2(WAYS)-1:0] wr_way,
  output logic            done
);
  localparam int unsigned BEATS     = LINE_BYTES / FETCH_BYTES;
  localparam int unsigned BEAT_BITS = (BEATS > 1) ? $clog2(BEATS) : 1;
  localparam int unsigned OFF_BITS  = $clog2(LINE_BYTES);

  typedef enum logic [1:0] {RF_IDLE, RF_REQ, RF_RESP} rf_state_e;

  rf_state_e                 st_q;
  addr_t                     line_q;
  logic [$clog2(WAYS)-1:0]   way_q, rr_q, victim;
  logic [BEAT_BITS-1:0]      beat_q;
  logic                      last_beat;

  always_comb begin
    victim = rr_q;
    for (int w = WAYS - 1; w >= 0; w--)
      if (!set_valid[w]) victim = w[$clog2(WAYS)-1:0];
  end

  assign busy          = (st_q != RF_IDLE);
  assign mem_req_valid = (st_q == RF_REQ);
  assign mem_req_addr  = line_q;
  assign last_beat     = (beat_q == BEAT_BITS'(BEATS - 1));

  assign data_wr_en   = (st_q == RF_RESP) && mem_resp_valid;
  assign data_wr_addr = line_q | (addr_t'(beat_q) << FOFF_BITS);
  assign data_wr_data = mem_resp_data;
  assign tag_wr_en    = data_wr_en && last_beat;
  assign tag_wr_addr  = line_q;
  assign wr_way       = way_q;
  assign done         = tag_wr_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= RF_IDLE;
      line_q <= '0;
      way_q  <= '0;
      rr_q   <= '0;
      beat_q <= '0;
    end else begin
      unique case (st_q)
        RF_IDLE: if (start) begin
          st_q   <= RF_REQ;
          line_q <= {start_addr[XLEN-1:OFF_BITS], OFF_BITS'(0)};
          way_q  <= victim;
          rr_q   <= rr_q + 1'b1;
          beat_q <= '0;
        end
        RF_REQ: if (mem_req_ready) st_q <= RF_RESP;
        RF_RESP: if (mem_resp_valid) begin
          beat_q <= beat_q + 1'b1;
          if (last_beat) st_q <= RF_IDLE;
        end
        default: st_q <= RF_IDLE;
      endcase
    end
  end

  // A miss is only started when no refill is in progress
  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy));
  // The next level only answers a request that was accepted
  assert property (@(posedge clk) disable iff (!rst_n) !(mem_resp_valid && st_q != RF_RESP));

endmodule
