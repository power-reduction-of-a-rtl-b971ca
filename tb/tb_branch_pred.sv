// Testbench for branch_pred with a small BTB (64), PHT (64) and RAS (4):
// random resolved-branch updates, redirects and queue back-pressure; the
// predicted (PC, NPC) of every cycle is compared with a behavioural model of
// the BTB, gshare PHT, history register and return stack kept here.
module tb_branch_pred;
  import detl_pkg::*;
  localparam int BTB = 64, PHT = 64, RAS = 4;
  localparam addr_t RST = 32'h0000_1000;
  logic clk = 0, rst_n = 0;
  logic redirect, out_valid, out_ready, upd_valid;
  addr_t redirect_pc;
  fetch_req_t out;
  br_update_t upd;
  logic ev_btb_hit, ev_ras_push, ev_ras_pop;
  int checks = 0, failures = 0;
  int n_taken_cond = 0, n_jump = 0, n_call = 0, n_ret = 0;

  branch_pred #(.BTB_ENTRIES(BTB), .PHT_ENTRIES(PHT), .RAS_DEPTH(RAS), .RESET_PC(RST)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  typedef struct { bit v; addr_t pc; bit rvc; br_kind_e kind; addr_t tgt; } btb_t;
  btb_t  m_btb [BTB];
  int    m_pht [PHT];
  bit [5:0] m_bhr;
  addr_t m_ras [$];
  addr_t m_pc;

  function automatic addr_t rnd_pc();
    return (RST + 32'(($urandom % 48) * 2));   // 12 fetch blocks
  endfunction

  initial begin
    addr_t cur, exp_npc, ret;
    int bi, k;
    bit use_e, tk;
    redirect = 0; redirect_pc = 0; out_ready = 0; upd_valid = 0; upd = '0;
    foreach (m_btb[i]) m_btb[i].v = 0;
    foreach (m_pht[i]) m_pht[i] = int'(dut.u_pht.ctr[i]);   // not reset
    m_bhr = 0;
    m_pc = RST;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      redirect    = ($urandom % 6) == 0;
      redirect_pc = rnd_pc();
      out_ready   = ($urandom % 4) != 0;
      upd_valid   = ($urandom % 2) == 0;
      upd.pc      = rnd_pc();
      upd.kind    = br_kind_e'($urandom % 4);
      upd.taken   = (upd.kind != BR_COND) || ($urandom % 3 != 0);
      upd.rvc     = $urandom % 2;
      upd.target  = rnd_pc();
      // prediction by the model
      cur = redirect ? redirect_pc : m_pc;
      bi = cur[8:3];
      use_e = m_btb[bi].v && m_btb[bi].pc[31:9] == cur[31:9] && m_btb[bi].pc[2:1] >= cur[2:1];
      tk = 0;
      exp_npc = {cur[31:3] + 29'd1, 3'b000};
      if (use_e) begin
        case (m_btb[bi].kind)
          BR_COND: tk = m_pht[cur[8:3] ^ m_bhr] >= 2;
          BR_RET:  tk = m_ras.size() != 0;
          default: tk = 1;
        endcase
        if (tk) exp_npc = (m_btb[bi].kind == BR_RET) ? m_ras[$] : m_btb[bi].tgt;
      end
      #1;
      checks++;
      if (!(out_valid && out.pc == cur && out.npc == exp_npc)) begin
        failures++;
        $display("FAIL %0t pc %h/%h npc %h/%h", $time, out.pc, cur, out.npc, exp_npc);
      end
      // advance the model as the clock edge will
      if (out_ready) begin
        if (use_e && tk) begin
          case (m_btb[bi].kind)
            BR_COND: n_taken_cond++;
            BR_JUMP: n_jump++;
            BR_CALL: n_call++;
            BR_RET:  n_ret++;
          endcase
        end
        if (use_e && m_btb[bi].kind == BR_CALL) begin
          ret = {cur[31:3], m_btb[bi].pc[2:1], 1'b0} + (m_btb[bi].rvc ? 2 : 4);
          m_ras.push_back(ret);
          if (m_ras.size() > RAS) void'(m_ras.pop_front());
        end
        if (use_e && m_btb[bi].kind == BR_RET && m_ras.size() != 0) void'(m_ras.pop_back());
        m_pc = exp_npc;
      end else m_pc = cur;
      if (upd_valid) begin
        if (upd.taken) m_btb[upd.pc[8:3]] = '{1, upd.pc, upd.rvc, upd.kind, upd.target};
        if (upd.kind == BR_COND) begin
          k = upd.pc[8:3] ^ m_bhr;
          if (upd.taken && m_pht[k] < 3) m_pht[k]++;
          if (!upd.taken && m_pht[k] > 0) m_pht[k]--;
          m_bhr = {m_bhr[4:0], upd.taken};
        end
      end
    end
    checks++;
    if (n_taken_cond == 0 || n_jump == 0 || n_call == 0 || n_ret == 0) begin
      failures++;
      $display("FAIL not every prediction kind seen: cond %0d jump %0d call %0d ret %0d",
               n_taken_cond, n_jump, n_call, n_ret);
    end
    $display("predicted taken: cond %0d jump %0d call %0d ret %0d", n_taken_cond, n_jump, n_call, n_ret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
