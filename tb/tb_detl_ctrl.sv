// Testbench for detl_ctrl: directed walk through Parallel -> Tag -> ETL ->
// Parallel, then random inputs compared cycle by cycle against a reference
// model of the control path written independently below.
module tb_detl_ctrl;
  import detl_pkg::*;

  logic clk = 0, rst_n = 0;
  logic flush, req_valid, iq_full, iq_full_next, busy, la_vld, wayr_vld, wayr_hit;
  detl_mode_e state, mode;
  logic tag_sel_npc, par_access, tag_lookup, etl_access;
  int checks = 0, failures = 0;

  detl_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  task automatic drive(input logic f, rv, full, fulln, b, la, wv, wh);
    flush = f; req_valid = rv; iq_full = full; iq_full_next = fulln;
    busy = b; la_vld = la; wayr_vld = wv; wayr_hit = wh;
  endtask

  // reference model
  detl_mode_e ref_state;
  detl_mode_e r_mode;
  logic r_sel, r_par, r_tag, r_etl;
  always_comb begin
    r_mode = flush ? MODE_PARALLEL : ref_state;
    r_sel  = r_mode != MODE_PARALLEL;
    r_par  = r_mode == MODE_PARALLEL && req_valid && (!iq_full || flush) && !busy;
    r_tag  = r_mode != MODE_PARALLEL && la_vld && !wayr_vld && !busy;
    r_etl  = r_mode == MODE_ETL && req_valid && !iq_full && !busy && wayr_vld && wayr_hit;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ref_state <= MODE_PARALLEL;
    else if (flush) ref_state <= MODE_PARALLEL;
    else case (ref_state)
      MODE_PARALLEL: if (iq_full_next) ref_state <= MODE_TAG;
      MODE_TAG: if (!iq_full_next && (wayr_vld || r_tag)) ref_state <= MODE_ETL;
      default: ;
    endcase
  end

  initial begin
    drive(0, 1, 0, 0, 0, 0, 0, 0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // Parallel mode after reset
    check(state == MODE_PARALLEL, "reset state is Parallel");
    check(par_access && !tag_sel_npc && !tag_lookup && !etl_access, "parallel access with PC");
    drive(0, 1, 1, 0, 0, 1, 0, 0); #1;
    check(!par_access, "no access while IQ full");
    // IQ fills: Tag state
    drive(0, 1, 0, 1, 0, 1, 0, 0);
    @(negedge clk);
    check(state == MODE_TAG, "IQ full -> Tag state");
    drive(0, 1, 1, 1, 0, 1, 0, 0); #1;
    check(tag_lookup && tag_sel_npc && !par_access && !etl_access, "Tag state looks up NPC");
    @(negedge clk);
    check(state == MODE_TAG, "stays in Tag while the bubble lasts");
    drive(0, 1, 1, 1, 0, 1, 1, 1); #1;
    check(!tag_lookup, "lookup made once per bubble");
    drive(0, 1, 1, 0, 0, 1, 1, 1);
    @(negedge clk);
    check(state == MODE_ETL, "bubble released -> ETL");
    drive(0, 1, 0, 0, 0, 1, 1, 1); #1;
    check(etl_access && tag_sel_npc && !par_access, "ETL access with stored way");
    drive(0, 1, 0, 0, 0, 1, 1, 0); #1;
    check(!etl_access, "ETL waits for a pending miss");
    drive(0, 1, 0, 0, 1, 1, 1, 1); #1;
    check(!etl_access, "ETL waits while refilling");
    drive(0, 1, 0, 1, 0, 1, 1, 1);
    @(negedge clk);
    check(state == MODE_ETL, "ETL holds while the IQ fills again");
    drive(1, 1, 1, 0, 0, 1, 1, 1); #1;
    check(mode == MODE_PARALLEL && par_access && !tag_sel_npc, "redirect fetches in Parallel at once");
    @(negedge clk);
    check(state == MODE_PARALLEL, "redirect -> Parallel");
    // Tag with a lookup and an immediate release goes straight to ETL
    drive(0, 1, 0, 1, 0, 1, 0, 0);
    @(negedge clk);
    drive(0, 1, 1, 0, 0, 1, 0, 0);
    @(negedge clk);
    check(state == MODE_ETL, "one-cycle bubble is enough for ETL");
    // random comparison
    for (int i = 0; i < 5000; i++) begin
      drive(($urandom % 16) == 0, $urandom % 2, $urandom % 2, ($urandom % 4) == 0,
            ($urandom % 4) == 0, $urandom % 2, $urandom % 2, $urandom % 2);
      #1;
      check(state == ref_state && mode == r_mode && tag_sel_npc == r_sel &&
            par_access == r_par && tag_lookup == r_tag && etl_access == r_etl,
            "outputs match reference model");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
