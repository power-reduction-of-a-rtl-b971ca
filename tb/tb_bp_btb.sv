// Testbench for bp_btb: random writes into a small BTB, random lookups
// compared with a model that keeps one entry per index (last write wins).
module tb_bp_btb;
  import detl_pkg::*;
  localparam int ENTRIES = 32;
  logic clk = 0, rst_n = 0;
  addr_t rd_pc, wr_pc, wr_target, hit_target;
  logic hit, hit_rvc, wr_en, wr_rvc;
  logic [1:0] hit_slot;
  br_kind_e hit_kind, wr_kind;
  int checks = 0, failures = 0, hits = 0;

  typedef struct { bit v; addr_t pc; bit rvc; br_kind_e kind; addr_t target; } ent_t;
  ent_t model [ENTRIES];

  bp_btb #(.ENTRIES(ENTRIES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t rnd_pc();
    // few distinct tags so that lookups hit and alias
    return {24'h100 + 24'($urandom % 3), 8'($urandom)} & ~32'h1;
  endfunction

  initial begin
    int idx;
    bit exp_hit;
    wr_en = 0; wr_pc = 0; wr_rvc = 0; wr_kind = BR_COND; wr_target = 0; rd_pc = 0;
    foreach (model[i]) model[i].v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      rd_pc = rnd_pc();
      #1;
      idx = rd_pc[7:3];
      exp_hit = model[idx].v && model[idx].pc[31:8] == rd_pc[31:8];
      checks++;
      if (hit !== exp_hit) begin
        failures++; $display("FAIL hit %b exp %b pc %h", hit, exp_hit, rd_pc);
      end
      if (exp_hit) begin
        hits++;
        checks++;
        if (hit_slot !== model[idx].pc[2:1] || hit_rvc !== model[idx].rvc ||
            hit_kind !== model[idx].kind || hit_target !== model[idx].target) begin
          failures++; $display("FAIL entry at pc %h", rd_pc);
        end
      end
      wr_en = ($urandom % 3) == 0;
      wr_pc = rnd_pc();
      wr_rvc = $urandom % 2;
      wr_kind = br_kind_e'($urandom % 4);
      wr_target = $urandom & ~32'h1;
      if (wr_en) model[wr_pc[7:3]] = '{1, wr_pc, wr_rvc, wr_kind, wr_target};
    end
    checks++;
    if (hits < 100) begin failures++; $display("FAIL too few hits %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
