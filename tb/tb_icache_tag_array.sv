// Testbench for icache_tag_array on a 1 KB, 4-way, 32-byte-line array:
// random fills and lookups through the PC/NPC multiplexer, compared with a
// model of the tags and valid bits.
module tb_icache_tag_array;
  import detl_pkg::*;
  localparam int CB = 1024, WAYS = 4, LB = 32, SETS = CB / (WAYS * LB);
  logic clk = 0, rst_n = 0;
  logic rd_en, sel_npc, hit, wr_en;
  addr_t pc, npc, lookup_addr, wr_addr;
  logic [1:0] hit_way, wr_way;
  logic [WAYS-1:0] set_valid;
  bit    mv [WAYS][SETS];
  addr_t mt [WAYS][SETS];
  int checks = 0, failures = 0, hits = 0, misses = 0;

  icache_tag_array #(.CACHE_BYTES(CB), .WAYS(WAYS), .LINE_BYTES(LB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  function automatic addr_t rnd_addr();
    return {22'h2000 + 22'($urandom % 6), 10'($urandom)};
  endfunction

  initial begin
    addr_t a;
    int s;
    bit exp_hit;
    rd_en = 0; sel_npc = 0; pc = 0; npc = 0; wr_en = 0; wr_addr = 0; wr_way = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      rd_en = ($urandom % 4) != 0;
      sel_npc = $urandom % 2;
      pc = rnd_addr();
      npc = rnd_addr();
      wr_en = ($urandom % 3) == 0;
      wr_addr = rnd_addr();
      wr_way = 2'($urandom);
      #1;
      a = sel_npc ? npc : pc;
      s = a[7:5];
      exp_hit = 0;
      for (int w = 0; w < WAYS; w++) if (mv[w][s] && mt[w][s][31:8] == a[31:8]) exp_hit = 1;
      check(lookup_addr == a, "address multiplexer");
      if (rd_en) begin
        check(hit == exp_hit, "hit");
        if (exp_hit) begin
          hits++;
          check(mv[hit_way][s] && mt[hit_way][s][31:8] == a[31:8], "hit way holds the tag");
        end else misses++;
        for (int w = 0; w < WAYS; w++) check(set_valid[w] == mv[w][s], "set valid bits");
      end else check(!hit, "no hit without a lookup");
      if (wr_en) begin
        // a refill never installs a line that is already in another way
        for (int w = 0; w < WAYS; w++)
          if (w != wr_way && mv[w][wr_addr[7:5]] && mt[w][wr_addr[7:5]][31:8] == wr_addr[31:8]) wr_en = 0;
      end
      if (wr_en) begin
        mv[wr_way][wr_addr[7:5]] = 1;
        mt[wr_way][wr_addr[7:5]] = wr_addr;
      end
    end
    check(hits > 100 && misses > 100, "both hits and misses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
