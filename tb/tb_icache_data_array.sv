// Testbench for icache_data_array on a 1 KB, 4-way array: random block
// writes and reads with random per-way Selects; a selected way returns the
// block last written there, an unselected way drives zero.
module tb_icache_data_array;
  import detl_pkg::*;
  localparam int CB = 1024, WAYS = 4, BLOCKS = CB / (WAYS * 8);
  logic clk = 0, wr_en;
  addr_t addr, wr_addr;
  logic [WAYS-1:0] way_en;
  logic [1:0] mux_way, wr_way;
  fblock_t rdata, wr_data, exp;
  fblock_t model [WAYS][BLOCKS];
  int checks = 0, failures = 0;

  icache_data_array #(.CACHE_BYTES(CB), .WAYS(WAYS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill everything first so that reads are defined
    wr_en = 1;
    addr = 0; way_en = 0; mux_way = 0;
    for (int w = 0; w < WAYS; w++)
      for (int b = 0; b < BLOCKS; b++) begin
        @(negedge clk);
        wr_way = 2'(w); wr_addr = addr_t'(b * 8); wr_data = {$urandom, $urandom};
        model[w][b] = wr_data;
      end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      wr_en = $urandom % 2;
      wr_way = 2'($urandom);
      wr_addr = {$urandom} & ~32'h7;
      wr_data = {$urandom, $urandom};
      addr = $urandom;
      way_en = 4'($urandom);
      mux_way = 2'($urandom);
      #1;
      exp = way_en[mux_way] ? model[mux_way][addr[7:3]] : '0;
      checks++;
      if (rdata !== exp) begin
        failures++; $display("FAIL rdata %h exp %h", rdata, exp);
      end
      if (wr_en) model[wr_way][wr_addr[7:3]] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
