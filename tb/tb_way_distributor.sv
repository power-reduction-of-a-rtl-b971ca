// Testbench for way_distributor: all input combinations for four ways,
// checked against the expected per-way Select and multiplexer select.
module tb_way_distributor;
  localparam int WAYS = 4;
  logic par_access, etl_access;
  logic [1:0] tag_way, stored_way, mux_way;
  logic [WAYS-1:0] way_en, exp_en;
  int checks = 0, failures = 0;

  way_distributor #(.WAYS(WAYS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++)
      for (int t = 0; t < WAYS; t++)
        for (int s = 0; s < WAYS; s++) begin
          par_access = (k == 1);
          etl_access = (k == 2);
          tag_way = 2'(t);
          stored_way = 2'(s);
          #1;
          exp_en = (k == 1) ? 4'b1111 : (k == 2) ? 4'(1 << s) : 4'b0000;
          checks++;
          if (way_en !== exp_en) begin
            failures++;
            $display("FAIL k=%0d t=%0d s=%0d way_en=%b exp=%b", k, t, s, way_en, exp_en);
          end
          if (k != 0) begin
            checks++;
            if (mux_way !== ((k == 1) ? 2'(t) : 2'(s))) begin
              failures++;
              $display("FAIL mux k=%0d t=%0d s=%0d mux=%0d", k, t, s, mux_way);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
