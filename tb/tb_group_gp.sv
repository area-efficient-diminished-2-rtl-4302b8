// tb_group_gp: exhaustive self-checking test of the four-bit group
// generate/propagate tree. All 256 combinations of g[3:0] and p[3:0] are
// applied; the expected group pair is computed by the serial recurrence
// G = g3 | p3 (g2 | p2 (g1 | p1 g0)) and P = p3 p2 p1 p0.
module tb_group_gp;
  import dim1_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] g, p;
  gp_t gg;
  int checks = 0, failures = 0;

  group_gp dut (.g(g), .p(p), .gg(gg));

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic eg, ep;
      {g, p} = 8'(i);
      eg = 1'b0;
      ep = 1'b1;
      for (int j = 0; j < 4; j++) begin
        eg = g[j] | (p[j] & eg);
        ep = p[j] & ep;
      end
      @(posedge clk);
      checks++;
      if (gg.g !== eg || gg.p !== ep) begin
        failures++;
        $display("FAIL g=%b p=%b got G=%b P=%b exp G=%b P=%b", g, p, gg.g, gg.p, eg, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
