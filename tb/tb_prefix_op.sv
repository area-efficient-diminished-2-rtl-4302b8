// tb_prefix_op: exhaustive self-checking test of the prefix operator.
// All 16 combinations of the two (g, p) pairs are applied, each is checked
// against G = g_hi | p_hi & g_lo and P = p_hi & p_lo written out as a truth
// table, and the run ends with a TB_RESULT line. A watchdog bounds the run.
module tb_prefix_op;
  import dim1_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  gp_t hi, lo, y;
  int checks = 0, failures = 0;

  prefix_op dut (.hi(hi), .lo(lo), .y(y));

  // Truth table indexed by {g_hi, p_hi, g_lo, p_lo}; entries are {G, P}.
  localparam logic [1:0] EXP [16] = '{
    2'b00, 2'b00, 2'b00, 2'b00,   // g_hi=0 p_hi=0: nothing generated, P=0
    2'b00, 2'b01, 2'b10, 2'b11,   // g_hi=0 p_hi=1: pass the low pair
    2'b10, 2'b10, 2'b10, 2'b10,   // g_hi=1 p_hi=0: G=1, P=0
    2'b10, 2'b11, 2'b10, 2'b11    // g_hi=1 p_hi=1: G=1, P=p_lo
  };

  initial begin
    for (int rep = 0; rep < 2; rep++)
      for (int i = 0; i < 16; i++) begin
        {hi.g, hi.p, lo.g, lo.p} = 4'(i);
        @(posedge clk);
        checks++;
        if ({y.g, y.p} !== EXP[i]) begin
          failures++;
          $display("FAIL hi=%b%b lo=%b%b got %b%b exp %b", hi.g, hi.p, lo.g, lo.p, y.g, y.p, EXP[i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
