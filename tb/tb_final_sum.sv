// tb_final_sum: self-checking test of the final sum generation unit at N = 16.
// h, g and p come from random operands a and b; the group carries cg are drawn
// independently at random. The expected sum of group k is the low four bits of
// a[4k+3:4k] + b[4k+3:4k] + C, where C is cg[k-1] for k > 0 and NOT cg[3] for
// group 0 (the inverted end-around carry).
module tb_final_sum;
  localparam int unsigned N = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] a, b, s;
  logic [3:0]   cg;
  int checks = 0, failures = 0;

  final_sum #(.N(N)) dut (.h(a ^ b), .g(a & b), .p(a | b), .cg(cg), .s(s));

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb, input logic [3:0] tc);
    logic [N-1:0] e;
    logic         c;
    a = ta; b = tb; cg = tc;
    @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      c = (k == 0) ? ~tc[3] : tc[k-1];
      e[4*k +: 4] = 4'(ta[4*k +: 4] + tb[4*k +: 4] + 4'(c));
    end
    checks++;
    if (s !== e) begin
      failures++;
      $display("FAIL a=%h b=%h cg=%b s=%h exp %h", ta, tb, tc, s, e);
    end
  endtask

  initial begin
    for (int c = 0; c < 16; c++) begin
      apply('0, '0, 4'(c));
      apply('1, '0, 4'(c));
      apply('1, '1, 4'(c));
      apply(16'h7777, 16'h8888, 4'(c));
    end
    for (int i = 0; i < 5000; i++) apply(N'($urandom), N'($urandom), 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
