// tb_carry_computation: self-checking test of the cyclic group carry network.
// Two instances, the default N = 16 (four groups, two wrapping levels) and
// N = 32 (eight groups, three levels), are driven with g = a AND b and
// p = a OR b from random and corner operands. The expected group carry k is
// the carry out of bit 4k+3 of a + b + cin, where cin = NOT carry-out(a + b)
// is the inverted end-around carry, worked out with plain integer additions;
// the top group's carry is the carry-out of a + b alone.
module tb_carry_computation;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a16, b16;
  logic [3:0]  cg16;
  logic [31:0] a32, b32;
  logic [7:0]  cg32;
  int checks = 0, failures = 0;

  carry_computation dut16 (.g(a16 & b16), .p(a16 | b16), .cg(cg16));
  carry_computation #(.N(32)) dut32 (.g(a32 & b32), .p(a32 | b32), .cg(cg32));

  // Group carries of a diminished-1 addition, from integer arithmetic.
  function automatic logic [7:0] ref_cg(input longint unsigned a, input longint unsigned b,
                                        input int n);
    longint unsigned cin, mask;
    logic [7:0] r;
    cin = (((a + b) >> n) != 0) ? 0 : 1;
    r = '0;
    for (int k = 0; k < n / 4; k++) begin
      mask = (64'd1 << (4 * k + 4)) - 1;
      r[k] = 1'(((a & mask) + (b & mask) + cin) >> (4 * k + 4));
    end
    // the top group reports the carry-out of a + b itself, whose complement is cin
    r[n/4-1] = 1'(1 - cin);
    return r;
  endfunction

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb);
    logic [7:0] e16, e32;
    a16 = ta[15:0]; b16 = tb[15:0];
    a32 = ta;       b32 = tb;
    @(posedge clk);
    e16 = ref_cg(longint'(ta[15:0]), longint'(tb[15:0]), 16);
    e32 = ref_cg(longint'(ta), longint'(tb), 32);
    checks += 2;
    if (cg16 !== e16[3:0]) begin
      failures++;
      $display("FAIL N=16 a=%h b=%h cg=%b exp %b", a16, b16, cg16, e16[3:0]);
    end
    if (cg32 !== e32) begin
      failures++;
      $display("FAIL N=32 a=%h b=%h cg=%b exp %b", a32, b32, cg32, e32);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('1, '1);
    apply(32'hffff_fffe, 32'h0000_0001);
    apply(32'h8000_0000, 32'h8000_0000);
    apply(32'h0000_8000, 32'h0000_8000);
    // one generating bit with everything above and below propagating
    for (int i = 0; i < 32; i++) apply(32'hffff_ffff, 32'd1 << i);
    for (int i = 0; i < 32; i++) apply(32'hffff_ffff ^ (32'd1 << i), 32'd0);
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] ra, rb;
      ra = $urandom;
      rb = $urandom;
      // make long propagate runs common
      if (i % 3 == 0) rb = ~ra ^ (32'd1 << ($urandom % 32));
      apply(ra, rb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
