// tb_table_sizes: the diminished-1 adder at the other operand widths the
// design is evaluated at, n = 8 and n = 32 (n = 16 is the default, covered by
// tb_dim1_mod_adder). n = 8 is checked exhaustively over all 65536 operand
// pairs, n = 32 with random and corner operands. Reference:
// s = (a + b + NOT carry(a + b)) mod 2^n, cout = carry(a + b), and the modular
// check (A + B) mod (2^n + 1) with A = a + 1, B = b + 1.
module tb_table_sizes;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8, s8;
  logic [31:0] a32, b32, s32;
  logic        c8, c32;
  int checks = 0, failures = 0;
  int n_zero8 = 0, n_ovf8 = 0, n_zero32 = 0, n_ovf32 = 0;

  dim1_mod_adder #(.N(8))  dut8  (.a(a8),  .b(b8),  .s(s8),  .cout(c8));
  dim1_mod_adder #(.N(32)) dut32 (.a(a32), .b(b32), .s(s32), .cout(c32));

  // Checks one result of an n-bit adder; returns 1 on a mismatch.
  function automatic bit check(input longint unsigned a, input longint unsigned b,
                               input longint unsigned s, input longint unsigned co,
                               input int n);
    longint unsigned sum, eco, es, r, m;
    m   = (64'd1 << n) + 1;
    sum = a + b;
    eco = sum >> n;
    es  = (sum + (1 - eco)) & ((64'd1 << n) - 1);
    r   = ((a + 1) + (b + 1)) % m;
    if (s != es || co != eco) return 1'b1;
    if (r != 0 && s != r - 1) return 1'b1;
    if (r == 0 && s != 0) return 1'b1;
    return 1'b0;
  endfunction

  task automatic apply(input logic [7:0] ta8, input logic [7:0] tb8,
                       input logic [31:0] ta32, input logic [31:0] tb32);
    a8 = ta8;   b8 = tb8;
    a32 = ta32; b32 = tb32;
    @(posedge clk);
    checks += 2;
    if (check(longint'(ta8), longint'(tb8), longint'(s8), longint'(c8), 8)) begin
      failures++;
      $display("FAIL n=8 a=%h b=%h s=%h cout=%b", ta8, tb8, s8, c8);
    end
    if (check(longint'(ta32), longint'(tb32), longint'(s32), longint'(c32), 32)) begin
      failures++;
      $display("FAIL n=32 a=%h b=%h s=%h cout=%b", ta32, tb32, s32, c32);
    end
    if (9'(ta8) + 9'(tb8) == 9'h0ff) n_zero8++;
    if (c8) n_ovf8++;
    if (33'(ta32) + 33'(tb32) == 33'h0_ffff_ffff) n_zero32++;
    if (c32) n_ovf32++;
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) begin
      logic [31:0] ra;
      ra = $urandom;
      if (i % 8 == 0)
        apply(8'(i >> 8), 8'(i), ra, ~ra);                       // sum congruent to 0
      else if (i % 8 == 1)
        apply(8'(i >> 8), 8'(i), ra, ~ra ^ (32'd1 << (i % 32))); // one bit off a full propagate run
      else
        apply(8'(i >> 8), 8'(i), ra, $urandom);
    end
    $display("n=8: zero sums %0d, overflows %0d; n=32: zero sums %0d, overflows %0d",
             n_zero8, n_ovf8, n_zero32, n_ovf32);
    if (n_zero8 == 0 || n_ovf8 == 0 || n_zero32 == 0 || n_ovf32 == 0) begin
      failures++;
      $display("FAIL a case class was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
