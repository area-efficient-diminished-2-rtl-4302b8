// tb_dim1_mod_adder: end-to-end self-checking test of the diminished-1
// modulo 2^16+1 adder at its default width (no parameter override).
//
// Operands are diminished-1 numbers a = A-1, b = B-1 with A, B in 1..2^16.
// Every result is checked two ways, both without the adder's internals:
//  - bit level: s = (a + b + NOT carry(a + b)) mod 2^16 and cout = carry(a + b);
//  - modular:   (A + B) mod 65537 = R; s must be R-1 when R != 0, and 0 when R = 0.
// The run counts how often each mechanism of the adder occurred and fails if
// one never did: inverted end-around carry of 1 (no overflow) and of 0
// (overflow), the end-around carry changing the carry out of the lowest
// group, the end-around carry rippling through all four groups, and a sum
// congruent to zero.
module tb_dim1_mod_adder;
  localparam int unsigned N = 16;
  localparam longint unsigned M = (64'd1 << N) + 1;   // modulus 2^N + 1

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] a, b, s;
  logic         cout;
  int checks = 0, failures = 0;
  int n_eac1 = 0, n_eac0 = 0, n_grp0 = 0, n_ripple_all = 0, n_zero = 0;

  dim1_mod_adder dut (.a(a), .b(b), .s(s), .cout(cout));

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb);
    longint unsigned sum, co, cin, es, r, la, lb;
    la  = longint'(ta);
    lb  = longint'(tb);
    a   = ta;
    b   = tb;
    @(posedge clk);
    sum = la + lb;
    co  = sum >> N;
    cin = 1 - co;
    es  = (sum + cin) & ((64'd1 << N) - 1);
    r   = ((la + 1) + (lb + 1)) % M;
    checks += 2;
    if (longint'(s) != es || longint'(cout) != co) begin
      failures++;
      $display("FAIL a=%h b=%h s=%h cout=%b exp s=%h cout=%0d", ta, tb, s, cout, es, co);
    end
    if ((r != 0 && longint'(s) != r - 1) || (r == 0 && s != '0)) begin
      failures++;
      $display("FAIL modular a=%h b=%h s=%h R=%0d", ta, tb, s, r);
    end
    // mechanism coverage, from the reference arithmetic
    if (cin == 1) n_eac1++; else n_eac0++;
    if ((((la & 15) + (lb & 15) + cin) >> 4) != (((la & 15) + (lb & 15)) >> 4)) n_grp0++;
    if (cin == 1 && sum == (64'd1 << N) - 1) n_ripple_all++;
    if (r == 0) n_zero++;
  endtask

  initial begin
    apply('0, '0);                 // 1 + 1 = 2
    apply('1, '0);                 // 2^16 + 1 = 0 (mod 65537)
    apply('1, '1);                 // 2^16 + 2^16 = 65535
    apply(16'h8000, 16'h7fff);     // sum congruent to 0
    apply(16'h000f, 16'h0000);     // end-around carry ripples out of group 0
    for (int i = 0; i < 200; i++) begin
      logic [N-1:0] ra;
      ra = N'($urandom);
      apply(ra, ~ra);              // a + b = 2^16 - 1
      apply(ra, ~ra + 16'd1);      // overflow by exactly one
    end
    for (int i = 0; i < 100000; i++) apply(N'($urandom), N'($urandom));
    $display("mechanisms: eac=1 %0d, eac=0 %0d, eac changes group-0 carry %0d, ripple through all groups %0d, zero sum %0d",
             n_eac1, n_eac0, n_grp0, n_ripple_all, n_zero);
    if (n_eac1 == 0) begin failures++; $display("FAIL no addition without overflow"); end
    if (n_eac0 == 0) begin failures++; $display("FAIL no addition with overflow"); end
    if (n_grp0 == 0) begin failures++; $display("FAIL end-around carry never left group 0"); end
    if (n_ripple_all == 0) begin failures++; $display("FAIL end-around carry never rippled through"); end
    if (n_zero == 0) begin failures++; $display("FAIL no zero-congruent sum"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
