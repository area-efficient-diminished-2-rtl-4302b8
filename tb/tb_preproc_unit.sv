// tb_preproc_unit: self-checking test of the pre-processing unit at N = 16.
// Random and corner operands; g, p and h are compared with a AND b, a OR b and
// a XOR b. A watchdog bounds the run.
module tb_preproc_unit;
  localparam int unsigned N = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] a, b, g, p, h;
  int checks = 0, failures = 0;

  preproc_unit #(.N(N)) dut (.a(a), .b(b), .g(g), .p(p), .h(h));

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb);
    a = ta; b = tb;
    @(posedge clk);
    checks++;
    if (g !== (ta & tb) || p !== (ta | tb) || h !== (ta ^ tb)) begin
      failures++;
      $display("FAIL a=%h b=%h g=%h p=%h h=%h", ta, tb, g, p, h);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('0, '1);
    apply('1, '1);
    apply(16'haaaa, 16'h5555);
    for (int i = 0; i < 2000; i++) apply(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
