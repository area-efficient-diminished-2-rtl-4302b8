// preproc_unit: pre-processing stage of the parallel-prefix adder.
//
// For each of the N bit positions it forms, from operand bits a and b,
//     g = a AND b       (carry generate)
//     p = a OR b        (carry propagate, the inclusive-OR form)
//     h = p AND NOT g   (half sum)
// The half sum is the XOR of a and b, but it is built from p and g that the
// cell forms anyway rather than by a separate XOR gate; this is the reduced
// pre-processing cell of the design, which saves one gate per bit.
// Purely combinational.
module preproc_unit #(
  parameter int unsigned N = 16   // operand width
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g,
  output logic [N-1:0] p,
  output logic [N-1:0] h
);

  always_comb begin
    g = a & b;
    p = a | b;
    h = p & ~g;
  end

endmodule
