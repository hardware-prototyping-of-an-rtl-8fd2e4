// rsa_alu: the arithmetic unit of the RSA core, y = a + b or y = a - b.
//
// One W-bit adder; subtraction adds the one's complement of b with a carry in
// of one. The core uses it for doubling (a = b = P), for adding the
// multiplicand (b = A) and for the trial subtraction of the modulus (b = N),
// and reads the sign from the top bit of y. Purely combinational.
//
// The published design names an ALU doing the additions and subtractions of
// the core; its insides are this design's own.
module rsa_alu #(
  parameter int unsigned W = 1026
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y
);

  assign y = a + (sub ? ~b : b) + W'(sub);

endmodule
