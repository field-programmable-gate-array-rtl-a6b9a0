// cla_subtractor: WIDTH-bit subtractor computing a - b on the CLA adder.
//
// As in the source design, the two's complement of b (invert, add one) is
// added to a: the inversion feeds the adder's b input and the "+1" enters as
// the adder's carry-in. no_borrow is the adder's carry-out (1 when a >= b
// unsigned); overflow flags a signed result that does not fit WIDTH bits.
// Purely combinational.
module cla_subtractor #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] diff,
  output logic             no_borrow,
  output logic             overflow
);
  cla_adder #(.WIDTH(WIDTH)) u_add (
    .a   (a),
    .b   (~b),
    .cin (1'b1),
    .sum (diff),
    .cout(no_borrow)
  );

  assign overflow = (a[WIDTH-1] != b[WIDTH-1]) && (diff[WIDTH-1] != a[WIDTH-1]);
endmodule
