// cla_adder: WIDTH-bit adder made of cascaded 4-bit carry look-ahead blocks.
//
// The operands are cut into 4-bit slices; each slice is a cla4 block and the
// carry-out of one slice is the carry-in of the next, as in the source's
// cascade of look-ahead full-adder blocks. The default width of 16 bits is
// the word length of the source design. WIDTH must be a multiple of 4.
// Purely combinational: sum = a + b + cin, cout is the carry out of the MSB.
module cla_adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int SLICES = WIDTH / 4;

  logic [SLICES:0] carry;
  assign carry[0] = cin;

  for (genvar s = 0; s < SLICES; s++) begin : g_slice
    logic unused_g, unused_p;
    cla4 u_cla4 (
      .a    (a[4*s +: 4]),
      .b    (b[4*s +: 4]),
      .cin  (carry[s]),
      .sum  (sum[4*s +: 4]),
      .cout (carry[s+1]),
      .grp_g(unused_g),
      .grp_p(unused_p)
    );
  end

  assign cout = carry[SLICES];

  initial begin
    assert (WIDTH % 4 == 0 && WIDTH >= 4)
      else $fatal(1, "cla_adder: WIDTH must be a positive multiple of 4");
  end
endmodule
