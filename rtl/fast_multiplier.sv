// fast_multiplier: signed WIDTH x WIDTH multiplier with carry-save reduction.
//
// Structure (after the source's "fast multiplier"): a matrix of summands is
// formed first, then a chain of 3-2 adder (carry-save) stages reduces it to
// two rows, and a fast carry look-ahead adder adds those two rows.
//   * Summand i (i < WIDTH-1) is the sign-extended multiplicand shifted left
//     by i when multiplier bit i is set, else zero.
//   * The multiplier's sign bit weighs -2^(WIDTH-1); its summand is the
//     inverted shifted multiplicand plus a separate "+1" summand, so that
//     signed operands need no extra correction.
//   * Each 3-2 stage takes the running sum and carry rows of the previous
//     stage and one new summand, as in an array multiplier's chain of adders;
//     there are WIDTH-1 stages (the source's m).
//   * The final sum/carry pair goes through a 2*WIDTH-bit cla_adder.
// Purely combinational. WIDTH must be even so that 2*WIDTH is a multiple of 4.
// The default width of 16 is the word length of the source design.
module fast_multiplier #(
  parameter int WIDTH = 16
) (
  input  logic signed [WIDTH-1:0]   a,   // multiplicand
  input  logic signed [WIDTH-1:0]   b,   // multiplier
  output logic signed [2*WIDTH-1:0] p
);
  localparam int PW   = 2 * WIDTH;
  localparam int ROWS = WIDTH + 1;  // WIDTH shifted summands + the "+1" row

  logic [PW-1:0] summand [ROWS];
  logic [PW-1:0] s_row   [ROWS-1];  // running sum after each stage
  logic [PW-1:0] c_row   [ROWS-1];  // running carry after each stage

  always_comb begin
    logic [PW-1:0] a_ext;
    a_ext = PW'(a);  // sign-extended because a is signed
    for (int i = 0; i < WIDTH - 1; i++)
      summand[i] = b[i] ? (a_ext << i) : '0;
    summand[WIDTH-1] = b[WIDTH-1] ? ~(a_ext << (WIDTH - 1)) : '0;
    summand[WIDTH]   = PW'(b[WIDTH-1]);

    // stage 0 just places the first two summands
    s_row[0] = summand[0];
    c_row[0] = summand[1];
    // stages 1 .. ROWS-2: 3-2 reduction (full adder per bit, carry shifted up)
    for (int st = 1; st < ROWS - 1; st++) begin
      s_row[st] = s_row[st-1] ^ c_row[st-1] ^ summand[st+1];
      c_row[st] = ((s_row[st-1] & c_row[st-1]) |
                   (s_row[st-1] & summand[st+1]) |
                   (c_row[st-1] & summand[st+1])) << 1;
    end
  end

  logic unused_cout;
  cla_adder #(.WIDTH(PW)) u_final (
    .a   (s_row[ROWS-2]),
    .b   (c_row[ROWS-2]),
    .cin (1'b0),
    .sum (p),
    .cout(unused_cout)
  );

  initial begin
    assert (WIDTH % 2 == 0 && WIDTH >= 2)
      else $fatal(1, "fast_multiplier: WIDTH must be even");
  end
endmodule
