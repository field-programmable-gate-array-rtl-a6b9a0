// alu: the enhanced arithmetic unit of the DCT processor.
//
// Offers the three operations the source design speeds up: addition on the
// cascaded carry look-ahead adder, subtraction by two's complement on the
// same adder, and multiplication on the carry-save fast multiplier. All three
// units work in parallel; op selects which result is driven.
//   ALU_ADD: result = a + b, sign-extended to 2*WIDTH bits (exact, no wrap)
//   ALU_SUB: result = a - b, sign-extended likewise
//   ALU_MUL: result = a * b, full 2*WIDTH-bit signed product
// overflow reports that the add/sub result does not fit WIDTH bits (always 0
// for multiplication). Purely combinational. The operation encoding and the
// result format are this implementation's choices.
module alu
  import dct_pkg::*;
#(
  parameter int WIDTH = 16
) (
  input  alu_op_e                   op,
  input  logic signed [WIDTH-1:0]   a,
  input  logic signed [WIDTH-1:0]   b,
  output logic signed [2*WIDTH-1:0] result,
  output logic                      overflow
);
  logic [WIDTH-1:0] sum, diff;
  logic             add_cout, sub_nb, sub_ovf;
  logic signed [2*WIDTH-1:0] prod;

  cla_adder #(.WIDTH(WIDTH)) u_add (
    .a(a), .b(b), .cin(1'b0), .sum(sum), .cout(add_cout)
  );

  cla_subtractor #(.WIDTH(WIDTH)) u_sub (
    .a(a), .b(b), .diff(diff), .no_borrow(sub_nb), .overflow(sub_ovf)
  );

  fast_multiplier #(.WIDTH(WIDTH)) u_mul (
    .a(a), .b(b), .p(prod)
  );

  // the exact (WIDTH+1)-bit signed result rebuilt from the carry flags:
  // the extra top bit is a_msb ^ b_msb ^ carry (add) or a_msb ^ ~b_msb ^ carry (sub)
  logic add_top, sub_top;
  assign add_top = a[WIDTH-1] ^ b[WIDTH-1] ^ add_cout;
  assign sub_top = a[WIDTH-1] ^ ~b[WIDTH-1] ^ sub_nb;

  always_comb begin
    unique case (op)
      ALU_ADD: begin
        result   = (2*WIDTH)'(signed'({add_top, sum}));
        overflow = add_top != sum[WIDTH-1];
      end
      ALU_SUB: begin
        result   = (2*WIDTH)'(signed'({sub_top, diff}));
        overflow = sub_ovf;
      end
      ALU_MUL: begin
        result   = prod;
        overflow = 1'b0;
      end
      default: begin
        result   = '0;
        overflow = 1'b0;
      end
    endcase
  end
endmodule
