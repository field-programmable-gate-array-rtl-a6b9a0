// dct_mac_lane: one multiply-accumulate lane of the 8-point DCT engine.
//
// Each cycle with en high, the lane multiplies a sample x by a cosine matrix
// entry c on the enhanced ALU (fast multiplier) and adds the 32-bit product
// to its accumulator on a 32-bit carry look-ahead adder; clear makes the
// product the new accumulator value (first term of a new inner product).
// After 8 enabled cycles acc holds sum_n x[n]*c[n] with c in Q14.
// y is that sum rounded (half up) and saturated to 16 bits after an
// arithmetic right shift: by COEF_FRAC-MID_FRAC in the row pass (2 fraction
// bits kept for the column pass) and by COEF_FRAC+MID_FRAC in the column
// pass (integer result). y is combinational from the acc register, so it is
// valid in the cycle after the last term. Lane structure, rounding and
// intermediate precision are this implementation's choices; the source
// only states that the DCT runs on its enhanced ALU with 16-bit operands.
module dct_mac_lane
  import dct_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    clear,
  input  logic    col_pass,   // selects the output scaling
  input  sample_t x,
  input  sample_t c,
  output logic signed [ACC_W-1:0] acc,
  output sample_t y
);
  logic signed [ACC_W-1:0] prod, acc_next;
  logic alu_ovf, add_cout;

  alu #(.WIDTH(DATA_W)) u_alu (
    .op(ALU_MUL), .a(x), .b(c), .result(prod), .overflow(alu_ovf)
  );

  cla_adder #(.WIDTH(ACC_W)) u_acc_add (
    .a   (clear ? '0 : acc),
    .b   (prod),
    .cin (1'b0),
    .sum (acc_next),
    .cout(add_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_next;
  end

  // rounding shift and saturation to the 16-bit word
  localparam int SH_ROW = COEF_FRAC - MID_FRAC;
  localparam int SH_COL = COEF_FRAC + MID_FRAC;
  localparam logic signed [ACC_W:0] MAXV = (ACC_W+1)'(2**(DATA_W-1) - 1);
  localparam logic signed [ACC_W:0] MINV = -(ACC_W+1)'(2**(DATA_W-1));

  always_comb begin
    logic signed [ACC_W:0] rounded;
    if (col_pass) rounded = ((ACC_W+1)'(acc) + (ACC_W+1)'(1 << (SH_COL - 1))) >>> SH_COL;
    else          rounded = ((ACC_W+1)'(acc) + (ACC_W+1)'(1 << (SH_ROW - 1))) >>> SH_ROW;
    if (rounded > MAXV)      y = sample_t'(MAXV);
    else if (rounded < MINV) y = sample_t'(MINV);
    else                     y = sample_t'(rounded);
  end
endmodule
