// tb_alu: the enhanced ALU's three operations against integer arithmetic:
// exact sign-extended sum and difference with the 16-bit overflow flag, and
// the full 32-bit signed product.
module tb_alu;
  import dct_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  alu_op_e            op;
  logic signed [15:0] a, b;
  logic signed [31:0] result;
  logic               overflow;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_mul = 0;

  alu dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(alu_op_e o, int x, int y);
    longint e;
    logic   eo;
    op = o; a = 16'(x); b = 16'(y);
    @(posedge clk);
    case (o)
      ALU_ADD: begin e = longint'(a) + longint'(b); n_add++; end
      ALU_SUB: begin e = longint'(a) - longint'(b); n_sub++; end
      default: begin e = longint'(a) * longint'(b); n_mul++; end
    endcase
    eo = (o != ALU_MUL) && (e > 32767 || e < -32768);
    checks++;
    if (longint'(result) != e || overflow != eo) begin
      failures++;
      $display("FAIL op %0d %0d %0d -> %0d ovf %0d", o, a, b, result, overflow);
    end
  endtask

  initial begin
    apply(ALU_ADD, 32767, 1);
    apply(ALU_ADD, -32768, -32768);
    apply(ALU_SUB, -32768, 1);
    apply(ALU_SUB, 100, 100);
    apply(ALU_MUL, -32768, -32768);
    for (int i = 0; i < 3000; i++) begin
      alu_op_e o;
      o = alu_op_e'(2'($urandom_range(2, 0)));
      apply(o, int'($urandom), int'($urandom));
    end
    $display("ops: add %0d sub %0d mul %0d", n_add, n_sub, n_mul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
