// alu: the arithmetic logic unit of the execution stage.
//
// Purely combinational. Computes y = a OP b for the MIPS-style operations of
// nmpra_pkg::alu_op_e. Shifts take the amount from a[4:0] and shift b; LUI
// places b[15:0] in the upper half. zero is set when the result is 0. The
// architecture only names the ALU; the operation set is this design's.
module alu
  import nmpra_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output logic    zero
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << a[4:0];
      ALU_SRL:  y = b >> a[4:0];
      ALU_SRA:  y = word_t'($signed(b) >>> a[4:0]);
      ALU_LUI:  y = {b[15:0], 16'd0};
      default:  y = '0;
    endcase
  end
  assign zero = (y == '0);
endmodule
