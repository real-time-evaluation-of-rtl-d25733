// idecode: instruction decoder of the ID stage (control unit).
//
// Combinational. Splits a 32-bit instruction into source registers, the
// destination register, the extended immediate and the control bundle
// nmpra_pkg::ctrl_t. Unknown encodings decode as a NOP. Supported: the
// R-type ALU and shift operations, jr, addi/addiu/slti/sltiu/andi/ori/xori/
// lui, lw, sw, beq, bne, j, jal (no delay slots). This instruction set is
// this design's choice.
module idecode
  import nmpra_pkg::*;
(
  input  word_t       instr,
  output reg_idx_t    rs,
  output reg_idx_t    rt,
  output reg_idx_t    dest,
  output word_t       imm,
  output logic [4:0]  shamt,
  output logic [25:0] jindex,
  output ctrl_t       ctrl
);
  logic [5:0] op, fn;
  reg_idx_t   rd;

  assign op     = instr[31:26];
  assign fn     = instr[5:0];
  assign rs     = instr[25:21];
  assign rt     = instr[20:16];
  assign rd     = instr[15:11];
  assign shamt  = instr[10:6];
  assign jindex = instr[25:0];

  always_comb begin
    ctrl   = '0;
    ctrl.alu_op = ALU_ADD;
    dest   = rt;
    // zero-extended for logical immediates, sign-extended otherwise
    if (op == OP_ANDI || op == OP_ORI || op == OP_XORI)
      imm = {16'd0, instr[15:0]};
    else
      imm = {{16{instr[15]}}, instr[15:0]};

    unique case (op)
      OP_RTYPE: begin
        dest = rd;
        ctrl.reg_write = 1'b1;
        unique case (fn)
          FN_SLL:  begin ctrl.alu_op = ALU_SLL; ctrl.shift_imm = 1'b1; end
          FN_SRL:  begin ctrl.alu_op = ALU_SRL; ctrl.shift_imm = 1'b1; end
          FN_SRA:  begin ctrl.alu_op = ALU_SRA; ctrl.shift_imm = 1'b1; end
          FN_JR:   begin ctrl.reg_write = 1'b0; ctrl.jump_reg = 1'b1; end
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          default: ctrl.reg_write = 1'b0;
        endcase
      end
      OP_ADDI, OP_ADDIU: begin ctrl.reg_write = 1'b1; ctrl.alu_imm = 1'b1; ctrl.alu_op = ALU_ADD;  end
      OP_SLTI:           begin ctrl.reg_write = 1'b1; ctrl.alu_imm = 1'b1; ctrl.alu_op = ALU_SLT;  end
      OP_SLTIU:          begin ctrl.reg_write = 1'b1; ctrl.alu_imm = 1'b1; ctrl.alu_op = ALU_SLTU; end
      OP_ANDI:           begin ctrl.reg_write = 1'b1; ctrl.alu_imm = 1'b1; ctrl.alu_op = ALU_AND;  end
      OP_ORI:            begin ctrl.reg_write = 1'b1; ctrl.alu_imm = 1'b1; ctrl.alu_op = ALU_OR;   end
      OP_XORI:           begin ctrl.reg_write = 1'b1; ctrl.alu_imm = 1'b1; ctrl.alu_op = ALU_XOR;  end
      OP_LUI:            begin ctrl.reg_write = 1'b1; ctrl.alu_imm = 1'b1; ctrl.alu_op = ALU_LUI;  end
      OP_LW:  begin ctrl.reg_write = 1'b1; ctrl.mem_read = 1'b1; ctrl.alu_imm = 1'b1; end
      OP_SW:  begin ctrl.mem_write = 1'b1; ctrl.alu_imm = 1'b1; end
      OP_BEQ: begin ctrl.branch = 1'b1; ctrl.alu_op = ALU_SUB; end
      OP_BNE: begin ctrl.branch = 1'b1; ctrl.branch_ne = 1'b1; ctrl.alu_op = ALU_SUB; end
      OP_J:   ctrl.jump = 1'b1;
      OP_JAL: begin ctrl.jump = 1'b1; ctrl.link = 1'b1; ctrl.reg_write = 1'b1; dest = 5'd31; end
      default: ;
    endcase
  end
endmodule
