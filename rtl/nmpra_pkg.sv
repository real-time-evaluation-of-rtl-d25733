// nmpra_pkg: types and constants shared by the nMPRA-MT processor.
//
// The processor is a five-stage pipeline (IF, ID, EX, MEM, WB) in which the
// program counter, the register file and every pipeline register exist once
// per task. A hardware scheduler (nHSE) names the active task each cycle and
// only that task's copies are read and updated, so a task switch costs no
// cycle and saves no context.
//
// The instruction set is a 32-bit MIPS-I subset without delay slots. The
// architecture mentions "sw instructions" but does not define an instruction set;
// the encoding below is this design's choice.
//
// Address map (byte addresses, word aligned accesses only):
//   addr[31] = 1 : peripheral / nHSE register window (see nhse.sv)
//   [0, HT_WORDS*4)                : memory of the hard threads (HT)
//   [HT_WORDS*4, (HT+ST)_WORDS*4)  : common memory of the soft threads (ST)
package nmpra_pkg;

  localparam int XLEN = 32;
  localparam int NREG = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Major opcodes (instr[31:26])
  localparam logic [5:0] OP_RTYPE = 6'd0;
  localparam logic [5:0] OP_J     = 6'd2;
  localparam logic [5:0] OP_JAL   = 6'd3;
  localparam logic [5:0] OP_BEQ   = 6'd4;
  localparam logic [5:0] OP_BNE   = 6'd5;
  localparam logic [5:0] OP_ADDI  = 6'd8;
  localparam logic [5:0] OP_ADDIU = 6'd9;
  localparam logic [5:0] OP_SLTI  = 6'd10;
  localparam logic [5:0] OP_SLTIU = 6'd11;
  localparam logic [5:0] OP_ANDI  = 6'd12;
  localparam logic [5:0] OP_ORI   = 6'd13;
  localparam logic [5:0] OP_XORI  = 6'd14;
  localparam logic [5:0] OP_LUI   = 6'd15;
  localparam logic [5:0] OP_LW    = 6'd35;
  localparam logic [5:0] OP_SW    = 6'd43;

  // R-type function codes (instr[5:0])
  localparam logic [5:0] FN_SLL  = 6'd0;
  localparam logic [5:0] FN_SRL  = 6'd2;
  localparam logic [5:0] FN_SRA  = 6'd3;
  localparam logic [5:0] FN_JR   = 6'd8;
  localparam logic [5:0] FN_ADD  = 6'd32;
  localparam logic [5:0] FN_ADDU = 6'd33;
  localparam logic [5:0] FN_SUB  = 6'd34;
  localparam logic [5:0] FN_SUBU = 6'd35;
  localparam logic [5:0] FN_AND  = 6'd36;
  localparam logic [5:0] FN_OR   = 6'd37;
  localparam logic [5:0] FN_XOR  = 6'd38;
  localparam logic [5:0] FN_NOR  = 6'd39;
  localparam logic [5:0] FN_SLT  = 6'd42;
  localparam logic [5:0] FN_SLTU = 6'd43;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  // Source of the value written back, chosen after the data memory
  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_PERIPH} wb_sel_e;

  // Forwarding choice for one EX operand
  typedef enum logic [1:0] {FWD_NONE, FWD_EXMEM, FWD_MEMWB} fwd_e;

  typedef struct packed {
    logic    reg_write;
    logic    mem_read;
    logic    mem_write;
    logic    branch;      // beq / bne
    logic    branch_ne;   // 1: bne
    logic    jump;        // j / jal (target from instr_index)
    logic    jump_reg;    // jr
    logic    link;        // jal: write PC+4
    logic    alu_imm;     // operand B is the immediate
    logic    shift_imm;   // operand A is shamt (sll/srl/sra)
    alu_op_e alu_op;
  } ctrl_t;

  // IF/ID pipeline register
  typedef struct packed {
    logic  valid;
    word_t pc;
    word_t instr;
  } ifid_t;

  // ID/EX pipeline register
  typedef struct packed {
    logic     valid;
    word_t    pc;
    reg_idx_t rs;
    reg_idx_t rt;
    reg_idx_t dest;
    word_t    rs_val;
    word_t    rt_val;
    word_t    imm;
    logic [4:0]  shamt;
    logic [25:0] jindex;
    ctrl_t    ctrl;
  } idex_t;

  // EX/MEM pipeline register
  typedef struct packed {
    logic     valid;
    word_t    alu_res;
    word_t    store_data;
    reg_idx_t dest;
    logic     reg_write;
    logic     mem_read;
    logic     mem_write;
  } exmem_t;

  // MEM/WB pipeline register: one value only, the mux sits before it
  typedef struct packed {
    logic     valid;
    word_t    wdata;
    reg_idx_t dest;
    logic     reg_write;
  } memwb_t;

  // nHSE register offsets inside the peripheral window (addr[7:0])
  localparam logic [7:0] REG_GPIO_OUT = 8'h00;
  localparam logic [7:0] REG_GPIO_IN  = 8'h04;
  localparam logic [7:0] REG_TASK_EN  = 8'h08;
  localparam logic [7:0] REG_WAIT     = 8'h0C;
  localparam logic [7:0] REG_MT_EN    = 8'h10;
  localparam logic [7:0] REG_TID      = 8'h14;
  localparam logic [7:0] REG_FAULT    = 8'h18;
  localparam logic [7:0] REG_EVT_PEND = 8'h1C;
  localparam logic [7:0] REG_WIN_BASE = 8'h80;  // + 8*task; limit at +4

endpackage
