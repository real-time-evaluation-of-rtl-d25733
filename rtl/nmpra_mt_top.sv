// nmpra_mt_top: the nMPRA-MT processor, a five-stage pipeline with per-task
// replicated state and a hardware scheduler.
//
// Every task owns a PC (pc_bank), a register bank (regfile_bank) and a copy
// of each of the four pipeline registers IF/ID, ID/EX, EX/MEM and MEM/WB
// (pipe_reg_bank). The nHSE scheduler (nhse) names the active task tid on
// the falling clock edge; at the next rising edge all five stages work on
// that task's copies only. Switching tasks therefore loses no cycle and
// saves no context: a preempted task's in-flight instructions wait in its
// copies. In fine-grained mode two tasks alternate cycle by cycle.
//
// Stages: IF reads the shared instruction memory at the task's PC. ID
// decodes and reads the task's register bank (write-through from WB). EX
// runs the ALU with operands from the forward unit and resolves branches
// and jumps; a taken one turns the task's IF/ID and ID/EX into bubbles
// (no delay slot). MEM accesses the data memory (HT memory and common ST
// memory) through the isolation check, or the nHSE/peripheral window when
// addr[31] = 1, and the multiplexer after the memory (wb_mux) chooses the
// one value kept in MEM/WB. WB writes the task's register bank. A load
// followed by a dependent instruction costs the task one bubble
// (hazard_unit). When no task is ready (run = 0) nothing moves.
//
// Interface: imem_* loads the instruction memory (use while rst_n is low or
// before enabling tasks); ev_in are the external event lines; gpio_in/out
// the peripheral pins; the dbg_* outputs report per-cycle pipeline events.
// The block structure follows the published nMPRA-MT block diagram; the
// instruction set, memory sizes, register map and hazard policy are this
// design's own choices.
module nmpra_mt_top
  import nmpra_pkg::*;
#(
  parameter int NTASKS     = 16,
  parameter int NHT        = 8,
  parameter int NEVT       = 8,
  parameter int IMEM_WORDS = 1024,
  parameter int HT_WORDS   = 1024,
  parameter int ST_WORDS   = 1024,
  localparam int TW  = (NTASKS > 1) ? $clog2(NTASKS) : 1,
  localparam int IAW = $clog2(IMEM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              imem_we,
  input  logic [IAW-1:0]    imem_waddr,
  input  word_t             imem_wdata,
  input  logic [NEVT-1:0]   ev_in,
  input  word_t             gpio_in,
  output word_t             gpio_out,
  output logic [TW-1:0]     cur_tid,
  output logic              run,
  output logic [NTASKS-1:0] task_ready,
  output logic              mt_en,
  output logic              dbg_stall,
  output logic              dbg_flush,
  output logic              dbg_fwd,
  output logic              dbg_retire,
  output logic              dbg_fault
);
  logic [TW-1:0] tid;
  logic          redirect;   // taken branch or jump in EX
  assign cur_tid = tid;

  // ---------------------------------------------------------------- IF ---
  word_t  pc, pc_next, instr;
  logic   pc_we;
  ifid_t  if_d, ifid_q;
  logic   ifid_we;

  pc_bank #(.NTASKS(NTASKS), .STRIDE_BYTES((IMEM_WORDS / NTASKS) * 4)) u_pc (
    .clk, .rst_n, .tid, .we(pc_we), .next_pc(pc_next), .pc);

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .raddr(pc), .rdata(instr),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata));

  assign if_d = '{valid: 1'b1, pc: pc, instr: instr};

  pipe_reg_bank #(.T(ifid_t), .NTASKS(NTASKS)) u_ifid (
    .clk, .rst_n, .tid, .we(ifid_we), .d(redirect ? ifid_t'('0) : if_d), .q(ifid_q));

  // ---------------------------------------------------------------- ID ---
  reg_idx_t    id_rs, id_rt, id_dest;
  word_t       id_imm, id_rs_val, id_rt_val;
  logic [4:0]  id_shamt;
  logic [25:0] id_jindex;
  ctrl_t       id_ctrl;
  idex_t       id_d, idex_q;
  logic        stall;
  memwb_t      memwb_q;

  idecode u_dec (
    .instr(ifid_q.instr), .rs(id_rs), .rt(id_rt), .dest(id_dest), .imm(id_imm),
    .shamt(id_shamt), .jindex(id_jindex), .ctrl(id_ctrl));

  regfile_bank #(.NTASKS(NTASKS)) u_rf (
    .clk, .rst_n, .rtid(tid), .ra1(id_rs), .ra2(id_rt), .rd1(id_rs_val), .rd2(id_rt_val),
    .we(run && memwb_q.valid && memwb_q.reg_write), .wtid(tid),
    .wa(memwb_q.dest), .wd(memwb_q.wdata));

  assign id_d = '{valid: ifid_q.valid, pc: ifid_q.pc, rs: id_rs, rt: id_rt, dest: id_dest,
                  rs_val: id_rs_val, rt_val: id_rt_val, imm: id_imm, shamt: id_shamt,
                  jindex: id_jindex, ctrl: id_ctrl};

  hazard_unit u_hdu (
    .idex_valid(idex_q.valid), .idex_mem_read(idex_q.ctrl.mem_read), .idex_dest(idex_q.dest),
    .ifid_valid(ifid_q.valid), .ifid_rs(id_rs), .ifid_rt(id_rt), .stall);

  pipe_reg_bank #(.T(idex_t), .NTASKS(NTASKS)) u_idex (
    .clk, .rst_n, .tid, .we(run), .d((redirect || stall) ? idex_t'('0) : id_d), .q(idex_q));

  // ---------------------------------------------------------------- EX ---
  exmem_t exmem_q, ex_d;
  fwd_e   fwd_a, fwd_b;
  word_t  op_a, op_b, alu_a, alu_b, alu_y, ex_res, pc4, br_target;
  logic   alu_zero, taken;

  forward_unit u_fwd (
    .ex_rs(idex_q.rs), .ex_rt(idex_q.rt),
    .exmem_reg_write(exmem_q.valid && exmem_q.reg_write), .exmem_dest(exmem_q.dest),
    .memwb_reg_write(memwb_q.valid && memwb_q.reg_write), .memwb_dest(memwb_q.dest),
    .fwd_a, .fwd_b);

  always_comb begin
    unique case (fwd_a)
      FWD_EXMEM: op_a = exmem_q.alu_res;
      FWD_MEMWB: op_a = memwb_q.wdata;
      default:   op_a = idex_q.rs_val;
    endcase
    unique case (fwd_b)
      FWD_EXMEM: op_b = exmem_q.alu_res;
      FWD_MEMWB: op_b = memwb_q.wdata;
      default:   op_b = idex_q.rt_val;
    endcase
  end

  assign alu_a = idex_q.ctrl.shift_imm ? word_t'(idex_q.shamt) : op_a;
  assign alu_b = idex_q.ctrl.alu_imm   ? idex_q.imm            : op_b;

  alu u_alu (.op(idex_q.ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y), .zero(alu_zero));

  assign pc4    = idex_q.pc + 32'd4;
  assign ex_res = idex_q.ctrl.link ? pc4 : alu_y;
  assign taken  = idex_q.valid && (
                    (idex_q.ctrl.branch && (alu_zero != idex_q.ctrl.branch_ne)) ||
                    idex_q.ctrl.jump || idex_q.ctrl.jump_reg);
  assign redirect = taken;

  always_comb begin
    if (idex_q.ctrl.jump_reg)  br_target = op_a;
    else if (idex_q.ctrl.jump) br_target = {pc4[31:28], idex_q.jindex, 2'b00};
    else                       br_target = pc4 + {idex_q.imm[29:0], 2'b00};
  end

  assign ex_d = '{valid: idex_q.valid, alu_res: ex_res, store_data: op_b, dest: idex_q.dest,
                  reg_write: idex_q.valid && idex_q.ctrl.reg_write,
                  mem_read:  idex_q.valid && idex_q.ctrl.mem_read,
                  mem_write: idex_q.valid && idex_q.ctrl.mem_write};

  pipe_reg_bank #(.T(exmem_t), .NTASKS(NTASKS)) u_exmem (
    .clk, .rst_n, .tid, .we(run), .d(ex_d), .q(exmem_q));

  // --------------------------------------------------------------- MEM ---
  word_t   dmem_rdata, periph_rdata, mem_val, win_base, win_limit;
  logic    periph, read_ok, write_ok, prot_fault;
  wb_sel_e wb_sel;
  memwb_t  mem_d;

  mem_protect #(.NTASKS(NTASKS), .NHT(NHT), .HT_WORDS(HT_WORDS)) u_prot (
    .tid, .addr(exmem_q.alu_res), .re(exmem_q.mem_read), .we(exmem_q.mem_write),
    .win_base, .win_limit, .periph, .read_ok, .write_ok, .fault(prot_fault));

  data_memory #(.HT_WORDS(HT_WORDS), .ST_WORDS(ST_WORDS)) u_dmem (
    .clk, .addr(exmem_q.alu_res),
    .we(run && exmem_q.mem_write && write_ok && !periph),
    .wdata(exmem_q.store_data), .rdata(dmem_rdata));

  nhse #(.NTASKS(NTASKS), .NEVT(NEVT)) u_nhse (
    .clk, .rst_n, .ev_in, .gpio_in,
    .bus_we(run && exmem_q.mem_write && periph), .bus_addr(exmem_q.alu_res[7:0]),
    .bus_wdata(exmem_q.store_data), .bus_tid(tid), .bus_fault(run && prot_fault),
    .bus_rdata(periph_rdata), .win_base, .win_limit,
    .tid, .run, .mt_en, .task_ready, .gpio_out);

  always_comb begin
    if (!exmem_q.mem_read) wb_sel = WB_ALU;
    else if (periph)       wb_sel = WB_PERIPH;
    else                   wb_sel = WB_MEM;
  end

  wb_mux u_wbmux (
    .sel(wb_sel), .mem_rdata(read_ok ? dmem_rdata : '0), .periph_rdata,
    .alu_res(exmem_q.alu_res), .y(mem_val));

  assign mem_d = '{valid: exmem_q.valid, wdata: mem_val, dest: exmem_q.dest,
                   reg_write: exmem_q.reg_write};

  pipe_reg_bank #(.T(memwb_t), .NTASKS(NTASKS)) u_memwb (
    .clk, .rst_n, .tid, .we(run), .d(mem_d), .q(memwb_q));

  // ---------------------------------------------------- PC / IF control ---
  assign pc_we   = run && (!stall || redirect);
  assign ifid_we = pc_we;
  assign pc_next = redirect ? br_target : pc + 32'd4;

  // ------------------------------------------------------------ debug -----
  assign dbg_stall  = run && stall && !redirect;
  assign dbg_flush  = run && redirect;
  assign dbg_fwd    = run && idex_q.valid && (fwd_a != FWD_NONE || fwd_b != FWD_NONE);
  assign dbg_retire = run && memwb_q.valid;
  assign dbg_fault  = run && prot_fault;
endmodule
