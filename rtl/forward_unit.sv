// forward_unit: operand forwarding for the execution stage.
//
// Combinational. For each EX source register (rs, rt) it compares against
// the destination of the instruction in EX/MEM and, failing that, MEM/WB of
// the same task, and selects the youngest match. Register 0 is never
// forwarded. Since all pipeline registers it looks at belong to the active
// task, forwarding never crosses tasks. The nMPRA-MT description names a "Forward Unit";
// the classic two-level scheme here is this design's choice.
module forward_unit
  import nmpra_pkg::*;
(
  input  reg_idx_t ex_rs,
  input  reg_idx_t ex_rt,
  input  logic     exmem_reg_write,
  input  reg_idx_t exmem_dest,
  input  logic     memwb_reg_write,
  input  reg_idx_t memwb_dest,
  output fwd_e     fwd_a,
  output fwd_e     fwd_b
);
  function automatic fwd_e pick(reg_idx_t src);
    if (exmem_reg_write && exmem_dest != '0 && exmem_dest == src) return FWD_EXMEM;
    if (memwb_reg_write && memwb_dest != '0 && memwb_dest == src) return FWD_MEMWB;
    return FWD_NONE;
  endfunction

  assign fwd_a = pick(ex_rs);
  assign fwd_b = pick(ex_rt);
endmodule
