// hazard_unit: load-use hazard detection inside one task's pipeline.
//
// Combinational. When the instruction in ID/EX is a load whose destination
// is a source of the instruction in IF/ID, stall is raised for one cycle:
// the task's PC and IF/ID hold and a bubble enters ID/EX. A load result is
// available after the data memory, so one bubble is enough (the forward
// unit then takes it from MEM/WB). The nMPRA-MT description names a "Hazard Detection
// Unit"; the rule is the usual one for this pipeline shape.
module hazard_unit
  import nmpra_pkg::*;
(
  input  logic     idex_valid,
  input  logic     idex_mem_read,
  input  reg_idx_t idex_dest,
  input  logic     ifid_valid,
  input  reg_idx_t ifid_rs,
  input  reg_idx_t ifid_rt,
  output logic     stall
);
  assign stall = idex_valid && idex_mem_read && ifid_valid && idex_dest != '0 &&
                 (idex_dest == ifid_rs || idex_dest == ifid_rt);
endmodule
