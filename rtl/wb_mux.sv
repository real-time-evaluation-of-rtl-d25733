// wb_mux: the memory-stage multiplexer placed after the data memory.
//
// Combinational. Chooses the single value that is stored in MEM/WB: the data
// memory read data, the peripheral read data or the ALU result passed along
// from EX/MEM. Because the choice is made here rather than in the write-back
// stage, MEM/WB holds one word instead of two.
module wb_mux
  import nmpra_pkg::*;
(
  input  wb_sel_e sel,
  input  word_t   mem_rdata,
  input  word_t   periph_rdata,
  input  word_t   alu_res,
  output word_t   y
);
  always_comb begin
    unique case (sel)
      WB_MEM:    y = mem_rdata;
      WB_PERIPH: y = periph_rdata;
      default:   y = alu_res;
    endcase
  end
endmodule
