// tb_alu: checks every ALU operation against a reference model on random
// operands plus corner values.
module tb_alu;
  import nmpra_pkg::*;
  alu_op_e op; word_t a, b, y; logic zero;
  int checks = 0, failures = 0;
  alu dut (.*);

  function automatic word_t ref_y(alu_op_e o, word_t x, word_t z);
    case (o)
      ALU_ADD: return x + z;          ALU_SUB: return x - z;
      ALU_AND: return x & z;          ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;          ALU_NOR: return ~(x | z);
      ALU_SLT: return ($signed(x) < $signed(z)) ? 1 : 0;
      ALU_SLTU: return (x < z) ? 1 : 0;
      ALU_SLL: return z << (x % 32);  ALU_SRL: return z >> (x % 32);
      ALU_SRA: return word_t'($signed(z) >>> (x % 32));
      ALU_LUI: return z * 65536;
      default: return 0;
    endcase
  endfunction

  initial begin
    fork begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int i = 0; i < 2400; i++) begin
      op = alu_op_e'(i % 12);
      a = (i < 24) ? 32'h8000_0000 : $urandom;
      b = (i < 12) ? 32'h7FFF_FFFF : $urandom;
      #1;
      checks++;
      if (y !== ref_y(op, a, b) || zero !== (ref_y(op, a, b) == 0)) begin
        failures++; $display("FAIL op=%0d a=%h b=%h y=%h", op, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
