// tb_alu: random test of the integer execution unit against a reference
// model written here, for every operation.
`timescale 1ns/1ps
module tb_alu;
  import ror_pkg::*;
  alu_op_e op; logic [31:0] a, b, y; logic zero;
  int checks = 0, failures = 0;
  alu dut (.op, .a, .b, .y, .zero);

  function automatic logic [31:0] ref_y(alu_op_e o, logic [31:0] x, logic [31:0] z);
    longint sx, sz;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    case (o)
      ALU_ADD: return x + z;                 ALU_SUB: return x - z;
      ALU_AND: return x & z;                 ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_SLL: return x << (z % 32);         ALU_SRL: return x >> (z % 32);
      ALU_SRA: return 32'((sx >> (z % 32)));
      ALU_MUL: return 32'(sx * sz);
      ALU_ABS: return 32'(sx < 0 ? -sx : sx);
      ALU_SLT: return sx < sz;               ALU_SLTU: return x < z;
      ALU_MIN: return sx < sz ? x : z;       ALU_MAX: return sx < sz ? z : x;
      ALU_MOVB: return z;                    ALU_MOVHI: return {z[15:0], 16'h0};
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_e'(i % 16);
      a = $urandom(); b = $urandom();
      if (i % 7 == 0) b = b % 32;
      if (i % 11 == 0) a = 32'h8000_0000;
      #1;
      checks++;
      if (y !== ref_y(op, a, b) || zero !== (ref_y(op, a, b) == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, ref_y(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
