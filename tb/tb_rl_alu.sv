// tb_rl_alu: checks every ALU operation against a reference computed in the
// testbench, on random operands and on corner values (zero, sign limits).
module tb_rl_alu;
  import rl_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  word_t a, b, y, exp_y;

  rl_alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic word_t ref_alu(alu_op_e o, word_t x, word_t z);
    int signed sx, sz;
    sx = x; sz = z;
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_MIN:  return (sx < sz) ? x : z;
      ALU_MAX:  return (sx > sz) ? x : z;
      ALU_RSUB: return z - x;
      default:  return '0;
    endcase
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t corner [5] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff};
    for (int k = 0; k < 8; k++) begin
      op = alu_op_e'(k);
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) begin
          a = corner[i]; b = corner[j]; #1;
          exp_y = ref_alu(op, a, b); checks++;
          if (y !== exp_y) begin failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", k, a, b, y, exp_y); end
        end
      for (int i = 0; i < 200; i++) begin
        a = $urandom; b = $urandom; #1;
        exp_y = ref_alu(op, a, b); checks++;
        if (y !== exp_y) begin failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", k, a, b, y, exp_y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
