// tb_rl_shifter: checks the four shifter operations for every shift amount
// against shifts computed in the testbench.
module tb_rl_shifter;
  import rl_pkg::*;
  int checks = 0, failures = 0;
  sh_op_e op;
  logic [4:0] amt;
  word_t a, y, exp_y;

  rl_shifter dut (.op(op), .amt(amt), .a(a), .y(y));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++)
      for (int s = 0; s < 32; s++)
        for (int i = 0; i < 8; i++) begin
          op = sh_op_e'(k); amt = 5'(s);
          a = (i == 0) ? 32'h8000_0001 : $urandom; #1;
          case (k)
            0: exp_y = a;
            1: exp_y = a << s;
            2: exp_y = a >> s;
            default: begin
              exp_y = a >> s;
              if (a[31]) for (int t = 0; t < s; t++) exp_y[31-t] = 1'b1;
            end
          endcase
          checks++;
          if (y !== exp_y) begin failures++; $display("FAIL op=%0d amt=%0d a=%h y=%h exp=%h", k, s, a, y, exp_y); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
