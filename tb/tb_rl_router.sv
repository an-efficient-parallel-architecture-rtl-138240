// tb_rl_router: sets every router input to random sources and compares each
// output with the source word chosen in the testbench: previous column, own
// column, scheduler port or zero.
module tb_rl_router;
  import rl_pkg::*;
  int checks = 0, failures = 0;
  rt_cfg_t sel;
  word_t [2*ROWS-1:0] prev_out, same_out, xin;
  word_t [NRD-1:0] sched;

  rl_router dut (.sel, .prev_out, .same_out, .sched, .xin);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t e;
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 2*ROWS; i++) begin
        prev_out[i] = $urandom; same_out[i] = $urandom;
        sel[i] = (t < 32) ? 5'((t + i) % 32) : 5'($urandom_range(0, 31));
      end
      for (int i = 0; i < NRD; i++) sched[i] = $urandom;
      #1;
      for (int i = 0; i < 2*ROWS; i++) begin
        int s;
        s = int'(sel[i]);
        if (s < 8) e = prev_out[s];
        else if (s < 16) e = same_out[s-8];
        else if (s < 24) e = sched[s-16];
        else e = '0;
        checks++;
        if (xin[i] !== e) begin failures++; $display("FAIL in %0d sel %0d got %h exp %h", i, s, xin[i], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
