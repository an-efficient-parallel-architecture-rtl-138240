// tb_rl_main_controller: runs small programs held in a testbench array (the
// controller's program buffer side) and checks the issued sequence cycle by
// cycle: which step, which iteration, no bubble between steps, one drain
// cycle after the halting step, then done and the cycle count.
module tb_rl_main_controller;
  import rl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start, issue, busy, done;
  logic [PADDR_W-1:0] pc;
  logic [ITER_W-1:0] iter;
  logic [31:0] cycles;
  instr_t prog [1 << PADDR_W];
  instr_t instr;

  rl_main_controller dut (.clk, .rst_n, .start, .pc, .instr, .issue, .iter, .busy, .done, .cycles);
  assign instr = prog[pc];

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  task automatic run(int nsteps, int reps[]);
    int total;
    total = 0;
    for (int s = 0; s < nsteps; s++) begin
      prog[s] = '0;
      prog[s].ctrl.rep  = ITER_W'(reps[s]);
      prog[s].ctrl.halt = (s == nsteps - 1);
      prog[s].arr.le[0].sh0_amt = 5'(s);   // tag
    end
    start = 1; @(negedge clk); start = 0;
    for (int s = 0; s < nsteps; s++)
      for (int n = 0; n <= reps[s]; n++) begin
        chk("issue", 32'(issue), 1); chk("step", 32'(pc), s); chk("iter", 32'(iter), n);
        chk("busy", 32'(busy), 1);
        total++;
        @(negedge clk);
      end
    chk("drain cycle: no issue", 32'(issue), 0); chk("drain busy", 32'(busy), 1);
    chk("not done yet", 32'(done), 0);
    @(negedge clk);
    chk("done", 32'(done), 1); chk("idle", 32'(busy), 0);
    chk("cycle count", 32'(cycles), total + 1);
    repeat (3) @(negedge clk);
    chk("stays idle", 32'(issue), 0); chk("done sticky", 32'(done), 1);
  endtask

  initial begin
    start = 0;
    for (int i = 0; i < (1 << PADDR_W); i++) prog[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("idle after reset", 32'(busy), 0);
    run(1, '{0});
    run(3, '{2, 0, 5});
    run(5, '{1, 1, 0, 7, 3});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
