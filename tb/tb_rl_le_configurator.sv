// tb_rl_le_configurator: checks that an issued configuration reaches the LEs
// and routers one cycle later, that the all-zero (hold) configuration is
// driven when nothing is issued, and that a product request on a RegALU
// position is replaced and raises the sticky error flag until cleared.
module tb_rl_le_configurator;
  import rl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, issue, clr_err, cfg_err;
  array_cfg_t cfg_in, got;
  le_cfg_t [NLE-1:0]  le_cfg;
  rt_cfg_t [COLS-1:0] rt_cfg;

  localparam logic [NLE-1:0] MASK = 16'h00ff;   // columns 0,1 RegMUL, 2,3 RegALU

  rl_le_configurator #(.MUL_MASK(MASK)) dut (.clk, .rst_n, .issue, .cfg_in, .clr_err, .le_cfg, .rt_cfg, .cfg_err);

  assign got.le = le_cfg;
  assign got.rt = rt_cfg;
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, logic [$bits(array_cfg_t)-1:0] g, logic [$bits(array_cfg_t)-1:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic array_cfg_t clean(array_cfg_t c);
    for (int i = 0; i < NLE; i++) begin
      if (c.le[i].r0_sel == RS_MUL || int'(c.le[i].r0_sel) > 5) c.le[i].r0_sel = RS_HOLD;
      if (c.le[i].r1_sel == RS_MUL || int'(c.le[i].r1_sel) > 5) c.le[i].r1_sel = RS_HOLD;
      if (c.le[i].o0_sel == OS_MUL || int'(c.le[i].o0_sel) > 5) c.le[i].o0_sel = OS_R0;
      if (c.le[i].o1_sel == OS_MUL || int'(c.le[i].o1_sel) > 5) c.le[i].o1_sel = OS_R0;
    end
    return c;
  endfunction

  initial begin
    array_cfg_t c, e;
    issue = 0; clr_err = 0; cfg_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      c = '0;
      for (int w = 0; w < $bits(array_cfg_t); w += 32) c[w +: 32] = $urandom;
      c = clean(c);
      if (t % 3 == 0) begin
        c.le[3].r0_sel = RS_MUL;   // legal: RegMUL position
        c.le[5].o1_sel = OS_MUL;
      end
      cfg_in = c; issue = (t % 5 != 4);
      @(negedge clk);
      if (t % 5 != 4) chk("applied next cycle", got, c);
      else            chk("hold config when idle", got, '0);
      chk("no error for legal config", 32'(cfg_err), 0);
    end
    // illegal: product on RegALU LE 9 and LE 14
    c = '0;
    c.le[9].r1_sel = RS_MUL; c.le[9].o0_sel = OS_MUL; c.le[14].o1_sel = OS_MUL;
    c.le[9].alu_op = ALU_XOR;
    cfg_in = c; issue = 1;
    @(negedge clk);
    issue = 0;
    e = c; e.le[9].r1_sel = RS_HOLD; e.le[9].o0_sel = OS_R0; e.le[14].o1_sel = OS_R0;
    chk("regalu guard", got, e);
    chk("error raised", 32'(cfg_err), 1);
    @(negedge clk);
    chk("error sticky", 32'(cfg_err), 1);
    clr_err = 1; @(negedge clk); clr_err = 0;
    chk("error cleared", 32'(cfg_err), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
