// tb_rl_le: drives a RegMUL and a RegALU logic element through loads,
// every output select, accumulation in place (R0 <= R0 + R1), shifts into the
// registers and hold, comparing with values computed in the testbench. It
// also checks the one-cycle timing: a value loaded at an edge is seen on the
// outputs right after it, and outputs do not follow xr0/xr1 combinationally.
module tb_rl_le;
  import rl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  le_cfg_t cfg;
  word_t xr0, xr1, o0, o1, q0, q1, m0, m1, mq0, mq1;

  rl_le #(.HAS_MUL(1'b1)) dut  (.clk, .rst_n, .cfg, .xr0, .xr1, .out0(o0), .out1(o1), .r0(q0), .r1(q1));
  rl_le #(.HAS_MUL(1'b0)) dut_a(.clk, .rst_n, .cfg, .xr0, .xr1, .out0(m0), .out1(m1), .r0(mq0), .r1(mq1));

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  function automatic le_cfg_t mk(rsel_e s0, rsel_e s1, osel_e p0, osel_e p1, alu_op_e op = ALU_ADD,
                                 sh_op_e h0 = SH_NONE, int a0 = 0, sh_op_e h1 = SH_NONE, int a1 = 0);
    le_cfg_t c;
    c.alu_op = op; c.sh0_op = h0; c.sh0_amt = 5'(a0); c.sh1_op = h1; c.sh1_amt = 5'(a1);
    c.r0_sel = s0; c.r1_sel = s1; c.o0_sel = p0; c.o1_sel = p1;
    return c;
  endfunction

  initial begin
    word_t a, b, acc;
    cfg = '0; xr0 = '0; xr1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk("reset r0", q0, 0); chk("reset r1", q1, 0);
    for (int i = 0; i < 50; i++) begin
      a = $urandom; b = $urandom;
      @(negedge clk);
      cfg = mk(RS_XIN, RS_XIN, OS_ALU, OS_MUL, ALU_SUB); xr0 = a; xr1 = b;
      #1 chk("no comb path from xr0", o0, q0 - q1);
      @(negedge clk);
      cfg = mk(RS_HOLD, RS_HOLD, OS_ALU, OS_MUL, ALU_SUB); xr0 = $urandom; xr1 = $urandom;
      #1;
      chk("r0 loaded", q0, a); chk("r1 loaded", q1, b);
      chk("alu sub out0", o0, a - b); chk("mul out1", o1, a * b);
      chk("regalu mul reads zero", m1, 0);
      cfg = mk(RS_HOLD, RS_HOLD, OS_SH0, OS_SH1, ALU_ADD, SH_SRA, 3, SH_SLL, 4); #1;
      chk("sh0 out", o0, word_t'($signed(a) >>> 3)); chk("sh1 out", o1, b << 4);
      cfg = mk(RS_HOLD, RS_HOLD, OS_R1, OS_R0); #1;
      chk("out r1", o0, b); chk("out r0", o1, a);
    end
    // accumulate: R0 <= R0 + R1 with a new R1 every cycle
    @(negedge clk); cfg = mk(RS_XIN, RS_XIN, OS_R0, OS_R1); xr0 = 0; xr1 = 0;
    acc = 0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      a = $urandom_range(0, 1000);
      cfg = mk(RS_ALU, RS_XIN, OS_R0, OS_R1); xr1 = a;
      acc += (i == 0) ? 0 : b;
      b = a;
      @(posedge clk); #1 chk("accumulate", q0, acc);
    end
    // product into a register, then shifted into the other register
    @(negedge clk); cfg = mk(RS_XIN, RS_XIN, OS_R0, OS_R1); xr0 = 1234; xr1 = -56;
    @(negedge clk); cfg = mk(RS_MUL, RS_HOLD, OS_R0, OS_R1);
    @(negedge clk); cfg = mk(RS_HOLD, RS_SH0, OS_R0, OS_R1, ALU_ADD, SH_SRA, 2);
    @(negedge clk); cfg = '0;
    chk("mul into r0", q0, 1234 * -56); chk("sh0 into r1", q1, (1234 * -56) >>> 2);
    chk("regalu mul into r0 gives zero", mq0, 0);
    repeat (3) @(negedge clk);
    chk("hold r0", q0, 1234 * -56); chk("hold r1", q1, (1234 * -56) >>> 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
