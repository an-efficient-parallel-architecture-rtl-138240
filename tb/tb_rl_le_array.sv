// tb_rl_le_array: runs the streaming 4-tap multiply/add tree on the array
// with random coefficients and samples fed as scheduler words, and checks
// that every sum leaves column 3 exactly three cycles after its operands
// entered column 0, and that column 3 accumulates them. It then checks the
// ring connection (last column into column 0), a same-column connection, the
// zero source and a RegALU position (MUL_MASK) that reads products as zero.
module tb_rl_le_array;
  import rl_pkg::*;
  import rl_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  le_cfg_t [NLE-1:0]  le_cfg;
  rt_cfg_t [COLS-1:0] rt_cfg;
  word_t [NRD-1:0]    sched;
  word_t [NOUT-1:0]   le_out, le_reg;
  array_cfg_t a;

  // LE 13 (column 3, row 1) is a RegALU, all others RegMUL
  rl_le_array #(.MUL_MASK(16'hdfff)) dut (.clk, .rst_n, .le_cfg, .rt_cfg, .sched, .le_out, .le_reg);

  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  localparam int N = 40;
  word_t h [4];
  word_t x [N][4];
  word_t dot [N];

  initial begin
    word_t acc;
    le_cfg = '0; rt_cfg = '0; sched = '0;
    for (int r = 0; r < 4; r++) h[r] = $urandom_range(0, 2000) - 1000;
    for (int t = 0; t < N; t++) begin
      dot[t] = 0;
      for (int r = 0; r < 4; r++) begin
        x[t][r] = $urandom_range(0, 2000) - 1000;
        dot[t] += h[r] * x[t][r];
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    a = fir4_cfg(1'b1);
    le_cfg = a.le; rt_cfg = a.rt;
    // cycle t presents sample set t; after edge t+3 column 3 R1 holds dot[t]
    acc = 0;
    for (int t = 0; t < N + 4; t++) begin
      for (int r = 0; r < 4; r++) begin
        sched[2*r]   = h[r];
        sched[2*r+1] = (t < N) ? x[t][r] : 32'd0;
      end
      @(posedge clk); #1;
      if (t >= 3 && t - 3 < N) chk("sum after 3 cycles", le_reg[2*le_idx(3, 0) + 1], dot[t-3]);
      if (t >= 4 && t - 4 < N) begin
        acc += dot[t-4];
        chk("accumulated", le_reg[2*le_idx(3, 0)], acc);
      end
      @(negedge clk);
    end
    // ring: column 0 row 3 loads column 3 row 0 out1 (the running total)
    le_cfg = '0; rt_cfg = '0;
    le_cfg[le_idx(0, 3)] = le_op(RS_XIN, RS_XIN, OS_R0, OS_R1);
    rt_cfg[0][6] = SRC_PREV + 1; rt_cfg[0][7] = SRC_ZERO;
    // same column: column 1 row 2 loads column 1 row 0 out0 (R0 via select)
    le_cfg[le_idx(1, 0)] = le_op(RS_HOLD, RS_HOLD, OS_R1, OS_R0);
    le_cfg[le_idx(1, 2)] = le_op(RS_XIN, RS_HOLD, OS_R0, OS_R1);
    rt_cfg[1][4] = SRC_SAME + 0;
    // RegALU LE 13 asked to keep a product
    le_cfg[le_idx(3, 1)] = le_op(RS_MUL, RS_XIN, OS_MUL, OS_R1);
    rt_cfg[3][3] = SRC_SCHED + 0; sched[0] = 32'd77;
    @(posedge clk); #1;
    chk("ring into column 0", le_reg[2*le_idx(0, 3)], acc);
    chk("zero source", le_reg[2*le_idx(0, 3) + 1], 0);
    chk("same-column link", le_reg[2*le_idx(1, 2)], le_reg[2*le_idx(1, 0) + 1]);
    chk("regalu product is zero", le_out[2*le_idx(3, 1)], 0);
    chk("regalu loads", le_reg[2*le_idx(3, 1) + 1], 77);
    @(negedge clk); le_cfg = '0;
    @(posedge clk); #1;
    chk("hold when idle", le_reg[2*le_idx(0, 3)], acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
