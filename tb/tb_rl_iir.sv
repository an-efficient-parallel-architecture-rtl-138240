// tb_rl_iir: runs the 4th-order IIR filter
//   y(n) = sum_{k=0..4} c(k) x(n-k) - sum_{k=1..4} d(k) y(n-k)
// on the full-size system through the host port and compares every output
// with the recursion computed here (32-bit wrap-around arithmetic).
//
// Mapping, eight one-cycle steps per sample: column 2 multiplies (coefficient
// in R0, sample in R1, both from the data scheduler), column 3 rows 1-3 form
// partial sums and differences, and column 3 row 0 accumulates the total,
// switching its ALU between add and subtract from step to step. y(n) is
// written back and read again as y(n-1) by the next sample. The 64-step
// program buffer holds eight samples, so 16 samples run as two programs;
// each must take 8 cycles per sample plus one drain cycle.
module tb_rl_iir;
  import rl_pkg::*;
  import rl_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req, we, rvalid, busy, done;
  logic [15:0] addr;
  word_t wdata, rdata;

  rl_top dut (.clk, .rst_n, .req, .we, .addr, .wdata, .rdata, .rvalid, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, $signed(got), $signed(exp)); end
  endtask

  task automatic bus_wr(logic [15:0] a, word_t d);
    req = 1; we = 1; addr = a; wdata = d;
    @(negedge clk);
    req = 0; we = 0;
  endtask

  task automatic bus_rd(logic [15:0] a, output word_t d);
    req = 1; we = 0; addr = a;
    @(negedge clk);
    req = 0;
    d = rdata;
  endtask

  localparam int NS = 16, SPS = 8;                 // samples, steps per sample
  localparam int C = 700, D = 705, X = 720, Y = 760; // x(n) at X+4+n, y(n) at Y+4+n
  localparam int M0 = 8;                           // column 2, rows 0-3: multipliers
  localparam int ACC = 12, S1 = 13, S2 = 14, S3 = 15; // column 3

  instr_t prog [1 << PADDR_W];

  function automatic void mul_load(ref instr_t s, input int r, input int ca, input int da);
    s.arr.le[M0 + r] = le_op(RS_XIN, RS_XIN, OS_MUL, OS_R1);
    s.arr.rt[2][2*r]   = SRC_SCHED + src_t'(2*r);
    s.arr.rt[2][2*r+1] = SRC_SCHED + src_t'(2*r+1);
    s.sched.rd[2*r].base   = DADDR_W'(ca);
    s.sched.rd[2*r+1].base = DADDR_W'(da);
  endfunction

  // the eight steps of sample n, placed at prog[base..base+7]
  function automatic void sample_steps(int base, int n);
    instr_t s [SPS];
    for (int j = 0; j < SPS; j++) s[j] = '0;
    // s0: c0..c3 times x(n)..x(n-3)
    for (int r = 0; r < 4; r++) mul_load(s[0], r, C + r, X + 4 + n - r);
    // s1: c4 x(n-4), d1 y(n-1), d2 y(n-2), d3 y(n-3); pair sums of s0 products
    mul_load(s[1], 0, C + 4, X + 4 + n - 4);
    for (int r = 1; r < 4; r++) mul_load(s[1], r, D + r - 1, Y + 4 + n - r);
    s[1].arr.le[S1] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R1, ALU_ADD);
    s[1].arr.le[S2] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R1, ALU_ADD);
    s[1].arr.rt[3][2] = SRC_PREV + 0; s[1].arr.rt[3][3] = SRC_PREV + 2;
    s[1].arr.rt[3][4] = SRC_PREV + 4; s[1].arr.rt[3][5] = SRC_PREV + 6;
    // s2: d4 y(n-4); rows 1/2 take the s1 products; ACC takes the pair sums
    mul_load(s[2], 0, D + 3, Y + 4 + n - 4);
    for (int r = 1; r < 4; r++) s[2].arr.le[M0 + r] = le_op(RS_HOLD, RS_HOLD, OS_MUL, OS_R1);
    s[2].arr.le[S1] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R1, ALU_ADD);
    s[2].arr.le[S2] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R1, ALU_ADD);
    s[2].arr.rt[3][2] = SRC_PREV + 0; s[2].arr.rt[3][3] = SRC_PREV + 2;
    s[2].arr.rt[3][4] = SRC_PREV + 4; s[2].arr.rt[3][5] = SRC_PREV + 6;
    s[2].arr.le[ACC] = le_op(RS_XIN, RS_XIN, OS_R0, OS_R1);
    s[2].arr.rt[3][0] = SRC_SAME + 2; s[2].arr.rt[3][1] = SRC_SAME + 4;
    // s3: ACC adds; takes c4 x(n-4) - d1 y(n-1); row 3 keeps d4 y(n-4)
    s[3].arr.le[M0] = le_op(RS_HOLD, RS_HOLD, OS_MUL, OS_R1);
    s[3].arr.le[S1] = le_op(RS_HOLD, RS_HOLD, OS_ALU, OS_R1, ALU_SUB);
    s[3].arr.le[S3] = le_op(RS_XIN, RS_HOLD, OS_R0, OS_R1);
    s[3].arr.rt[3][6] = SRC_PREV + 0;
    s[3].arr.le[ACC] = le_op(RS_ALU, RS_XIN, OS_R0, OS_R1, ALU_ADD);
    s[3].arr.rt[3][1] = SRC_SAME + 2;
    // s4: ACC adds; takes d2 y(n-2) + d3 y(n-3)
    s[4].arr.le[S2] = le_op(RS_HOLD, RS_HOLD, OS_ALU, OS_R1, ALU_ADD);
    s[4].arr.le[ACC] = le_op(RS_ALU, RS_XIN, OS_R0, OS_R1, ALU_ADD);
    s[4].arr.rt[3][1] = SRC_SAME + 4;
    // s5: ACC subtracts; takes d4 y(n-4)
    s[5].arr.le[ACC] = le_op(RS_ALU, RS_XIN, OS_R0, OS_R1, ALU_SUB);
    s[5].arr.rt[3][1] = SRC_SAME + 6;
    // s6: ACC subtracts: R0 = y(n)
    s[6].arr.le[ACC] = le_op(RS_ALU, RS_HOLD, OS_R0, OS_R1, ALU_SUB);
    // s7: write y(n)
    s[7].sched.wr[0].en   = 1'b1;
    s[7].sched.wr[0].src  = 5'(2*ACC);
    s[7].sched.wr[0].base = DADDR_W'(Y + 4 + n);
    for (int j = 0; j < SPS; j++) prog[base + j] = s[j];
  endfunction

  task automatic load_and_run(int first, output word_t cyc);
    logic [NCHUNK*32-1:0] bits;
    word_t st;
    for (int k = 0; k < (1 << PADDR_W); k++) prog[k] = '0;
    for (int i = 0; i < 8; i++) sample_steps(SPS*i, first + i);
    prog[8*SPS - 1].ctrl.halt = 1'b1;
    for (int s = 0; s < 8*SPS; s++) begin
      bits = '0;
      bits[IW-1:0] = prog[s];
      for (int k = 0; k < NCHUNK; k++) bus_wr(16'h1000 | 16'(s << 5) | 16'(k), bits[32*k +: 32]);
    end
    bus_wr(16'h2000, 32'h1);
    st = 1;
    while (st[0]) bus_rd(16'h2000, st);
    bus_rd(16'h2001, cyc);
  endtask

  initial begin
    word_t c [5], d [5], x [NS], y [-4:NS-1], cyc, got;
    req = 0; we = 0; addr = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 5; k++) begin c[k] = $urandom_range(0, 14) - 7; bus_wr(16'(C + k), c[k]); end
    d[0] = 0;
    for (int k = 1; k < 5; k++) begin d[k] = $urandom_range(0, 4) - 2; bus_wr(16'(D + k - 1), d[k]); end
    for (int k = 0; k < 4; k++) begin bus_wr(16'(X + k), 0); bus_wr(16'(Y + k), 0); y[k-4] = 0; end
    for (int n = 0; n < NS; n++) begin x[n] = $urandom_range(0, 200) - 100; bus_wr(16'(X + 4 + n), x[n]); end
    for (int n = 0; n < NS; n++) begin
      y[n] = 0;
      for (int k = 0; k < 5; k++) if (n - k >= 0) y[n] += c[k] * x[n-k];
      for (int k = 1; k < 5; k++) y[n] -= d[k] * y[n-k];
    end
    load_and_run(0, cyc);
    chk("cycles, samples 0-7", cyc, 8*SPS + 1);
    load_and_run(8, cyc);
    chk("cycles, samples 8-15", cyc, 8*SPS + 1);
    for (int n = 0; n < NS; n++) begin
      bus_rd(16'(Y + 4 + n), got);
      chk($sformatf("y(%0d)", n), got, y[n]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
