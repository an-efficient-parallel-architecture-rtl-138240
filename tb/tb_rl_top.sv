// tb_rl_top: end-to-end test of the DSP system at its default size, driven
// only through the host port. It loads data and programs, starts them, waits
// for done and reads results back, comparing with values computed here:
//   1. streaming 4-tap FIR, y(n) = (sum h(k) x(n-k)) >>> 2, one output per
//      cycle: multiply layer, add tree, shifter rescale, write skip; checks
//      the run takes N+5 cycles, and that host writes are refused while busy;
//   2. 16-term dot product in six steps: clear, multiply/accumulate in column
//      3, drain, then move the total around the ring into column 0 and down a
//      same-column link, writing copies through two write ports;
//   3. real radix-2 butterflies X0 = a + w*b, X1 = a - w*b, two results per
//      cycle through two write ports.
// Every mechanism is counted and a failure is counted for one that never
// happened.
module tb_rl_top;
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

  // mechanism counters
  int n_stream_out = 0, n_shift = 0, n_accum = 0, n_ring = 0, n_same = 0;
  int n_dual_wr = 0, n_blocked = 0, n_steps = 0, n_butterfly = 0;

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
    if (!rvalid) begin failures++; $display("FAIL rvalid missing"); end
    d = rdata;
  endtask

  task automatic load_prog(instr_t p[]);
    logic [NCHUNK*32-1:0] bits;
    for (int s = 0; s < p.size(); s++) begin
      bits = '0;
      bits[IW-1:0] = p[s];
      for (int k = 0; k < NCHUNK; k++)
        bus_wr(16'h1000 | 16'(s << 5) | 16'(k), bits[32*k +: 32]);
    end
    n_steps += p.size();
  endtask

  task automatic run_prog(output word_t cyc);
    word_t st;
    bus_wr(16'h2000, 32'h1);
    st = 1;
    while (st[0]) bus_rd(16'h2000, st);
    chk("done flag", 32'(st[1]), 1);
    bus_rd(16'h2001, cyc);
  endtask

  function automatic instr_t blank();
    instr_t i;
    i = '0;
    return i;
  endfunction

  // ------------------------------------------------------------------
  localparam int NF = 64;                 // FIR outputs
  localparam int H = 0, X = 16, Y = 256;  // FIR layout: x(n) at X+3+n
  word_t h [4];
  word_t x [NF];

  task automatic test_fir();
    instr_t p [1];
    word_t cyc, d, sum;
    for (int k = 0; k < 4; k++) begin h[k] = $urandom_range(0, 200) - 100; bus_wr(16'(H + k), h[k]); end
    for (int k = 0; k < 3; k++) bus_wr(16'(X + k), 0);
    for (int n = 0; n < NF; n++) begin x[n] = $urandom_range(0, 2000) - 1000; bus_wr(16'(X + 3 + n), x[n]); end
    bus_wr(16'(Y - 1), 32'h5a5a_5a5a);    // sentinel
    p[0] = blank();
    p[0].arr = fir4_cfg(1'b0);
    p[0].arr.le[le_idx(3, 0)].o0_sel  = OS_SH1;
    p[0].arr.le[le_idx(3, 0)].sh1_op  = SH_SRA;
    p[0].arr.le[le_idx(3, 0)].sh1_amt = 5'd2;
    for (int k = 0; k < 4; k++) begin
      p[0].sched.rd[2*k].base     = DADDR_W'(H + k);
      p[0].sched.rd[2*k].stride   = 8'sd0;
      p[0].sched.rd[2*k+1].base   = DADDR_W'(X + 3 - k);
      p[0].sched.rd[2*k+1].stride = 8'sd1;
    end
    p[0].sched.wr[0].en     = 1'b1;
    p[0].sched.wr[0].src    = 5'(2*le_idx(3, 0));
    p[0].sched.wr[0].base   = DADDR_W'(Y);
    p[0].sched.wr[0].stride = 8'sd1;
    p[0].sched.wr[0].skip   = 4'd4;
    p[0].ctrl.rep  = ITER_W'(NF + 3);
    p[0].ctrl.halt = 1'b1;
    load_prog(p);
    // start, then try to overwrite the sentinel while the array runs
    bus_wr(16'h2000, 32'h1);
    bus_wr(16'(Y - 1), 32'h0bad_0bad);
    chk("busy during run", 32'(busy), 1);
    while (busy) @(negedge clk);
    bus_rd(16'h2001, cyc);
    chk("FIR cycles: N outputs + 5", cyc, NF + 5);
    bus_rd(16'(Y - 1), d);
    chk("host write refused while busy", d, 32'h5a5a_5a5a);
    if (d == 32'h5a5a_5a5a) n_blocked++;
    for (int n = 0; n < NF; n++) begin
      sum = 0;
      for (int k = 0; k < 4; k++) if (n - k >= 0) sum += h[k] * x[n-k];
      bus_rd(16'(Y + n), d);
      chk("FIR output", d, word_t'($signed(sum) >>> 2));
      if (d == word_t'($signed(sum) >>> 2)) n_stream_out++;
      if (d == word_t'($signed(sum) >>> 2) && sum != d) n_shift++;
    end
  endtask

  // ------------------------------------------------------------------
  localparam int H2 = 400, X2 = 432, D_OUT = 480;
  task automatic test_dot();
    instr_t p [6];
    word_t cyc, d, dot, a, b;
    dot = 0;
    for (int i = 0; i < 16; i++) begin
      a = $urandom_range(0, 20000) - 10000; b = $urandom_range(0, 20000) - 10000;
      bus_wr(16'(H2 + i), a); bus_wr(16'(X2 + i), b);
      dot += a * b;
    end
    // step 0: clear every register of the array
    p[0] = blank();
    for (int i = 0; i < NLE; i++) p[0].arr.le[i] = le_op(RS_XIN, RS_XIN, OS_R0, OS_R1);
    for (int c = 0; c < COLS; c++) for (int j = 0; j < 2*ROWS; j++) p[0].arr.rt[c][j] = SRC_ZERO;
    // step 1: four passes of the multiply/add tree, accumulating in column 3
    p[1] = blank();
    p[1].arr = fir4_cfg(1'b1);
    for (int r = 0; r < 4; r++) begin
      p[1].sched.rd[2*r].base = DADDR_W'(H2 + r);   p[1].sched.rd[2*r].stride = 8'sd4;
      p[1].sched.rd[2*r+1].base = DADDR_W'(X2 + r); p[1].sched.rd[2*r+1].stride = 8'sd4;
    end
    p[1].ctrl.rep = ITER_W'(3);
    // step 2: drain with zero operands
    p[2] = p[1];
    for (int j = 0; j < 2*ROWS; j++) p[2].arr.rt[0][j] = SRC_ZERO;
    // step 3: column 0 row 0 takes the total from column 3 around the ring
    p[3] = blank();
    p[3].arr.le[le_idx(0, 0)] = le_op(RS_XIN, RS_HOLD, OS_R0, OS_R1);
    p[3].arr.rt[0][0] = SRC_PREV + 1;
    // step 4: column 0 row 1 takes it from row 0 of its own column; write row 0
    p[4] = blank();
    p[4].arr.le[le_idx(0, 1)] = le_op(RS_XIN, RS_HOLD, OS_R0, OS_R1);
    p[4].arr.rt[0][2] = SRC_SAME + 0;
    p[4].sched.wr[0].en = 1'b1; p[4].sched.wr[0].src = 5'(2*le_idx(0, 0));
    p[4].sched.wr[0].base = DADDR_W'(D_OUT);
    // step 5: write row 1's copy and column 3's total through both ports
    p[5] = blank();
    p[5].sched.wr[0].en = 1'b1; p[5].sched.wr[0].src = 5'(2*le_idx(0, 1));
    p[5].sched.wr[0].base = DADDR_W'(D_OUT + 1);
    p[5].sched.wr[1].en = 1'b1; p[5].sched.wr[1].src = 5'(2*le_idx(3, 0) + 1);
    p[5].sched.wr[1].base = DADDR_W'(D_OUT + 2);
    p[5].ctrl.halt = 1'b1;
    load_prog(p);
    run_prog(cyc);
    chk("dot-product cycles", cyc, 1 + 4 + 4 + 1 + 1 + 1 + 1);
    bus_rd(16'(D_OUT + 2), d); chk("accumulated dot product", d, dot);
    if (d == dot) n_accum++;
    bus_rd(16'(D_OUT), d);     chk("total via ring", d, dot);
    if (d == dot) n_ring++;
    bus_rd(16'(D_OUT + 1), d); chk("total via same-column link", d, dot);
    if (d == dot) n_same++;
  endtask

  // ------------------------------------------------------------------
  localparam int NB = 16, A3 = 512, B3 = 544, W3 = 576, O0 = 608, O1 = 640;
  task automatic test_butterfly();
    instr_t p [1];
    word_t cyc, d, a [NB], b [NB], w [NB];
    for (int i = 0; i < NB; i++) begin
      a[i] = $urandom_range(0, 2000) - 1000; b[i] = $urandom_range(0, 2000) - 1000;
      w[i] = $urandom_range(0, 2000) - 1000;
      bus_wr(16'(A3 + i), a[i]); bus_wr(16'(B3 + i), b[i]); bus_wr(16'(W3 + i), w[i]);
    end
    p[0] = blank();
    p[0].arr.le[le_idx(0, 0)] = le_op(RS_XIN, RS_XIN, OS_MUL, OS_R0);
    p[0].arr.le[le_idx(0, 1)] = le_op(RS_XIN, RS_HOLD, OS_R0, OS_R1);
    p[0].arr.rt[0][0] = SRC_SCHED + 0; p[0].arr.rt[0][1] = SRC_SCHED + 1; p[0].arr.rt[0][2] = SRC_SCHED + 2;
    p[0].arr.le[le_idx(1, 0)] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R0, ALU_ADD);
    p[0].arr.le[le_idx(1, 1)] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R0, ALU_SUB);
    p[0].arr.rt[1][0] = SRC_PREV + 2; p[0].arr.rt[1][1] = SRC_PREV + 0;
    p[0].arr.rt[1][2] = SRC_PREV + 2; p[0].arr.rt[1][3] = SRC_PREV + 0;
    p[0].sched.rd[0].base = DADDR_W'(W3); p[0].sched.rd[0].stride = 8'sd1;
    p[0].sched.rd[1].base = DADDR_W'(B3); p[0].sched.rd[1].stride = 8'sd1;
    p[0].sched.rd[2].base = DADDR_W'(A3); p[0].sched.rd[2].stride = 8'sd1;
    for (int k = 0; k < 2; k++) begin
      p[0].sched.wr[k].en = 1'b1; p[0].sched.wr[k].src = 5'(2*le_idx(1, k));
      p[0].sched.wr[k].base = DADDR_W'(k == 0 ? O0 : O1);
      p[0].sched.wr[k].stride = 8'sd1; p[0].sched.wr[k].skip = 4'd2;
    end
    p[0].ctrl.rep = ITER_W'(NB + 1);
    p[0].ctrl.halt = 1'b1;
    load_prog(p);
    run_prog(cyc);
    chk("butterfly cycles: N + 3", cyc, NB + 3);
    for (int i = 0; i < NB; i++) begin
      word_t e0, e1, d1;
      e0 = a[i] + w[i] * b[i]; e1 = a[i] - w[i] * b[i];
      bus_rd(16'(O0 + i), d);  chk("butterfly X0", d, e0);
      bus_rd(16'(O1 + i), d1); chk("butterfly X1", d1, e1);
      if (d == e0 && d1 == e1) begin n_butterfly++; n_dual_wr++; end
    end
  endtask

  task automatic seen(string what, int n);
    checks++;
    $display("mechanism %-28s : %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    req = 0; we = 0; addr = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    test_fir();
    test_dot();
    test_butterfly();
    seen("streaming FIR outputs", n_stream_out);
    seen("shifter rescaling", n_shift);
    seen("accumulate in place", n_accum);
    seen("ring route", n_ring);
    seen("same-column route", n_same);
    seen("dual write", n_dual_wr);
    seen("butterflies", n_butterfly);
    seen("host write refused", n_blocked);
    seen("program steps", n_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
