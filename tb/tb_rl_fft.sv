// tb_rl_fft: runs a complex 16-point radix-2 decimation-in-time FFT,
//   X(k) = sum_n x(n) W_N^(kn),
// on the full-size system through the host port.
//
// One butterfly per cycle, X0 = a + w*b and X1 = a - w*b on complex numbers
// with Q14 twiddles. Column 0 forms the four products wr*br, wi*bi, wr*bi,
// wi*br (the router hands the same scheduler word to several inputs);
// column 1 combines them into w*b scaled by 2^14; column 2 rescales with its
// two shifters (R0 >>> 14, R1 >>> 14); column 3 adds and subtracts a, read
// from memory three iterations late so that it arrives together with w*b, and
// four write ports store the four result words with a skip of 4. Each stage
// reads one buffer and writes the other; a stage is one or two strided
// steps, and a one-cycle gap step separates stages.
//
// Checks: every output word bit-exactly against the same fixed-point
// algorithm computed here, every output against a floating-point DFT within
// a rounding tolerance, and the run's cycle count.
module tb_rl_fft;
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

  localparam int N = 16, LOGN = 4, Q = 14, LAT = 4;
  // buffers: real parts at base, imaginary parts at base + N
  localparam int BUF0 = 32, BUF1 = 96, TW = 160;   // twiddles: re at TW, im at TW+N/2

  instr_t prog [1 << PADDR_W];
  int nsteps, ncycles_exp;

  // one strided step: cnt butterflies, a at src+a0+j*as, b = a + h,
  // twiddle index m0 + j*ms; results to the same positions of dst
  function automatic void bfly_step(int src, int dst, int a0, int as, int h, int m0, int ms, int cnt);
    instr_t s;
    s = '0;
    // column 0: products
    for (int r = 0; r < 4; r++) s.arr.le[le_idx(0, r)] = le_op(RS_XIN, RS_XIN, OS_MUL, OS_R1);
    // ports: 0 wr, 1 wi, 2 br, 3 bi, 4 ar, 5 ai
    s.arr.rt[0][0] = SRC_SCHED + 0; s.arr.rt[0][1] = SRC_SCHED + 2;   // wr*br
    s.arr.rt[0][2] = SRC_SCHED + 1; s.arr.rt[0][3] = SRC_SCHED + 3;   // wi*bi
    s.arr.rt[0][4] = SRC_SCHED + 0; s.arr.rt[0][5] = SRC_SCHED + 3;   // wr*bi
    s.arr.rt[0][6] = SRC_SCHED + 1; s.arr.rt[0][7] = SRC_SCHED + 2;   // wi*br
    // column 1: real and imaginary part of w*b, scaled by 2^Q
    s.arr.le[le_idx(1, 0)] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R1, ALU_SUB);
    s.arr.le[le_idx(1, 1)] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R1, ALU_ADD);
    s.arr.rt[1][0] = SRC_PREV + 0; s.arr.rt[1][1] = SRC_PREV + 2;
    s.arr.rt[1][2] = SRC_PREV + 4; s.arr.rt[1][3] = SRC_PREV + 6;
    // column 2: rescale both parts with the two shifters
    s.arr.le[le_idx(2, 0)] = le_op(RS_XIN, RS_XIN, OS_SH0, OS_SH1, ALU_ADD, SH_SRA, Q, SH_SRA, Q);
    s.arr.rt[2][0] = SRC_PREV + 0; s.arr.rt[2][1] = SRC_PREV + 2;
    // column 3: a +/- w*b
    s.arr.le[le_idx(3, 0)] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R1, ALU_ADD);
    s.arr.le[le_idx(3, 1)] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R1, ALU_SUB);
    s.arr.le[le_idx(3, 2)] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R1, ALU_ADD);
    s.arr.le[le_idx(3, 3)] = le_op(RS_XIN, RS_XIN, OS_ALU, OS_R1, ALU_SUB);
    s.arr.rt[3][0] = SRC_SCHED + 4; s.arr.rt[3][1] = SRC_PREV + 0;
    s.arr.rt[3][2] = SRC_SCHED + 4; s.arr.rt[3][3] = SRC_PREV + 0;
    s.arr.rt[3][4] = SRC_SCHED + 5; s.arr.rt[3][5] = SRC_PREV + 1;
    s.arr.rt[3][6] = SRC_SCHED + 5; s.arr.rt[3][7] = SRC_PREV + 1;
    // scheduler reads; a is read LAT-1 iterations late
    s.sched.rd[0].base = DADDR_W'(TW + m0);         s.sched.rd[0].stride = 8'(ms);
    s.sched.rd[1].base = DADDR_W'(TW + N/2 + m0);   s.sched.rd[1].stride = 8'(ms);
    s.sched.rd[2].base = DADDR_W'(src + a0 + h);     s.sched.rd[2].stride = 8'(as);
    s.sched.rd[3].base = DADDR_W'(src + N + a0 + h); s.sched.rd[3].stride = 8'(as);
    s.sched.rd[4].base = DADDR_W'(src + a0 - (LAT-1)*as);     s.sched.rd[4].stride = 8'(as);
    s.sched.rd[5].base = DADDR_W'(src + N + a0 - (LAT-1)*as); s.sched.rd[5].stride = 8'(as);
    // writes: X0 re/im to a, X1 re/im to b
    for (int w = 0; w < 4; w++) begin
      s.sched.wr[w].en     = 1'b1;
      s.sched.wr[w].src    = 5'(2*le_idx(3, w));
      s.sched.wr[w].stride = 8'(as);
      s.sched.wr[w].skip   = 4'(LAT);
    end
    s.sched.wr[0].base = DADDR_W'(dst + a0);
    s.sched.wr[1].base = DADDR_W'(dst + a0 + h);
    s.sched.wr[2].base = DADDR_W'(dst + N + a0);
    s.sched.wr[3].base = DADDR_W'(dst + N + a0 + h);
    s.ctrl.rep = ITER_W'(cnt + LAT - 1);
    prog[nsteps++] = s;
  endfunction

  function automatic void gap_step();
    prog[nsteps++] = '0;
  endfunction

  function automatic int bitrev(int v);
    int r;
    r = 0;
    for (int i = 0; i < LOGN; i++) if (v & (1 << i)) r |= 1 << (LOGN - 1 - i);
    return r;
  endfunction

  initial begin
    int xr [N], xi [N], wr [N/2], wi [N/2];
    int mr [N], mi [N], nr [N], ni [N];
    word_t got, cyc, st;
    logic [NCHUNK*32-1:0] bits;
    real pi, er, ei, tol;
    int src, dst, h;
    pi = 3.14159265358979;
    req = 0; we = 0; addr = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // data and twiddles
    for (int n = 0; n < N; n++) begin xr[n] = $urandom_range(0, 2000) - 1000; xi[n] = $urandom_range(0, 2000) - 1000; end
    for (int m = 0; m < N/2; m++) begin
      wr[m] = $rtoi($floor($cos(2.0*pi*m/N) * (1 << Q) + 0.5));
      wi[m] = $rtoi($floor(-$sin(2.0*pi*m/N) * (1 << Q) + 0.5));
      bus_wr(16'(TW + m), wr[m]); bus_wr(16'(TW + N/2 + m), wi[m]);
    end
    for (int n = 0; n < N; n++) begin
      mr[n] = xr[bitrev(n)]; mi[n] = xi[bitrev(n)];
      bus_wr(16'(BUF0 + n), mr[n]); bus_wr(16'(BUF0 + N + n), mi[n]);
    end
    // program and fixed-point reference, stage by stage
    nsteps = 0;
    for (int k = 0; k < (1 << PADDR_W); k++) prog[k] = '0;
    src = BUF0; dst = BUF1;
    for (int s = 0; s < LOGN; s++) begin
      h = 1 << s;
      if (s > 0) gap_step();
      if (N/(2*h) >= h) begin
        // iterate over groups for each k
        for (int k = 0; k < h; k++) bfly_step(src, dst, k, 2*h, h, k*(N/(2*h)), 0, N/(2*h));
      end else begin
        // iterate over k for each group
        for (int g = 0; g < N/(2*h); g++) bfly_step(src, dst, g*2*h, 1, h, 0, N/(2*h), h);
      end
      for (int g = 0; g < N/(2*h); g++)
        for (int k = 0; k < h; k++) begin
          int a, b, m, tr, ti;
          a = g*2*h + k; b = a + h; m = k*(N/(2*h));
          tr = (wr[m]*mr[b] - wi[m]*mi[b]) >>> Q;
          ti = (wr[m]*mi[b] + wi[m]*mr[b]) >>> Q;
          nr[a] = mr[a] + tr; ni[a] = mi[a] + ti;
          nr[b] = mr[a] - tr; ni[b] = mi[a] - ti;
        end
      mr = nr; mi = ni;
      src = dst; dst = (dst == BUF0) ? BUF1 : BUF0;
    end
    prog[nsteps-1].ctrl.halt = 1'b1;
    // each butterfly step: its butterflies + LAT pipeline cycles; each gap: 1;
    // plus the drain cycle (must equal the sum of rep+1 over the steps, plus 1)
    ncycles_exp = 1 + (LOGN - 1);
    for (int s = 0; s < LOGN; s++) ncycles_exp += ((1 << s) <= N/(2 << s) ? (1 << s) : N/(2 << s)) * LAT + N/2;
    for (int s = 0; s < nsteps; s++) begin
      bits = '0;
      bits[IW-1:0] = prog[s];
      for (int k = 0; k < NCHUNK; k++) bus_wr(16'h1000 | 16'(s << 5) | 16'(k), bits[32*k +: 32]);
    end
    bus_wr(16'h2000, 32'h1);
    st = 1;
    while (st[0]) bus_rd(16'h2000, st);
    bus_rd(16'h2001, cyc);
    chk("FFT cycle count", cyc, ncycles_exp);
    $display("FFT: %0d steps, %0d cycles", nsteps, cyc);
    tol = 12.0;
    for (int k = 0; k < N; k++) begin
      word_t gr, gi;
      bus_rd(16'(src + k), gr); bus_rd(16'(src + N + k), gi);
      chk($sformatf("X(%0d) re, fixed-point model", k), gr, mr[k]);
      chk($sformatf("X(%0d) im, fixed-point model", k), gi, mi[k]);
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        er += xr[n]*$cos(2.0*pi*k*n/N) + xi[n]*$sin(2.0*pi*k*n/N);
        ei += xi[n]*$cos(2.0*pi*k*n/N) - xr[n]*$sin(2.0*pi*k*n/N);
      end
      checks++;
      er = $itor($signed(gr)) - er; ei = $itor($signed(gi)) - ei;
      if (er > tol || er < -tol || ei > tol || ei < -tol) begin
        failures++; $display("FAIL X(%0d) = %0d, %0d differs from the DFT by %f, %f", k, $signed(gr), $signed(gi), er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
