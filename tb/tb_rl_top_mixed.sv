// tb_rl_top_mixed: the DSP system with a mix of element types, columns 0 and
// 2 RegMUL and columns 1 and 3 RegALU (MUL_MASK = 16'h0f0f). A streaming
// 4-tap FIR that needs multipliers only in column 0 must run unchanged. A
// program that asks a RegALU element for a product must leave that element
// holding its registers, raise the configuration-error status bit, and the
// bit must clear through the control register.
module tb_rl_top_mixed;
  import rl_pkg::*;
  import rl_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req, we, rvalid, busy, done;
  logic [15:0] addr;
  word_t wdata, rdata;

  rl_top #(.MUL_MASK(16'h0f0f)) dut (.clk, .rst_n, .req, .we, .addr, .wdata, .rdata, .rvalid, .busy, .done);

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

  task automatic load_run(instr_t p[], output word_t status);
    logic [NCHUNK*32-1:0] bits;
    for (int s = 0; s < p.size(); s++) begin
      bits = '0;
      bits[IW-1:0] = p[s];
      for (int k = 0; k < NCHUNK; k++) bus_wr(16'h1000 | 16'(s << 5) | 16'(k), bits[32*k +: 32]);
    end
    bus_wr(16'h2000, 32'h1);
    status = 1;
    while (status[0]) bus_rd(16'h2000, status);
  endtask

  localparam int NF = 20, H = 0, X = 16, Y = 256, Z = 300;

  initial begin
    instr_t p1 [1], p2 [2];
    word_t h [4], x [NF], st, d, sum;
    req = 0; we = 0; addr = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // FIR with multipliers in column 0 only
    for (int k = 0; k < 4; k++) begin h[k] = $urandom_range(0, 200) - 100; bus_wr(16'(H + k), h[k]); end
    for (int k = 0; k < 3; k++) bus_wr(16'(X + k), 0);
    for (int n = 0; n < NF; n++) begin x[n] = $urandom_range(0, 2000) - 1000; bus_wr(16'(X + 3 + n), x[n]); end
    p1[0] = '0;
    p1[0].arr = fir4_cfg(1'b0);
    for (int k = 0; k < 4; k++) begin
      p1[0].sched.rd[2*k].base   = DADDR_W'(H + k);
      p1[0].sched.rd[2*k+1].base = DADDR_W'(X + 3 - k);
      p1[0].sched.rd[2*k+1].stride = 8'sd1;
    end
    p1[0].sched.wr[0].en = 1'b1; p1[0].sched.wr[0].src = 5'(2*le_idx(3, 0));
    p1[0].sched.wr[0].base = DADDR_W'(Y); p1[0].sched.wr[0].stride = 8'sd1; p1[0].sched.wr[0].skip = 4'd4;
    p1[0].ctrl.rep = ITER_W'(NF + 3); p1[0].ctrl.halt = 1'b1;
    load_run(p1, st);
    chk("no configuration error", 32'(st[2]), 0);
    for (int n = 0; n < NF; n++) begin
      sum = 0;
      for (int k = 0; k < 4; k++) if (n - k >= 0) sum += h[k] * x[n-k];
      bus_rd(16'(Y + n), d);
      chk("FIR output", d, sum);
    end
    // RegALU column 1 asked for a product: it must hold and flag the error
    p2[0] = '0;
    p2[0].arr.le[le_idx(1, 0)] = le_op(RS_XIN, RS_XIN, OS_R0, OS_R1);
    p2[0].arr.rt[1][0] = SRC_SCHED + 0; p2[0].arr.rt[1][1] = SRC_SCHED + 1;
    p2[0].sched.rd[0].base = DADDR_W'(H); p2[0].sched.rd[1].base = DADDR_W'(H + 1);
    p2[1] = '0;
    p2[1].arr.le[le_idx(1, 0)] = le_op(RS_MUL, RS_HOLD, OS_MUL, OS_R1);
    p2[1].sched.wr[0].en = 1'b1; p2[1].sched.wr[0].src = 5'(2*le_idx(1, 0));
    p2[1].sched.wr[0].base = DADDR_W'(Z);
    p2[1].sched.wr[1].en = 1'b1; p2[1].sched.wr[1].src = 5'(2*le_idx(1, 0) + 1);
    p2[1].sched.wr[1].base = DADDR_W'(Z + 1);
    p2[1].ctrl.halt = 1'b1;
    load_run(p2, st);
    chk("configuration error flagged", 32'(st[2]), 1);
    bus_rd(16'(Z), d);     chk("RegALU output falls back to R0", d, h[0]);
    bus_rd(16'(Z + 1), d); chk("RegALU R1 unchanged", d, h[1]);
    bus_wr(16'h2000, 32'h2);
    bus_rd(16'h2000, st);
    chk("configuration error cleared", 32'(st[2]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
