// tb_rl_data_scheduler: loads the memory through the host port and reads it
// back, then issues strided reads on all eight ports (including a negative
// stride) and checks each word one cycle after its issue, and finally issues a
// write stream on two write ports with different skips and strides, checking
// that the first skip iterations write nothing and the rest land at
// base + (iteration-skip)*stride, taking the selected LE output in the cycle
// after the issue.
module tb_rl_data_scheduler;
  import rl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic issue;
  logic [ITER_W-1:0] iter;
  sched_cfg_t cfg;
  word_t [NRD-1:0] rdata;
  word_t [NOUT-1:0] le_out;
  logic host_we;
  logic [DADDR_W-1:0] host_addr;
  word_t host_wdata, host_rdata;

  localparam int D = 1 << DADDR_W;
  word_t model [D];

  rl_data_scheduler dut (.clk, .rst_n, .issue, .iter, .cfg, .rdata, .le_out,
                         .host_we, .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  function automatic int addr_of(int base, int stride, int n);
    return (base + n*stride) & (D - 1);
  endfunction

  initial begin
    issue = 0; iter = 0; cfg = '0; le_out = '0; host_we = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) begin
      model[i] = $urandom;
      host_we = 1; host_addr = DADDR_W'(i); host_wdata = model[i];
      @(negedge clk);
    end
    host_we = 0;
    for (int i = 0; i < 64; i++) begin
      host_addr = DADDR_W'($urandom_range(0, D-1));
      @(negedge clk);
      chk("host read", host_rdata, model[host_addr]);
    end
    // strided reads
    for (int p = 0; p < NRD; p++) begin
      cfg.rd[p].base   = DADDR_W'($urandom_range(0, D-1));
      cfg.rd[p].stride = (p == 3) ? -8'sd1 : 8'(p);
    end
    for (int n = 0; n < 20; n++) begin
      issue = 1; iter = ITER_W'(n);
      @(negedge clk);
      issue = 0;
      for (int p = 0; p < NRD; p++)
        chk("strided read", rdata[p], model[addr_of(cfg.rd[p].base, cfg.rd[p].stride, n)]);
    end
    // strided writes: port 0 with skip 3, stride 2, from LE output 17;
    // port 1 with skip 1, stride -1, from LE output 30
    cfg.wr[0].en = 1; cfg.wr[0].src = 5'd17; cfg.wr[0].base = 10'd100; cfg.wr[0].stride = 8'sd2; cfg.wr[0].skip = 4'd3;
    cfg.wr[1].en = 1; cfg.wr[1].src = 5'd30; cfg.wr[1].base = 10'd129; cfg.wr[1].stride = -8'sd1; cfg.wr[1].skip = 4'd1;
    for (int n = 0; n < 12; n++) begin
      issue = 1; iter = ITER_W'(n);
      le_out = '0;
      @(negedge clk);
      issue = 0;
      // apply cycle: the selected output is written at the end of it
      for (int k = 0; k < NOUT; k++) le_out[k] = 32'hdead_0000 | 32'(k);
      le_out[17] = 32'h5000_0000 + 32'(n);
      le_out[30] = 32'h6000_0000 + 32'(n);
      if (n >= 3) model[addr_of(100, 2, n - 3)] = le_out[17];
      if (n >= 1) model[addr_of(129, -1, n - 1)] = le_out[30];
      @(negedge clk);
    end
    cfg.wr[0].en = 0; cfg.wr[1].en = 0; le_out = '0;
    for (int a = 90; a < 135; a++) begin
      host_addr = DADDR_W'(a);
      @(negedge clk);
      chk("write stream", host_rdata, model[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
