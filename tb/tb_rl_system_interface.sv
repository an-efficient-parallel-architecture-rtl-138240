// tb_rl_system_interface: checks the address decode of the host port: data
// memory and program buffer writes with their address fields, writes blocked
// while busy, the start and clear-error strobes, and reads of data memory,
// status and cycle count with their one-cycle latency.
module tb_rl_system_interface;
  import rl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req, we, rvalid;
  logic [15:0] addr;
  word_t wdata, rdata;
  logic dm_we, pb_we, start, clr_err, busy, done, cfg_err;
  logic [DADDR_W-1:0] dm_addr;
  word_t dm_wdata, dm_rdata, pb_wdata;
  logic [PADDR_W-1:0] pb_addr;
  logic [$clog2(NCHUNK)-1:0] pb_chunk;
  logic [31:0] cycles;

  rl_system_interface dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    req = 0; we = 0; addr = 0; wdata = 0; busy = 0; done = 0; cfg_err = 0; cycles = 0; dm_rdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // data memory write
    req = 1; we = 1; addr = 16'h0123; wdata = 32'hcafe_f00d; #1;
    chk("dm_we", 32'(dm_we), 1); chk("dm_addr", 32'(dm_addr), 32'h123); chk("dm_wdata", dm_wdata, 32'hcafe_f00d);
    chk("no pb_we", 32'(pb_we), 0); chk("no start", 32'(start), 0);
    // program buffer write: step 5, chunk 17
    addr = 16'h1000 | (16'd5 << 5) | 16'd17; #1;
    chk("pb_we", 32'(pb_we), 1); chk("pb_addr", 32'(pb_addr), 5); chk("pb_chunk", 32'(pb_chunk), 17);
    chk("no dm_we", 32'(dm_we), 0);
    // start and clear
    addr = 16'h2000; wdata = 32'h3; #1;
    chk("start", 32'(start), 1); chk("clr_err", 32'(clr_err), 1);
    // blocked while busy
    busy = 1; #1;
    chk("no start while busy", 32'(start), 0);
    addr = 16'h0010; #1; chk("dm blocked while busy", 32'(dm_we), 0);
    addr = 16'h1001; #1; chk("pb blocked while busy", 32'(pb_we), 0);
    // reads
    @(negedge clk);
    we = 0; addr = 16'h0042; #1; chk("read is not a write", 32'(dm_we), 0);
    @(negedge clk);
    req = 0; dm_rdata = 32'h1234_5678; #1;
    chk("rvalid", 32'(rvalid), 1); chk("dm read data", rdata, 32'h1234_5678);
    @(negedge clk);
    chk("rvalid drops", 32'(rvalid), 0);
    busy = 1; done = 0; cfg_err = 1; cycles = 32'd803;
    req = 1; addr = 16'h2000; @(negedge clk); req = 0; #1;
    chk("status read", rdata, 32'h5);
    req = 1; addr = 16'h2001; @(negedge clk); req = 0; #1;
    chk("cycles read", rdata, 803);
    busy = 0; done = 1; cfg_err = 0;
    req = 1; addr = 16'h2000; @(negedge clk); req = 0; #1;
    chk("status done", rdata, 32'h2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
