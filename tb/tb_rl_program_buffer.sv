// tb_rl_program_buffer: writes random program steps chunk by chunk, in rising
// or falling chunk order, and checks that each step reads back whole and that
// writing one chunk leaves the neighbouring chunks and steps untouched.
module tb_rl_program_buffer;
  import rl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, wr_en;
  logic [PADDR_W-1:0] wr_addr, rd_addr;
  logic [$clog2(NCHUNK)-1:0] wr_chunk;
  word_t wr_data;
  instr_t rd_data;

  localparam int D = 1 << PADDR_W;
  logic [NCHUNK*32-1:0] model [D];

  rl_program_buffer dut (.clk, .wr_en, .wr_addr, .wr_chunk, .wr_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int a, int k, word_t d);
    wr_en = 1; wr_addr = PADDR_W'(a); wr_chunk = $bits(wr_chunk)'(k); wr_data = d;
    model[a][32*k +: 32] = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic rd_chk(int a);
    rd_addr = PADDR_W'(a); #1;
    checks++;
    if (rd_data !== instr_t'(model[a][IW-1:0])) begin failures++; $display("FAIL step %0d", a); end
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; wr_chunk = 0; wr_data = 0; rd_addr = 0;
    @(negedge clk);
    for (int a = 0; a < D; a++)
      for (int k = 0; k < NCHUNK; k++) begin
        int kk;
        kk = (a % 2 == 1) ? NCHUNK - 1 - k : k;
        wr(a, kk, $urandom);
      end
    for (int a = 0; a < D; a++) rd_chk(a);
    for (int i = 0; i < 50; i++) begin
      int a, k;
      a = $urandom_range(0, D-1); k = $urandom_range(0, NCHUNK-1);
      wr(a, k, $urandom);
      rd_chk(a); rd_chk((a + 1) % D);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
