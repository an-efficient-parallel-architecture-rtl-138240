// tb_rl_multiplier: compares the multiplier with a 64-bit signed product
// computed in the testbench (low 32 bits), on random and corner operands.
module tb_rl_multiplier;
  import rl_pkg::*;
  int checks = 0, failures = 0;
  word_t a, b, y, exp_y;
  longint signed p;

  rl_multiplier dut (.a(a), .b(b), .y(y));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_one(word_t x, word_t z);
    a = x; b = z; #1;
    p = longint'($signed(x)) * longint'($signed(z));
    exp_y = p[31:0]; checks++;
    if (y !== exp_y) begin failures++; $display("FAIL a=%h b=%h y=%h exp=%h", x, z, y, exp_y); end
  endtask

  initial begin
    check_one(32'd3, 32'd5);
    check_one(32'hffff_fffd, 32'd7);           // -3 * 7
    check_one(32'h8000_0000, 32'hffff_ffff);
    check_one(32'h0001_0000, 32'h0001_0000);   // wraps to zero
    check_one(32'h0000_ffff, 32'h0000_ffff);
    for (int i = 0; i < 1000; i++) check_one($urandom, $urandom);
    for (int i = 0; i < 200; i++) check_one($urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
