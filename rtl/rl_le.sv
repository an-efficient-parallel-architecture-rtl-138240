// rl_le: register-in-logic element (LE), the processing element of the array.
//
// An LE holds two working registers, R0 and R1, inside the logic that uses
// them. The ALU combines R0 and R1, the multiplier (present only in a RegMUL
// element, HAS_MUL=1; a RegALU element has none) multiplies them, shifter 0
// shifts R0 and shifter 1 shifts R1. At each clock edge R0 loads either the
// input xr0, a unit result, or keeps its value; R1 likewise with xr1. Each of
// the two output ports out0/out1 shows either register or any unit result.
// Results therefore stay where they were computed and are never written back
// to a register file.
//
// Timing: one operation per cycle. Outputs depend only on R0/R1 and the
// configuration, never combinationally on xr0/xr1, so LEs may be chained in
// any pattern without forming a combinational loop; a value loaded at edge n
// is processed and visible on an output during cycle n+1.
//
// The structure (two registers with input muxes from xR0/xR1, ALU, optional
// multiplier, two shifters, two output muxes, RegALU/RegMUL variants) follows
// the architecture. The register and output select encodings, the reset to zero
// and the behaviour of a RegALU asked for a product (it reads as zero) are this
// implementation's choices.
module rl_le
  import rl_pkg::*;
#(
  parameter bit HAS_MUL = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  le_cfg_t cfg,
  input  word_t   xr0,
  input  word_t   xr1,
  output word_t   out0,
  output word_t   out1,
  output word_t   r0,     // register values, for observation
  output word_t   r1
);

  word_t r0_q, r1_q;
  word_t alu_y, mul_y, sh0_y, sh1_y;

  rl_alu u_alu (.op(cfg.alu_op), .a(r0_q), .b(r1_q), .y(alu_y));

  if (HAS_MUL) begin : g_mul
    rl_multiplier u_mul (.a(r0_q), .b(r1_q), .y(mul_y));
  end else begin : g_nomul
    assign mul_y = '0;
  end

  rl_shifter u_sh0 (.op(cfg.sh0_op), .amt(cfg.sh0_amt), .a(r0_q), .y(sh0_y));
  rl_shifter u_sh1 (.op(cfg.sh1_op), .amt(cfg.sh1_amt), .a(r1_q), .y(sh1_y));

  function automatic word_t reg_next(rsel_e sel, word_t cur, word_t xin,
                                     word_t a, word_t m, word_t s0, word_t s1);
    unique case (sel)
      RS_HOLD: return cur;
      RS_XIN:  return xin;
      RS_ALU:  return a;
      RS_MUL:  return m;
      RS_SH0:  return s0;
      RS_SH1:  return s1;
      default: return cur;
    endcase
  endfunction

  function automatic word_t out_mux(osel_e sel, word_t q0, word_t q1,
                                    word_t a, word_t m, word_t s0, word_t s1);
    unique case (sel)
      OS_R0:   return q0;
      OS_R1:   return q1;
      OS_ALU:  return a;
      OS_MUL:  return m;
      OS_SH0:  return s0;
      OS_SH1:  return s1;
      default: return q0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0_q <= '0;
      r1_q <= '0;
    end else begin
      r0_q <= reg_next(cfg.r0_sel, r0_q, xr0, alu_y, mul_y, sh0_y, sh1_y);
      r1_q <= reg_next(cfg.r1_sel, r1_q, xr1, alu_y, mul_y, sh0_y, sh1_y);
    end
  end

  assign out0 = out_mux(cfg.o0_sel, r0_q, r1_q, alu_y, mul_y, sh0_y, sh1_y);
  assign out1 = out_mux(cfg.o1_sel, r0_q, r1_q, alu_y, mul_y, sh0_y, sh1_y);
  assign r0   = r0_q;
  assign r1   = r1_q;

endmodule
