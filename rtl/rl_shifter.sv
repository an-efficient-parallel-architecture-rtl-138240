// rl_shifter: one of the two shifters of a register-in-logic element.
//
// Shifter 0 works on R0 and shifter 1 on R1. Each shifts its register left
// logically, right logically or right arithmetically by a 0..W-1 amount taken
// from the configuration, or passes it unchanged. Combinational. The
// architecture names one shifter per register; the operations and the
// configured (not data-dependent) shift amount are this implementation's choice.
module rl_shifter
  import rl_pkg::*;
#(
  parameter int W = XLEN
) (
  input  sh_op_e               op,
  input  logic [$clog2(W)-1:0] amt,
  input  logic [W-1:0]         a,
  output logic [W-1:0]         y
);

  always_comb begin
    unique case (op)
      SH_NONE: y = a;
      SH_SLL:  y = a << amt;
      SH_SRL:  y = a >> amt;
      SH_SRA:  y = W'($signed(a) >>> amt);
      default: y = a;
    endcase
  end

endmodule
