// rl_multiplier: the multiplier of a RegMUL logic element.
//
// It multiplies the element's R0 by R1 as signed two's-complement numbers and
// returns the low W bits of the product, the integer product used by the
// multiply-accumulate layers of FIR, IIR and FFT kernels (the element's
// shifters can rescale fixed-point results afterwards). It is combinational:
// a product is available in the same cycle as its operands sit in R0/R1.
// The architecture gives the multiplier and its R0/R1 operands; signedness and
// keeping the low half are this implementation's choices.
module rl_multiplier
  import rl_pkg::*;
#(
  parameter int W = XLEN
) (
  input  logic [W-1:0] a,   // R0
  input  logic [W-1:0] b,   // R1
  output logic [W-1:0] y
);

  logic signed [2*W-1:0] prod;

  always_comb begin
    prod = $signed(a) * $signed(b);
    y    = prod[W-1:0];
  end

endmodule
