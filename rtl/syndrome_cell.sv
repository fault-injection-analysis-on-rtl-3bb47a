// syndrome_cell: one elementary syndrome block of a Reed-Solomon code.
//
// It evaluates the incoming word c(x) at the root alpha^ROOT_EXP of the
// generator polynomial by Horner's rule: with the symbols arriving highest
// degree first, the register D is updated as D <= D * alpha^ROOT_EXP + c_j.
// After the last symbol (degree 0) has been taken, s holds S = c(alpha^ROOT_EXP).
// The structure (adder on the input, register D, constant multiplier on the
// feedback) is the one of the document's syndrome block; the clear input
// that starts a new word and the reset are this design's choices.
//
// Interface: in a cycle with valid = 1 the symbol c is taken; if clear is
// also 1 the previous contents are dropped (c is the first symbol of a
// word). s is the register output, updated on the rising clock edge, so
// the syndrome of a word is available the cycle after its last symbol.
module syndrome_cell
  import gf256_pkg::*;
#(
  parameter int unsigned M        = 8,
  parameter int          ROOT_EXP = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         valid,
  input  logic [M-1:0] c,
  output logic [M-1:0] s
);

  localparam gf_t ROOT = alpha_pow(ROOT_EXP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      s <= '0;
    else if (valid)  s <= clear ? c : (gf_mul(s, ROOT) ^ c);
  end

  initial assert (M == GF_M) else $error("syndrome_cell: only GF(2^8) is supported");

endmodule
