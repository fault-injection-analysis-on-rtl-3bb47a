// codeword_checker: tells whether a word is a codeword of RS(N,K), i.e.
// whether it is exactly divisible by the generator polynomial g(x).
//
// The word is evaluated at the 2T roots alpha^(FCR+j), j = 0..2T-1, of g(x)
// by 2T syndrome cells working in parallel on the symbol stream (highest
// degree first). The word is a codeword exactly when every syndrome is zero;
// a non-zero syndrome on the output of a decoder means the decoder gave a
// non-codeword (property 1 of a fault-free decoder is violated).
//
// SYN_MASK selects which of the 2T cells exist. All 16 is the configuration
// the document's experiments use; its reduced proposal keeps only S1 and S3
// (SYN_MASK = 16'h000A). Cells outside the mask are not built and read as 0.
//
// Timing: the stream is taken when in_valid = 1; in_first marks a word's
// first symbol and in_last its last. done pulses for one cycle after the
// cycle that took in_last, and in that cycle syndromes, syn_nonzero and
// not_codeword describe the word. A new word may start in that same cycle.
module codeword_checker
  import gf256_pkg::*;
#(
  parameter int unsigned   M        = 8,
  parameter int unsigned   T        = 8,
  parameter int unsigned   FCR      = 0,
  parameter logic [2*T-1:0] SYN_MASK = '1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_first,
  input  logic                in_last,
  input  logic [M-1:0]        in_data,
  output logic                done,
  output logic [M-1:0]        syndromes [2*T],
  output logic [2*T-1:0]      syn_nonzero,
  output logic                not_codeword
);

  for (genvar j = 0; j < 2*T; j++) begin : g_cell
    if (SYN_MASK[j]) begin : g_on
      syndrome_cell #(.M(M), .ROOT_EXP(FCR + j)) u_cell (
        .clk   (clk),
        .rst_n (rst_n),
        .clear (in_first),
        .valid (in_valid),
        .c     (in_data),
        .s     (syndromes[j])
      );
    end else begin : g_off
      assign syndromes[j] = '0;
    end
    assign syn_nonzero[j] = (syndromes[j] != '0);
  end

  assign not_codeword = done && (syn_nonzero != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= in_valid && in_last;
  end

endmodule
