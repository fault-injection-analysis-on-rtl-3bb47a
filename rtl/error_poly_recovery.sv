// error_poly_recovery: rebuilds the error polynomial e(x) = r(x) + c(x)
// from outside the decoder.
//
// Every received symbol that enters the decoder is also written into a
// shift register; each time the decoder emits an output symbol the oldest
// stored symbol is taken out and XORed with it. The register is built as a
// circular buffer (write and read pointers) rather than a fixed-length
// delay line, so the two streams stay aligned whatever the decoder's
// latency and stalls; that, and the depth, are this design's choices. The
// depth must cover every symbol between decoder input and output: with the
// rs_decoder that is two words plus its latency, so sc_rs_decoder sets it
// to 2N+64. The XOR structure is the document's.
//
// Interface: in_valid/in_data is the received stream as accepted by the
// decoder; dec_valid/dec_data the decoder's output stream. e_data is
// combinational and belongs to the cycle in which dec_valid is high.
// overflow and underflow are sticky error flags (more symbols in flight than
// DEPTH, or an output symbol with nothing stored); with a large enough
// DEPTH they cannot occur.
module error_poly_recovery #(
  parameter int unsigned M     = 8,
  parameter int unsigned DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [M-1:0] in_data,
  input  logic         dec_valid,
  input  logic [M-1:0] dec_data,
  output logic [M-1:0] e_data,
  output logic         overflow,
  output logic         underflow
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [M-1:0] sr [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   fill;

  assign e_data = sr[rp] ^ dec_data;

  always_ff @(posedge clk) begin
    if (in_valid) sr[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      rp        <= '0;
      fill      <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (in_valid)  wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (dec_valid) rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      fill <= fill + (PW+1)'(in_valid) - (PW+1)'(dec_valid);
      if (in_valid && !dec_valid && fill == (PW+1)'(DEPTH)) overflow  <= 1'b1;
      if (dec_valid && !in_valid && fill == '0)              underflow <= 1'b1;
    end
  end

endmodule
