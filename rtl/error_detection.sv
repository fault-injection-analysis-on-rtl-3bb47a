// error_detection: per-word verdict of the self-checking decoder.
//
// A word whose output is not a codeword (non-zero syndrome, property 1) or
// whose output differs from the received word in more than t symbols
// (property 2) reveals a fault inside the decoder. The verdict is the OR of
// the two checks; a word is classed as a property 2 violation only when it
// is a codeword, as in the document's classification. With USE_HAMMING = 0
// (the document's reduced scheme without the Hamming weight counter) the
// too_heavy input is ignored. The OR and the running count are this design's
// choices; the document does not draw the inside of this block.
//
// Timing: cw_done and hw_done come from checkers that follow the same
// stream and pulse in the same cycle; the verdict is registered, so
// det_valid pulses one cycle later with fault_detected, prop1_violated and
// prop2_violated. det_count counts the words flagged since reset.
module error_detection #(
  parameter bit USE_HAMMING = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cw_done,
  input  logic        not_codeword,
  input  logic        hw_done,
  input  logic        too_heavy,
  output logic        det_valid,
  output logic        fault_detected,
  output logic        prop1_violated,
  output logic        prop2_violated,
  output logic [31:0] det_count
);

  logic p1, p2;

  assign p1 = not_codeword;
  assign p2 = USE_HAMMING && too_heavy && !not_codeword;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_valid      <= 1'b0;
      fault_detected <= 1'b0;
      prop1_violated <= 1'b0;
      prop2_violated <= 1'b0;
      det_count      <= '0;
    end else begin
      det_valid <= cw_done;
      if (cw_done) begin
        fault_detected <= p1 || p2;
        prop1_violated <= p1;
        prop2_violated <= p2;
        if (p1 || p2) det_count <= det_count + 1'b1;
      end
    end
  end

  // both checkers end a word in the same cycle
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                              USE_HAMMING |-> (cw_done == hw_done));

endmodule
