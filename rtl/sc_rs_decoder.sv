// sc_rs_decoder: self-checking Reed-Solomon decoder.
//
// The RS(N,K) decoder is surrounded by checkers that rely only on two
// properties of a fault-free decoder: its output is always a codeword, and
// it never changes more than t symbols of the received word. The codeword
// checker computes the syndromes of the output word; the error polynomial
// recovery block XORs the received word, kept in a shift register, with
// the output word, and the Hamming weight counter counts its non-zero
// symbols; error detection combines both into a per-word fault verdict.
// This is the document's scheme. SYN_MASK chooses the syndrome elements that
// are built (all 16 by default; the document's reduced proposal is S1 and S3,
// 16'h000A), USE_HAMMING drops the recovery block and the Hamming counter,
// and USE_RECOVERY = 0 feeds the Hamming counter with the decoder's own
// error output instead of the recovered one.
//
// Interface: in_valid/in_ready/in_data is the received stream (highest
// degree first, N symbols per word). The corrected stream out_* leaves one
// symbol per cycle (latency 28 cycles after a word's last symbol).
// det_valid pulses two cycles after out_last with the verdict of that word;
// syndromes, syn_nonzero and weight belong to it in that same cycle.
module sc_rs_decoder #(
  parameter int unsigned    M            = 8,
  parameter int unsigned    N            = 255,
  parameter int unsigned    K            = 239,
  parameter int unsigned    T            = (N - K) / 2,
  parameter int unsigned    FCR          = 0,
  parameter logic [2*T-1:0] SYN_MASK     = '1,
  parameter bit             USE_HAMMING  = 1'b1,
  parameter bit             USE_RECOVERY = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [M-1:0]           in_data,
  output logic                   out_valid,
  output logic                   out_first,
  output logic                   out_last,
  output logic [M-1:0]           out_data,
  output logic [M-1:0]           out_err,
  output logic                   out_fail,
  output logic                   det_valid,
  output logic                   fault_detected,
  output logic                   prop1_violated,
  output logic                   prop2_violated,
  output logic [31:0]            det_count,
  output logic [M-1:0]           syndromes [2*T],
  output logic [2*T-1:0]         syn_nonzero,
  output logic [$clog2(N+1)-1:0] weight
);

  // symbols in flight between decoder input and output: two words plus the
  // decoder latency, with margin
  localparam int unsigned REC_DEPTH = 2 * N + 64;

  logic         cw_done, not_codeword;
  logic         hw_done, too_heavy;
  logic [M-1:0] dec_err, rec_err;
  logic [M-1:0] syn_q [2*T];
  logic [2*T-1:0] nz_q;
  logic [M-1:0] syn_hold [2*T];
  logic [2*T-1:0] nz_q_hold;

  rs_decoder #(.M(M), .N(N), .K(K), .T(T), .FCR(FCR)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_data   (in_data),
    .out_valid (out_valid),
    .out_first (out_first),
    .out_last  (out_last),
    .out_data  (out_data),
    .out_err   (dec_err),
    .out_fail  (out_fail)
  );

  codeword_checker #(.M(M), .T(T), .FCR(FCR), .SYN_MASK(SYN_MASK)) u_cw (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (out_valid),
    .in_first     (out_first),
    .in_last      (out_last),
    .in_data      (out_data),
    .done         (cw_done),
    .syndromes    (syn_q),
    .syn_nonzero  (nz_q),
    .not_codeword (not_codeword)
  );

  if (USE_HAMMING) begin : g_hamming
    logic ovf, unf;
    if (USE_RECOVERY) begin : g_rec
      error_poly_recovery #(.M(M), .DEPTH(REC_DEPTH)) u_rec (
        .clk       (clk),
        .rst_n     (rst_n),
        .in_valid  (in_valid && in_ready),
        .in_data   (in_data),
        .dec_valid (out_valid),
        .dec_data  (out_data),
        .e_data    (rec_err),
        .overflow  (ovf),
        .underflow (unf)
      );
    end else begin : g_norec
      assign rec_err = dec_err;
      assign ovf = 1'b0;
      assign unf = 1'b0;
    end
    hamming_weight_counter #(.M(M), .N(N), .T(T)) u_hw (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (out_valid),
      .in_first  (out_first),
      .in_last   (out_last),
      .in_err    (rec_err),
      .done      (hw_done),
      .weight    (weight),
      .too_heavy (too_heavy)
    );
    a_no_slip: assert property (@(posedge clk) disable iff (!rst_n) !(ovf || unf));
  end else begin : g_nohamming
    assign rec_err   = dec_err;
    assign hw_done   = cw_done;
    assign too_heavy = 1'b0;
    assign weight    = '0;
  end

  assign out_err = rec_err;

  error_detection #(.USE_HAMMING(USE_HAMMING)) u_det (
    .clk            (clk),
    .rst_n          (rst_n),
    .cw_done        (cw_done),
    .not_codeword   (not_codeword),
    .hw_done        (hw_done),
    .too_heavy      (too_heavy),
    .det_valid      (det_valid),
    .fault_detected (fault_detected),
    .prop1_violated (prop1_violated),
    .prop2_violated (prop2_violated),
    .det_count      (det_count)
  );

  // syndrome vector and flags held with the verdict
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nz_q_hold <= '0;
      for (int j = 0; j < 2*T; j++) syn_hold[j] <= '0;
    end else if (cw_done) begin
      nz_q_hold <= nz_q;
      for (int j = 0; j < 2*T; j++) syn_hold[j] <= syn_q[j];
    end
  end

  assign syndromes   = syn_hold;
  assign syn_nonzero = nz_q_hold;

endmodule
