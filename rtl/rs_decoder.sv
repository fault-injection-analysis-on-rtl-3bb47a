// rs_decoder: Reed-Solomon RS(N,K) decoder over GF(2^8), t = (N-K)/2 = 8
// symbol errors corrected per word with the defaults RS(255,239).
//
// The document only states what the decoder does (correct up to t errors,
// give the corrected codeword and the error polynomial); the architecture
// is this design's choice, the plainest standard one, in three stages that
// work on consecutive words at the same time:
//   A  input: the received word r(x) arrives one symbol per cycle, highest
//      degree first. It is written into a two-word buffer while 2T syndrome
//      cells (S_j = r(alpha^(FCR+j))) evaluate it.
//   B  key equation: Berlekamp-Massey, one iteration per cycle (2T cycles),
//      gives the error locator Lambda(x); the same discrepancy datapath then
//      gives the error evaluator Omega(x) = S(x)Lambda(x) mod x^T, one
//      coefficient per cycle (T cycles).
//   C  correction: Chien search over the positions N-1 .. 0 and Forney's
//      formula e = X^-FCR * Omega(X^-1) / Lambda_odd(X^-1), one symbol per
//      cycle, while the buffered symbol is read back and corrected.
// A word is accepted in N cycles while the previous one is corrected, so
// the decoder keeps up with one symbol per cycle. If stage B still holds
// the previous word when the last symbol of the next one arrives, in_ready
// is held low on that symbol (a stall) until B hands its word to C.
//
// Interface: in_valid/in_ready handshake on in_data; every N accepted
// symbols form one word. The output has no back-pressure: out_valid is high
// for N consecutive cycles per word, out_first/out_last mark its ends,
// out_data is the corrected symbol and out_err the error value removed
// from it. out_fail, valid with out_last, reports a word the decoder could
// not correct (locator degree above T or fewer roots than its degree); its
// symbols are then unreliable. Latency from the last input symbol to the
// first output symbol is 28 cycles when stage C is free.
module rs_decoder
  import gf256_pkg::*;
#(
  parameter int unsigned M   = 8,
  parameter int unsigned N   = 255,
  parameter int unsigned K   = 239,
  parameter int unsigned T   = (N - K) / 2,
  parameter int unsigned FCR = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] in_data,
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last,
  output logic [M-1:0] out_data,
  output logic [M-1:0] out_err,
  output logic         out_fail
);

  localparam int unsigned R    = 2 * T;           // number of syndromes
  localparam int unsigned AW   = $clog2(N);       // symbol address width
  localparam int unsigned CW   = $clog2(N + 1);
  localparam int unsigned LW   = $clog2(R + 2);    // width of the locator length L

  // ------------------------------------------------------------------
  // Stage A: input, syndromes, word buffer
  // ------------------------------------------------------------------
  logic [M-1:0]  buf_mem [2**(AW+1)];
  logic [AW-1:0] in_cnt;
  logic          in_buf;
  logic          take, take_last;
  logic [M-1:0]  syn_c [R];
  logic          kes_busy;
  logic          kes_start;
  logic          kes_buf_next;

  assign in_ready  = !((in_cnt == AW'(N - 1)) && kes_busy);
  assign take      = in_valid && in_ready;
  assign take_last = take && (in_cnt == AW'(N - 1));

  for (genvar j = 0; j < R; j++) begin : g_syn
    syndrome_cell #(.M(M), .ROOT_EXP(FCR + j)) u_syn (
      .clk   (clk),
      .rst_n (rst_n),
      .clear (in_cnt == '0),
      .valid (take),
      .c     (in_data),
      .s     (syn_c[j])
    );
  end

  always_ff @(posedge clk) begin
    if (take) buf_mem[{in_buf, in_cnt}] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt       <= '0;
      in_buf       <= 1'b0;
      kes_start    <= 1'b0;
      kes_buf_next <= 1'b0;
    end else begin
      kes_start <= take_last;
      if (take) begin
        if (take_last) begin
          in_cnt       <= '0;
          in_buf       <= ~in_buf;
          kes_buf_next <= in_buf;
        end else begin
          in_cnt <= in_cnt + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // Stage B: Berlekamp-Massey and error evaluator
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {K_IDLE, K_BM, K_OMEGA, K_HAND} kes_state_t;
  kes_state_t    kst;
  logic [M-1:0]  syn   [R];
  logic [M-1:0]  lam   [T+1];
  logic [M-1:0]  bx    [T+1];     // x^m * B(x) of the textbook algorithm
  logic [M-1:0]  omega [T];
  logic [M-1:0]  bden;            // last non-zero discrepancy b
  logic [LW-1:0] len;             // L
  logic [LW-1:0] step;            // r during BM, k during OMEGA
  logic          kes_buf;
  logic [M-1:0]  disc;            // sum_i lam_i * S_(step-i)
  logic [M-1:0]  dq;              // disc / b
  logic          lchange;
  logic          chien_free;

  always_comb begin
    disc = '0;
    for (int i = 0; i <= T; i++) begin
      if (int'(step) >= i && int'(step) - i < R)
        disc = disc ^ gf_mul(lam[i], syn[int'(step) - i]);
    end
  end

  assign dq      = gf_mul(disc, gf_inv(bden));
  assign lchange = (disc != '0) && ({1'b0, len} << 1) <= {1'b0, step};
  assign kes_busy = (kst != K_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kst     <= K_IDLE;
      step    <= '0;
      len     <= '0;
      bden    <= '0;
      kes_buf <= 1'b0;
      for (int j = 0; j < R; j++) syn[j] <= '0;
      for (int i = 0; i <= T; i++) begin
        lam[i] <= '0;
        bx[i]  <= '0;
      end
      for (int i = 0; i < T; i++) omega[i] <= '0;
    end else begin
      unique case (kst)
        K_IDLE: if (kes_start) begin
          for (int j = 0; j < R; j++) syn[j] <= syn_c[j];
          for (int i = 0; i <= T; i++) begin
            lam[i] <= (i == 0) ? M'(1) : '0;
            bx[i]  <= (i == 1) ? M'(1) : '0;
          end
          bden    <= M'(1);
          len     <= '0;
          step    <= '0;
          kes_buf <= kes_buf_next;
          kst     <= K_BM;
        end
        K_BM: begin
          if (disc != '0)
            for (int i = 0; i <= T; i++) lam[i] <= lam[i] ^ gf_mul(dq, bx[i]);
          bx[0] <= '0;
          for (int i = 1; i <= T; i++) bx[i] <= lchange ? lam[i-1] : bx[i-1];
          if (lchange) begin
            len  <= LW'(step + 1'b1 - len);
            bden <= disc;
          end
          if (step == LW'(R - 1)) begin
            step <= '0;
            kst  <= K_OMEGA;
          end else begin
            step <= step + 1'b1;
          end
        end
        K_OMEGA: begin
          for (int i = 0; i < T; i++) if (step == LW'(i)) omega[i] <= disc;
          if (step == LW'(T - 1)) kst <= K_HAND;
          else                    step <= step + 1'b1;
        end
        K_HAND: if (chien_free) kst <= K_IDLE;
        default: kst <= K_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // Stage C: Chien search, Forney, correction
  // ------------------------------------------------------------------
  logic          c_act;
  logic [AW-1:0] c_cnt;
  logic          c_buf;
  logic [M-1:0]  lt [T+1];        // lam_i * X^-i at the current position
  logic [M-1:0]  ot [T];          // omega_i * X^-i
  logic [M-1:0]  xf;              // X^-FCR
  logic [LW-1:0] c_len;
  logic [CW-1:0] c_roots;
  logic [M-1:0]  lam_sum, lam_odd, om_sum, e_now;
  logic          is_root;
  logic          c_load;
  // pipeline register between the search and the output
  logic          p_valid, p_first, p_last, p_fail;
  logic [M-1:0]  p_err, p_rd;

  // Chien constants: X^-i at position N-1, and the step alpha^i per position
  gf_t           lt_init [T+1];
  gf_t           lt_step [T+1];
  for (genvar i = 0; i <= T; i++) begin : g_const
    assign lt_init[i] = alpha_pow(-i * int'(N - 1));
    assign lt_step[i] = alpha_pow(i);
  end
  localparam gf_t XF_INIT = alpha_pow(-int'(FCR) * int'(N - 1));
  localparam gf_t XF_STEP = alpha_pow(int'(FCR));

  assign chien_free = !c_act || (c_cnt == AW'(N - 1));
  assign c_load     = (kst == K_HAND) && chien_free;

  always_comb begin
    lam_sum = '0;
    lam_odd = '0;
    om_sum  = '0;
    for (int i = 0; i <= T; i++) begin
      lam_sum = lam_sum ^ lt[i];
      if (i % 2 == 1) lam_odd = lam_odd ^ lt[i];
    end
    for (int i = 0; i < T; i++) om_sum = om_sum ^ ot[i];
  end

  assign is_root = (lam_sum == '0);
  assign e_now   = is_root ? gf_mul(gf_mul(om_sum, gf_inv(lam_odd)), xf) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_act   <= 1'b0;
      c_cnt   <= '0;
      c_buf   <= 1'b0;
      c_len   <= '0;
      c_roots <= '0;
      xf      <= '0;
      for (int i = 0; i <= T; i++) lt[i] <= '0;
      for (int i = 0; i < T; i++)  ot[i] <= '0;
      p_valid <= 1'b0;
      p_first <= 1'b0;
      p_last  <= 1'b0;
      p_fail  <= 1'b0;
      p_err   <= '0;
    end else begin
      // output pipeline register
      p_valid <= c_act;
      p_first <= c_act && (c_cnt == '0);
      p_last  <= c_act && (c_cnt == AW'(N - 1));
      p_err   <= c_act ? e_now : '0;
      p_fail  <= c_act && (c_cnt == AW'(N - 1)) &&
                 ((c_len > LW'(T)) ||
                  (CW'(c_len) != c_roots + CW'(is_root)));
      if (c_load) begin
        // start at position N-1: X^-1 = alpha^-(N-1)
        for (int i = 0; i <= T; i++) lt[i] <= gf_mul(lam[i], lt_init[i]);
        for (int i = 0; i < T; i++)  ot[i] <= gf_mul(omega[i], lt_init[i]);
        xf      <= XF_INIT;
        c_len   <= len;
        c_roots <= '0;
        c_buf   <= kes_buf;
        c_cnt   <= '0;
        c_act   <= 1'b1;
      end else if (c_act) begin
        for (int i = 0; i <= T; i++) lt[i] <= gf_mul(lt[i], lt_step[i]);
        for (int i = 0; i < T; i++)  ot[i] <= gf_mul(ot[i], lt_step[i]);
        xf      <= gf_mul(xf, XF_STEP);
        c_roots <= c_roots + CW'(is_root);
        c_cnt   <= c_cnt + 1'b1;
        if (c_cnt == AW'(N - 1)) c_act <= 1'b0;
      end
    end
  end

  // synchronous read of the buffered received symbol
  always_ff @(posedge clk) begin
    p_rd <= buf_mem[{c_buf, c_cnt}];
  end

  assign out_valid = p_valid;
  assign out_first = p_first;
  assign out_last  = p_last;
  assign out_err   = p_err;
  assign out_data  = p_rd ^ p_err;
  assign out_fail  = p_fail;

  initial assert (M == GF_M && N <= 255 && N > K && (N - K) % 2 == 0)
    else $error("rs_decoder: unsupported code parameters");

endmodule
