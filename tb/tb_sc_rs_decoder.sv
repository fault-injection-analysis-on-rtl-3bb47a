// tb_sc_rs_decoder: self-checking decoder with faults injected inside the
// decoder.
//
// Two units get the same received words: the full scheme (16 syndromes and
// the Hamming weight counter) and the reduced one (S1 and S3 only, no
// Hamming counter). Words carry 0..8 channel errors. Some words are hit,
// after they are stored and before they are corrected, by
//   - a single bit flip in the decoder's word buffer (an SEU): the output is
//     no longer a codeword, and both schemes must flag property 1;
//   - a change of the stored word by a whole non-zero codeword: the output
//     is a wrong codeword, the full scheme must flag property 2 and the
//     reduced one cannot see it.
// Outputs are compared symbol by symbol with the expected (possibly wrong)
// words, fault-free words must never be flagged, and the syndrome vector
// and weight reported with each verdict are compared with the reference.
module tb_sc_rs_decoder;
  import tb_rs_pkg::*;

  localparam int N = 255, K = 239;

  logic clk = 0, rst_n = 1;

  // a real falling edge, so that the asynchronous resets are applied
  initial #1 rst_n = 0;
  logic in_valid;
  logic [7:0] in_data;
  logic rdy_f, rdy_r;
  logic ov_f, of_f, ol_f, fail_f, dv_f, fd_f, p1_f, p2_f;
  logic ov_r, of_r, ol_r, fail_r, dv_r, fd_r, p1_r, p2_r;
  logic [7:0] od_f, oe_f, od_r, oe_r;
  logic [31:0] cnt_f, cnt_r;
  logic [7:0] syn_f [16];
  logic [7:0] syn_r [16];
  logic [15:0] nz_f, nz_r;
  logic [7:0] wt_f, wt_r;

  int checks = 0, failures = 0;
  int n_clean = 0, n_corrected = 0, n_prop1 = 0, n_prop2 = 0, n_red_miss = 0;

  sc_rs_decoder u_full (
    .clk, .rst_n, .in_valid, .in_ready(rdy_f), .in_data,
    .out_valid(ov_f), .out_first(of_f), .out_last(ol_f), .out_data(od_f), .out_err(oe_f), .out_fail(fail_f),
    .det_valid(dv_f), .fault_detected(fd_f), .prop1_violated(p1_f), .prop2_violated(p2_f), .det_count(cnt_f),
    .syndromes(syn_f), .syn_nonzero(nz_f), .weight(wt_f));

  sc_rs_decoder #(.SYN_MASK(16'h000A), .USE_HAMMING(1'b0)) u_red (
    .clk, .rst_n, .in_valid, .in_ready(rdy_r), .in_data,
    .out_valid(ov_r), .out_first(of_r), .out_last(ol_r), .out_data(od_r), .out_err(oe_r), .out_fail(fail_r),
    .det_valid(dv_r), .fault_detected(fd_r), .prop1_violated(p1_r), .prop2_violated(p2_r), .det_count(cnt_r),
    .syndromes(syn_r), .syn_nonzero(nz_r), .weight(wt_r));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  typedef enum int {F_NONE, F_SEU, F_CODEWORD} fault_t;
  word_t  q_out[$];   // expected output word
  word_t  q_rx[$];    // received word
  fault_t q_kind[$];
  int     q_nerr[$];

  localparam int NWORDS = 24;

  initial begin
    tables_init();
    in_valid = 0;
    in_data  = 0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    for (int w = 0; w < NWORDS; w++) begin
      word_t cw, rx, outw, d;
      fault_t kind;
      int nerr, idx, bitpos;
      nerr = $urandom_range(0, 8);
      if (w == 0) nerr = 0;
      kind = fault_t'(w % 3);
      cw = encode(random_word(K), N - K, 0);
      rx = add_errors(cw, nerr);
      outw = new[N](cw);
      for (int i = 0; i < N; i++) begin
        in_valid = 1;
        in_data  = rx[i];
        @(posedge clk);
        #1;
        check(rdy_f && rdy_r, "no stall expected at N = 255");
      end
      in_valid = 0;
      // the word now sits in buffer (w % 2) of both decoders
      if (kind == F_SEU) begin
        idx    = $urandom_range(100, 254);
        bitpos = $urandom_range(0, 7);
        outw[idx] = outw[idx] ^ (8'h01 << bitpos);
        u_full.u_dec.buf_mem[(w % 2) * 256 + idx][bitpos] = ~u_full.u_dec.buf_mem[(w % 2) * 256 + idx][bitpos];
        u_red.u_dec.buf_mem[(w % 2) * 256 + idx][bitpos]  = ~u_red.u_dec.buf_mem[(w % 2) * 256 + idx][bitpos];
      end else if (kind == F_CODEWORD) begin
        d = encode(random_word(K), N - K, 0);
        for (int i = 0; i < N; i++) begin
          outw[i] = outw[i] ^ d[i];
          u_full.u_dec.buf_mem[(w % 2) * 256 + i] = u_full.u_dec.buf_mem[(w % 2) * 256 + i] ^ d[i];
          u_red.u_dec.buf_mem[(w % 2) * 256 + i]  = u_red.u_dec.buf_mem[(w % 2) * 256 + i] ^ d[i];
        end
      end
      q_out.push_back(outw);
      q_rx.push_back(rx);
      q_kind.push_back(kind);
      q_nerr.push_back(nerr);
      // mostly back to back, sometimes with a long pause
      if (w % 4 == 3) begin
        repeat (300) @(posedge clk);
        #1;
      end
    end
  end

  // output and verdict monitor
  int pos = 0, words_done = 0;
  word_t cur_out, cur_rx;
  fault_t cur_kind;
  int cur_nerr;
  word_t  v_out[$], v_rx[$];
  fault_t v_kind[$];
  int     v_nerr[$];
  initial begin
    forever begin
      @(posedge clk);
      #1;
      if (ov_f) begin
        if (pos == 0) begin
          cur_out  = q_out.pop_front();
          cur_rx   = q_rx.pop_front();
          cur_kind = q_kind.pop_front();
          cur_nerr = q_nerr.pop_front();
        end
        check(od_f == cur_out[pos] && od_r == cur_out[pos],
              $sformatf("word %0d sym %0d out %h/%h exp %h", words_done, pos, od_f, od_r, cur_out[pos]));
        check(oe_f == (cur_rx[pos] ^ cur_out[pos]), "recovered e(x)");
        if (pos == N - 1) begin
          v_out.push_back(cur_out);
          v_rx.push_back(cur_rx);
          v_kind.push_back(cur_kind);
          v_nerr.push_back(cur_nerr);
        end
        pos = (pos == N - 1) ? 0 : pos + 1;
      end
      if (dv_f) begin
        int wexp;
        word_t vo, vr;
        fault_t vk;
        int vn;
        vo = v_out.pop_front();
        vr = v_rx.pop_front();
        vk = v_kind.pop_front();
        vn = v_nerr.pop_front();
        check(dv_r, "reduced verdict not aligned");
        wexp = 0;
        for (int i = 0; i < N; i++) wexp += (vr[i] != vo[i]);
        check(wt_f == 8'(wexp), $sformatf("weight %0d exp %0d", wt_f, wexp));
        for (int j = 0; j < 16; j++)
          check(syn_f[j] == syndrome(vo, j, 0), "reported syndrome");
        case (vk)
          F_NONE: begin
            check(!fd_f && !fd_r, "fault-free word flagged");
            if (vn == 0) n_clean++; else n_corrected++;
          end
          F_SEU: begin
            check(fd_f && p1_f && !p2_f, "SEU: full scheme must flag property 1");
            check(fd_r && p1_r, "SEU: reduced scheme must flag property 1");
            if (fd_f) n_prop1++;
          end
          F_CODEWORD: begin
            check(fd_f && !p1_f && p2_f, "wrong codeword: full scheme must flag property 2");
            check(!fd_r, "wrong codeword: reduced scheme cannot see it");
            if (p2_f) n_prop2++;
            if (!fd_r) n_red_miss++;
          end
          default: ;
        endcase
        words_done++;
      end
    end
  end

  initial begin
    wait (words_done == NWORDS);
    check(n_clean > 0 && n_corrected > 0, "fault-free words, with and without channel errors");
    check(n_prop1 > 0, "property 1 detection exercised");
    check(n_prop2 > 0, "property 2 detection exercised");
    check(cnt_f == 32'(n_prop1 + n_prop2), "det_count of the full scheme");
    $display("clean=%0d corrected=%0d prop1=%0d prop2=%0d reduced_missed=%0d",
             n_clean, n_corrected, n_prop1, n_prop2, n_red_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
