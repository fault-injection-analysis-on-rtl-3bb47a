// tb_seu_campaign: a random single-event-upset campaign on the
// self-checking decoder, reporting how often each syndrome element and
// each check detects an activated fault.
//
// The same two received words (5 and 8 channel errors) are decoded in
// every run. Each run resets the unit, picks a random fault time in the
// window where the words are being decoded and a random data flip-flop of
// the decoder (word buffer, syndrome, locator, evaluator, Chien and output
// registers), flips it, and compares the outputs with the correct words. A
// run whose outputs differ is an activated fault. For each activated fault
// the test records which of S0..S15 were non-zero on the faulty word, and
// whether the full scheme, S1 alone, S1 with S3, and the Hamming counter
// alone flagged it. Since a wrong codeword lies at least 2t+1 symbols from
// the right one, the full scheme must flag every activated fault; that is
// checked for every run. Control flip-flops (counters, state) are not
// targets: flipping them can desynchronise the word framing, which is
// outside what the two properties cover.
//
// The flow (reset, random fault time and location, one bit flip, compare
// against the golden words, silent or wrong answer) and the per-element
// tally follow the source's second campaign. Its size, the choice of
// targets and the two fixed words are this bench's own. Flips are done by
// hierarchical writes to the decoder's registers rather than through a
// configuration port. Outputs are sampled on the falling clock edge. A
// watchdog ends the run if it hangs.
module tb_seu_campaign;
  import tb_rs_pkg::*;

  localparam int N = 255, K = 239, NRUNS = 1500;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [7:0] in_data = 0;
  logic ov, of, ol, fail, dv, fd, p1, p2;
  logic [7:0] od, oe;
  logic [31:0] cnt;
  logic [7:0] syn [16];
  logic [15:0] nz;
  logic [7:0] wt;

  sc_rs_decoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(ov), .out_first(of), .out_last(ol), .out_data(od), .out_err(oe), .out_fail(fail),
    .det_valid(dv), .fault_detected(fd), .prop1_violated(p1), .prop2_violated(p2), .det_count(cnt),
    .syndromes(syn), .syn_nonzero(nz), .weight(wt));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int activated = 0, det_full = 0, det_s1 = 0, det_s13 = 0, det_ham = 0, n_p1 = 0, n_p2 = 0;
  int per_elem [16];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  word_t cw [2], rx [2];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // flip one random data flip-flop of the decoder
  task automatic inject();
    int kind, j, b;
    kind = $urandom_range(0, 9);
    b    = $urandom_range(0, 7);
    case (kind)
      0, 1, 2: begin
        j = $urandom_range(0, 511);
        dut.u_dec.buf_mem[j][b] = ~dut.u_dec.buf_mem[j][b];
      end
      3: begin j = $urandom_range(0, 15); dut.u_dec.syn[j][b]   = ~dut.u_dec.syn[j][b];   end
      4: begin j = $urandom_range(0, 8);  dut.u_dec.lam[j][b]   = ~dut.u_dec.lam[j][b];   end
      5: begin j = $urandom_range(0, 8);  dut.u_dec.bx[j][b]    = ~dut.u_dec.bx[j][b];    end
      6: begin j = $urandom_range(0, 7);  dut.u_dec.omega[j][b] = ~dut.u_dec.omega[j][b]; end
      7: begin j = $urandom_range(0, 8);  dut.u_dec.lt[j][b]    = ~dut.u_dec.lt[j][b];    end
      8: begin j = $urandom_range(0, 7);  dut.u_dec.ot[j][b]    = ~dut.u_dec.ot[j][b];    end
      default: dut.u_dec.p_err[b] = ~dut.u_dec.p_err[b];
    endcase
  endtask

  initial begin
    tables_init();
    foreach (per_elem[j]) per_elem[j] = 0;
    for (int w = 0; w < 2; w++) begin
      cw[w] = encode(random_word(K), N - K, 0);
      rx[w] = add_errors(cw[w], w == 0 ? 5 : 8);
    end
    for (int run = 0; run < NRUNS; run++) begin
      int ft, t0, nsym, nver;
      bit bad [2];
      bit wflag [2], ws1 [2], ws13 [2], wham [2], wp1 [2], wp2 [2];
      logic [15:0] wnz [2];
      bit injected;
      rst_n = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      ft = $urandom_range(1, 790);
      t0 = cyc;
      nsym = 0; nver = 0; injected = 0;
      bad[0] = 0; bad[1] = 0;
      // feed both words and watch the outputs, all in one loop
      for (int c = 0; c < 900 && nver < 2; c++) begin
        in_valid = (c < 2 * N);
        in_data  = (c < 2 * N) ? rx[c / N][c % N] : 8'h00;
        if (c == ft) begin
          inject();
          injected = 1;
        end
        // sample in mid-cycle, where the checkers see the values too
        @(negedge clk);
        if (ov) begin
          if (nsym < 2 * N && od != cw[nsym / N][nsym % N]) bad[nsym / N] = 1;
          nsym++;
        end
        if (dv && nver < 2) begin
          wflag[nver] = fd;
          wp1[nver]   = p1;
          wp2[nver]   = p2;
          wnz[nver]   = nz;
          ws1[nver]   = nz[1];
          ws13[nver]  = nz[1] || nz[3];
          wham[nver]  = (wt > 8);
          nver++;
        end
        @(posedge clk);
        #1;
      end
      check(injected && nsym == 2 * N && nver == 2, $sformatf("run %0d: incomplete (%0d symbols, %0d verdicts)", run, nsym, nver));
      for (int w = 0; w < 2; w++) begin
        if (bad[w]) begin
          activated++;
          check(wflag[w], $sformatf("run %0d word %0d: activated fault not detected", run, w));
          det_full += wflag[w];
          det_s1   += ws1[w];
          det_s13  += ws13[w];
          det_ham  += wham[w];
          n_p1     += wp1[w];
          n_p2     += wp2[w];
          for (int j = 0; j < 16; j++) per_elem[j] += wnz[w][j];
        end else begin
          check(!wflag[w], $sformatf("run %0d word %0d: correct word flagged", run, w));
        end
      end
    end
    $display("runs=%0d activated=%0d detected: full=%0d S1=%0d S1+S3=%0d hamming=%0d (property1=%0d property2=%0d)",
             NRUNS, activated, det_full, det_s1, det_s13, det_ham, n_p1, n_p2);
    for (int j = 0; j < 16; j++) $display("  S%0d detected %0d", j, per_elem[j]);
    check(activated > 0, "no fault was activated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * NRUNS * 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
