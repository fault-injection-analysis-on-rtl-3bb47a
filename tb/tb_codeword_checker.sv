// tb_codeword_checker: feeds codewords and corrupted codewords of
// RS(255,239) to two checkers, one with all 16 syndrome cells and one with
// only S1 and S3 (the reduced set), and compares not_codeword, the
// syndromes and their non-zero flags with the reference sums. Words follow
// each other without gaps, so the done cycle of one word is the first
// cycle of the next.
module tb_codeword_checker;
  import tb_rs_pkg::*;

  logic clk = 0, rst_n = 1;

  // a real falling edge, so that the asynchronous resets are applied
  initial #1 rst_n = 0;
  logic in_valid, in_first, in_last;
  logic [7:0] in_data;
  logic done_f, done_r, ncw_f, ncw_r;
  logic [7:0] syn_f [16];
  logic [7:0] syn_r [16];
  logic [15:0] nz_f, nz_r;
  int checks = 0, failures = 0;
  int words_checked = 0;

  codeword_checker u_full (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_data,
                           .done(done_f), .syndromes(syn_f), .syn_nonzero(nz_f), .not_codeword(ncw_f));
  codeword_checker #(.SYN_MASK(16'h000A)) u_red (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_data,
                           .done(done_r), .syndromes(syn_r), .syn_nonzero(nz_r), .not_codeword(ncw_r));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t q[$];

  // checker of results, in the done cycle
  initial begin
    word_t w;
    forever begin
      @(posedge clk);
      #1;
      if (done_f) begin
        bit any;
        w = q.pop_front();
        any = 0;
        for (int j = 0; j < 16; j++) begin
          logic [7:0] s;
          s = syndrome(w, j, 0);
          any |= (s != 0);
          check(syn_f[j] == s, $sformatf("word %0d S%0d %h exp %h", words_checked, j, syn_f[j], s));
          check(nz_f[j] == (s != 0), "syn_nonzero");
          check(syn_r[j] == ((j == 1 || j == 3) ? s : 8'h00), $sformatf("reduced S%0d", j));
        end
        check(ncw_f == any, "not_codeword (full)");
        check(ncw_r == (syndrome(w, 1, 0) != 0 || syndrome(w, 3, 0) != 0), "not_codeword (reduced)");
        check(done_r, "reduced done");
        words_checked++;
      end else begin
        check(!ncw_f && !done_r, "flags outside done");
      end
    end
  end

  initial begin
    word_t w;
    tables_init();
    in_valid = 0; in_first = 0; in_last = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 10; k++) begin
      w = encode(random_word(239), 16, 0);
      if (k % 2 == 1) w = add_errors(w, k);
      q.push_back(w);
      for (int i = 0; i < 255; i++) begin
        in_valid <= 1;
        in_first <= (i == 0);
        in_last  <= (i == 254);
        in_data  <= w[i];
        @(posedge clk);
      end
    end
    in_valid <= 0;
    in_last  <= 0;
    repeat (3) @(posedge clk);
    check(words_checked == 10, "number of words checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
