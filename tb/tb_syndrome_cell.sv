// tb_syndrome_cell: checks two syndrome cells (roots alpha^1 and alpha^3)
// against the direct syndrome sums of tb_rs_pkg, over random words of
// 255 symbols sent back to back (the clear input restarts each word) and
// with idle cycles inside a word.
module tb_syndrome_cell;
  import tb_rs_pkg::*;

  logic clk = 0, rst_n = 1;

  // a real falling edge, so that the asynchronous resets are applied
  initial #1 rst_n = 0;
  logic clear, valid;
  logic [7:0] c, s1, s3;
  int checks = 0, failures = 0;

  syndrome_cell #(.ROOT_EXP(1)) u1 (.clk, .rst_n, .clear, .valid, .c, .s(s1));
  syndrome_cell #(.ROOT_EXP(3)) u3 (.clk, .rst_n, .clear, .valid, .c, .s(s3));

  always #5 clk = ~clk;

  initial begin
    word_t w;
    tables_init();
    clear = 0; valid = 0; c = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      w = random_word(255);
      if (k == 3) foreach (w[i]) w[i] = 0;
      for (int i = 0; i < 255; i++) begin
        if (k % 4 == 1 && i % 17 == 5) begin
          valid <= 0;
          @(posedge clk);
        end
        valid <= 1;
        clear <= (i == 0);
        c     <= w[i];
        @(posedge clk);
      end
      valid <= 0;
      clear <= 0;
      @(posedge clk);
      #1;
      checks += 2;
      if (s1 !== syndrome(w, 1, 0)) begin failures++; $display("S1 %h exp %h", s1, syndrome(w, 1, 0)); end
      if (s3 !== syndrome(w, 3, 0)) begin failures++; $display("S3 %h exp %h", s3, syndrome(w, 3, 0)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
