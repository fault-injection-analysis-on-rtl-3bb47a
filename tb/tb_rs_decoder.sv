// tb_rs_decoder: self-checking test of the RS(255,239) decoder.
//
// Random messages are encoded by the reference encoder of tb_rs_pkg,
// corrupted with 0..8 random symbol errors (and a few words with 12 errors,
// beyond the correction capability) and fed to the decoder, mostly back to
// back at one symbol per cycle and sometimes with idle gaps. Every output
// symbol is compared with the original codeword and its error value with
// the injected error; out_fail must be low on correctable words and high on
// the over-loaded ones. The test also checks the latency of the first word
// (28 cycles from last input to first output) and that a stream of words is
// decoded at one symbol per cycle. At N = 255 stage B always finishes long
// before the next word is complete, so in_ready never drops here.
module tb_rs_decoder;
  import tb_rs_pkg::*;

  localparam int N = 255, K = 239, T = 8;

  logic clk = 0, rst_n = 1;

  // a real falling edge, so that the asynchronous resets are applied
  initial #1 rst_n = 0;
  logic in_valid, in_ready;
  logic [7:0] in_data;
  logic out_valid, out_first, out_last, out_fail;
  logic [7:0] out_data, out_err;

  int checks = 0, failures = 0;
  int cycle = 0;

  rs_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // expected words
  word_t exp_cw[$];
  word_t exp_rx[$];
  bit    exp_fail[$];
  int    words_out = 0;
  int    stalls = 0;
  int    last_in_cycle[$];
  int    first_latency = -1;

  // ---------------- driver ----------------
  localparam int NWORDS = 24;
  int nerr_list[NWORDS];
  int total_start, total_end;

  initial begin
    tables_init();
    for (int w = 0; w < NWORDS; w++) nerr_list[w] = (w <= T) ? w : $urandom_range(0, T);
    nerr_list[12] = 12;
    nerr_list[20] = 12;
    in_valid = 0;
    in_data  = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    total_start = cycle;
    for (int w = 0; w < NWORDS; w++) begin
      word_t msg, cw, rx;
      msg = random_word(K);
      cw  = encode(msg, N - K, 0);
      rx  = add_errors(cw, nerr_list[w]);
      exp_cw.push_back(cw);
      exp_rx.push_back(rx);
      exp_fail.push_back(nerr_list[w] > T);
      // a few gaps inside and between words
      if (w == 5 || w == 6) begin
        in_valid <= 0;
        repeat (7) @(posedge clk);
      end
      for (int i = 0; i < N; i++) begin
        in_valid <= 1;
        in_data  <= rx[i];
        if (w == 7 && i == 100) begin
          in_valid <= 0;
          repeat (3) @(posedge clk);
          in_valid <= 1;
        end
        @(posedge clk);
        while (!in_ready) begin
          stalls++;
          @(posedge clk);
        end
      end
      last_in_cycle.push_back(cycle);
    end
    in_valid <= 0;
  end

  // ---------------- monitor ----------------
  int  pos = 0;
  word_t cur_cw, cur_rx;
  bit  cur_fail;
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && out_valid) begin
        if (pos == 0) begin
          check(out_first, "out_first missing");
          check(exp_cw.size() > 0, "output without input");
          cur_cw = exp_cw.pop_front();
          cur_rx = exp_rx.pop_front();
          cur_fail = exp_fail.pop_front();
          if (words_out == 0) first_latency = cycle - last_in_cycle[0];
        end else begin
          check(!out_first, "spurious out_first");
        end
        if (!cur_fail) begin
          check(out_data == cur_cw[pos],
                $sformatf("word %0d sym %0d data %h exp %h", words_out, pos, out_data, cur_cw[pos]));
          check(out_err == (cur_rx[pos] ^ cur_cw[pos]),
                $sformatf("word %0d sym %0d err %h exp %h", words_out, pos, out_err, cur_rx[pos] ^ cur_cw[pos]));
        end
        check((out_data ^ out_err) == cur_rx[pos], "out_data ^ out_err != received");
        if (pos == N - 1) begin
          check(out_last, "out_last missing");
          check(out_fail == cur_fail,
                $sformatf("word %0d out_fail %0d exp %0d", words_out, out_fail, cur_fail));
          pos = 0;
          words_out++;
          if (words_out == NWORDS) total_end = cycle;
        end else begin
          check(!out_last, "spurious out_last");
          pos++;
        end
      end
    end
  end

  initial begin
    wait (words_out == NWORDS);
    repeat (5) @(posedge clk);
    check(first_latency == 28, $sformatf("first word latency %0d, expected 28", first_latency));
    // 24 words of 255 symbols in, 17 idle driver cycles, the latency and the
    // last word's 255 output cycles: one symbol per cycle, no lost cycles
    check(total_end - total_start <= NWORDS * N + 17 + 28 + N + stalls,
          $sformatf("throughput: %0d cycles, %0d stalls", total_end - total_start, stalls));
    $display("words=%0d stalls=%0d latency=%0d cycles=%0d", words_out, stalls, first_latency,
             total_end - total_start);
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
