// tb_hamming_weight_counter: words of 255 error symbols with a known
// number of non-zero symbols (0..20, so on both sides of t = 8) are sent
// back to back and with gaps; weight and too_heavy must match and done
// must pulse once per word, one cycle after the last symbol.
module tb_hamming_weight_counter;
  logic clk = 0, rst_n = 1;

  // a real falling edge, so that the asynchronous resets are applied
  initial #1 rst_n = 0;
  logic in_valid, in_first, in_last, done, too_heavy;
  logic [7:0] in_err;
  logic [7:0] weight;
  int checks = 0, failures = 0;

  hamming_weight_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_err = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      int wt;
      bit mark[255];
      wt = (k < 21) ? k : $urandom_range(0, 255);
      foreach (mark[i]) mark[i] = 0;
      for (int e = 0; e < wt; e++) begin
        int p;
        do p = $urandom_range(0, 254); while (mark[p]);
        mark[p] = 1;
      end
      for (int i = 0; i < 255; i++) begin
        if (k % 5 == 2 && i == 77) begin
          in_valid = 0;
          @(posedge clk);
          #1;
        end
        in_valid = 1;
        in_first = (i == 0);
        in_last  = (i == 254);
        in_err   = mark[i] ? 8'($urandom_range(1, 255)) : 8'h00;
        @(posedge clk);
        #1;
        if (i != 254) check(!done, "done too early");
      end
      in_valid = 0;
      in_last  = 0;
      check(done, "done missing");
      check(weight == 8'(wt), $sformatf("k %0d weight %0d exp %0d", k, weight, wt));
      check(too_heavy == (wt > 8), "too_heavy");
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
