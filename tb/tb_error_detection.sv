// tb_error_detection: all combinations of the two checker results, on an
// instance with the Hamming counter (USE_HAMMING = 1) and one without;
// the verdict, its classification and the running count of flagged words
// are compared with the expected truth table.
module tb_error_detection;
  logic clk = 0, rst_n = 1;

  // a real falling edge, so that the asynchronous resets are applied
  initial #1 rst_n = 0;
  logic done, ncw, heavy;
  logic dv1, f1, p1a, p2a, dv0, f0, p1b, p2b;
  logic [31:0] cnt1, cnt0;
  int checks = 0, failures = 0;
  int exp1 = 0, exp0 = 0;

  error_detection #(.USE_HAMMING(1'b1)) u1 (.clk, .rst_n, .cw_done(done), .not_codeword(ncw), .hw_done(done),
    .too_heavy(heavy), .det_valid(dv1), .fault_detected(f1), .prop1_violated(p1a), .prop2_violated(p2a), .det_count(cnt1));
  error_detection #(.USE_HAMMING(1'b0)) u0 (.clk, .rst_n, .cw_done(done), .not_codeword(ncw), .hw_done(done),
    .too_heavy(heavy), .det_valid(dv0), .fault_detected(f0), .prop1_violated(p1b), .prop2_violated(p2b), .det_count(cnt0));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    done = 0; ncw = 0; heavy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      bit a, b;
      a = k[0]; b = k[1];
      done <= 1; ncw <= a; heavy <= b;
      @(posedge clk);
      done <= 0; ncw <= 0; heavy <= 0;
      #1;
      check(dv1 && dv0, "det_valid");
      check(f1 == (a || b) && p1a == a && p2a == (b && !a), $sformatf("with Hamming, ncw=%0d heavy=%0d", a, b));
      check(f0 == a && p1b == a && p2b == 0, $sformatf("without Hamming, ncw=%0d heavy=%0d", a, b));
      exp1 += (a || b);
      exp0 += a;
      check(cnt1 == 32'(exp1) && cnt0 == 32'(exp0), "det_count");
      @(posedge clk);
      #1;
      check(!dv1 && !dv0, "det_valid is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
