// tb_error_poly_recovery: the received stream enters with random gaps and
// the "decoder" stream leaves later, also with random gaps; each output
// symbol is a random value. Every recovered e_data must equal the matching
// received symbol XOR the output symbol, in order, and the sticky
// overflow/underflow flags must stay low.
module tb_error_poly_recovery;
  logic clk = 0, rst_n = 1;

  // a real falling edge, so that the asynchronous resets are applied
  initial #1 rst_n = 0;
  logic in_valid, dec_valid, overflow, underflow;
  logic [7:0] in_data, dec_data, e_data;
  int checks = 0, failures = 0;
  logic [7:0] sent[$];
  int n_in = 0, n_out = 0;

  error_poly_recovery dut (.*);

  always #5 clk = ~clk;

  initial begin
    in_valid = 0; dec_valid = 0; in_data = 0; dec_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic v_in, v_out;
      v_in  = (n_in < 2000) && ($urandom_range(0, 3) != 0);
      v_out = (sent.size() > 300 || (n_in >= 2000 && sent.size() > 0)) && ($urandom_range(0, 3) != 0);
      in_valid  = v_in;
      in_data   = 8'($urandom);
      dec_valid = v_out;
      dec_data  = 8'($urandom);
      #1;
      if (v_out) begin
        logic [7:0] r;
        r = sent.pop_front();
        checks++;
        if (e_data !== (r ^ dec_data)) begin
          failures++;
          if (failures < 10) $display("FAIL: e %h exp %h", e_data, r ^ dec_data);
        end
        n_out++;
      end
      if (v_in) begin
        sent.push_back(in_data);
        n_in++;
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (overflow || underflow || n_out < 1500) begin
      failures++;
      $display("FAIL: flags %b %b, %0d symbols out", overflow, underflow, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
