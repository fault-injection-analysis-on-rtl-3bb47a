// tb_uut_wrapper: loads two received RS(255,239) words (with 3 and 8
// channel errors) into the wrapper's pattern memory over the OPB, lets the
// UUT clock run, then reads back the counters, every captured output
// symbol and both word verdicts, and compares them with the encoded words,
// the injected errors and a fault-free verdict. The UUT clock and reset are
// driven here the way the timing unit drives them (a gated copy of clk).
module tb_uut_wrapper;
  import tb_rs_pkg::*;

  logic clk = 0, rst_n = 1;

  // a real falling edge, so that the asynchronous resets are applied
  initial #1 rst_n = 0;
  logic uut_en = 0, uut_en_n = 0, uut_rst_n = 1;
  initial #1 uut_rst_n = 0;
  logic uut_clk;
  logic dbg_det_valid, dbg_fault_detected;
  int checks = 0, failures = 0;
  int verdicts_seen = 0;

  opb_if bus ();
  uut_wrapper dut (.clk, .rst_n, .opb(bus.slave), .uut_clk, .uut_rst_n, .dbg_det_valid, .dbg_fault_detected);

  always #5 clk = ~clk;
  always @(negedge clk) uut_en_n <= uut_en;
  assign uut_clk = clk & uut_en_n;
  always @(posedge uut_clk) if (dbg_det_valid) verdicts_seen++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic opb_write(logic [31:0] a, logic [31:0] d);
    bus.select = 1; bus.rnw = 0; bus.abus = a; bus.dbus = d;
    do @(posedge clk); while (!bus.xfer_ack);
    #1;
    bus.select = 0;
  endtask

  task automatic opb_read(logic [31:0] a, output logic [31:0] d);
    bus.select = 1; bus.rnw = 1; bus.abus = a; bus.dbus = 0;
    do @(posedge clk); while (!bus.xfer_ack);
    d = bus.sl_dbus;
    #1;
    bus.select = 0;
  endtask

  initial begin
    word_t cw[2], rx[2];
    int nerr[2];
    logic [31:0] d;
    tables_init();
    nerr[0] = 3; nerr[1] = 8;
    bus.select = 0; bus.rnw = 0; bus.abus = 0; bus.dbus = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < 2; w++) begin
      cw[w] = encode(random_word(239), 16, 0);
      rx[w] = add_errors(cw[w], nerr[w]);
      for (int i = 0; i < 255; i++) opb_write(32'h4001_4000 + 4 * (w * 255 + i), 32'(rx[w][i]));
    end
    opb_write(32'h4001_0000, 510);
    opb_read(32'h4001_4000 + 4 * 300, d);
    check(d == 32'(rx[1][45]), "pattern memory read back");
    // run the UUT
    uut_rst_n = 1;
    uut_en = 1;
    repeat (900) @(posedge clk);
    #1;
    uut_en = 0;
    repeat (3) @(posedge clk);
    #1;
    opb_read(32'h4001_0004, d); check(d == 510, $sformatf("OUT_CNT %0d", d));
    opb_read(32'h4001_0008, d); check(d == 2, $sformatf("DET_CNT %0d", d));
    opb_read(32'h4001_000C, d); check(d == 510, $sformatf("FED %0d", d));
    opb_read(32'h4001_0000, d); check(d == 510, "IN_LEN read back");
    opb_read(32'h4001_0010, d); check(d == 0, "FLAGGED");
    for (int w = 0; w < 2; w++) begin
      for (int i = 0; i < 255; i++) begin
        opb_read(32'h4001_8000 + 4 * (w * 255 + i), d);
        check(d[7:0] == cw[w][i] && d[15:8] == (cw[w][i] ^ rx[w][i]) && d[31:16] == 0,
              $sformatf("output word %0d symbol %0d: %h", w, i, d));
      end
      opb_read(32'h4001_C000 + 4 * w, d);
      check(d[3:0] == 4'b0000, $sformatf("word %0d verdict %b", w, d[3:0]));
      check(d[19:4] == 16'h0, "syndromes of a corrected word");
      check(d[27:20] == 8'(nerr[w]), $sformatf("word %0d weight %0d", w, d[27:20]));
    end
    check(verdicts_seen == 2, "two verdicts seen on the monitor port");
    // UUT reset clears the pointers
    uut_rst_n = 0;
    repeat (2) @(posedge clk);
    #1;
    opb_read(32'h4001_0004, d); check(d == 0, "OUT_CNT cleared by UUT reset");
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
