// tb_timing_unit: programs the timing unit over the OPB as the
// fault-injection processor would and counts the rising edges that reach
// the UUT. A run to FT must deliver exactly FT edges and stop with the FT
// reached flag set; a second run to a larger FT resumes where the first
// stopped; a free run delivers one edge per clock until stopped; the UUT
// reset clears the cycle counter. The gated clock may only be high while
// the system clock is high.
module tb_timing_unit;
  logic clk = 0, rst_n = 1;

  // a real falling edge, so that the asynchronous resets are applied
  initial #1 rst_n = 0;
  logic uut_clk, uut_rst_n;
  logic [31:0] cycle;
  int checks = 0, failures = 0;
  int edges = 0;

  opb_if bus ();
  timing_unit dut (.clk, .rst_n, .opb(bus.slave), .uut_clk, .uut_rst_n, .cycle);

  always #5 clk = ~clk;
  always @(posedge uut_clk) edges++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
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

  always @(clk or uut_clk) if (uut_clk && !clk) begin
    failures++;
    $display("FAIL: glitch on uut_clk");
  end

  initial begin
    logic [31:0] d;
    bus.select = 0; bus.rnw = 0; bus.abus = 0; bus.dbus = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    #1;
    check(!uut_rst_n, "UUT held in reset after system reset");
    check(edges == 0, "no UUT clock after reset");
    // release UUT reset, run to FT = 37
    opb_write(32'h4000_0004, 37);
    opb_write(32'h4000_0000, 32'h4);
    check(uut_rst_n, "UUT reset released");
    repeat (60) @(posedge clk);
    #1;
    check(edges == 37, $sformatf("run to FT=37 gave %0d edges", edges));
    opb_read(32'h4000_0008, d);
    check(d == 37, $sformatf("CYCLE %0d", d));
    opb_read(32'h4000_000C, d);
    check(d[1:0] == 2'b10, "status: FT reached, stopped");
    opb_read(32'h4000_0004, d);
    check(d == 37, "FT read back");
    // resume to FT = 100
    opb_write(32'h4000_0004, 100);
    opb_write(32'h4000_0000, 32'h4);
    opb_read(32'h4000_000C, d);
    check(d[1:0] == 2'b01, "status: running");
    repeat (100) @(posedge clk);
    #1;
    check(edges == 100 && cycle == 100, $sformatf("resumed run gave %0d edges", edges));
    // free run for a while, then stop
    opb_write(32'h4000_0000, 32'h2);
    repeat (50) @(posedge clk);
    #1;
    opb_write(32'h4000_0000, 32'h0);
    d = edges;
    check(edges >= 150 && edges <= 153, $sformatf("free run: %0d edges", edges));
    repeat (20) @(posedge clk);
    #1;
    check(edges == int'(d), "stopped clock stays stopped");
    check(cycle == 32'(edges), "CYCLE counts delivered edges");
    // UUT reset
    opb_write(32'h4000_0000, 32'h1);
    repeat (2) @(posedge clk);
    #1;
    check(!uut_rst_n && cycle == 0, "UUT reset clears CYCLE");
    opb_read(32'h4000_0000, d);
    check(d == 1, "CTRL read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
