// tb_fi_fpga_top: a fault-injection campaign on the whole FPGA design, with
// this testbench in the role of the processor (OPB master) and of the
// configuration port (it reads and flips UUT flip-flops directly).
//
// Three received RS(255,239) words (0, 5 and 8 channel errors) are loaded
// into the UUT pattern memory. A golden run resets the UUT, runs it to the
// end through the timing unit and reads the outputs and verdicts back; they
// must equal the encoded words with no fault flagged. Then, for each
// injected fault: reset the UUT, run it to the fault time FT and check it
// stopped exactly there, read a flip-flop and write back its opposite
// value, run to the end, read back and classify the run as silent (outputs
// equal the golden ones) or wrong answer. A wrong answer must be flagged by
// the self-checking decoder in the verdict of the word that went wrong, and
// a silent run must not be flagged. Two extra runs aim at a word still
// waiting in the decoder buffer (one SEU, and a change by a whole codeword)
// so that both property 1 and property 2 detections happen. Every
// mechanism (UUT reset, stop at FT, resume, silent, wrong answer, property
// 1, property 2) is counted and must occur at least once.
module tb_fi_fpga_top;
  import tb_rs_pkg::*;

  localparam int NW = 3, NSYM = NW * 255, FT_END = 1150, NF = 14;
  localparam logic [31:0] TU = 32'h4000_0000, UUT = 32'h4001_0000;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic OPB_select = 0, OPB_RNW = 0;
  logic [31:0] OPB_ABus = 0, OPB_DBus = 0;
  logic Sl_xferAck;
  logic [31:0] Sl_DBus;
  logic uut_clk, uut_rst_n, det_valid, fault_detected;
  logic [31:0] uut_cycle;

  fi_fpga_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reset = 0, n_stop = 0, n_silent = 0, n_wrong = 0, n_p1 = 0, n_p2 = 0, n_golden = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic opb_write(logic [31:0] a, logic [31:0] d);
    OPB_select = 1; OPB_RNW = 0; OPB_ABus = a; OPB_DBus = d;
    do @(posedge clk); while (!Sl_xferAck);
    #1;
    OPB_select = 0;
  endtask

  task automatic opb_read(logic [31:0] a, output logic [31:0] d);
    OPB_select = 1; OPB_RNW = 1; OPB_ABus = a; OPB_DBus = 0;
    do @(posedge clk); while (!Sl_xferAck);
    d = Sl_DBus;
    #1;
    OPB_select = 0;
  endtask

  task automatic uut_reset();
    opb_write(TU + 0, 32'h1);
    n_reset++;
  endtask

  // run the UUT up to clock cycle ft and wait until it has stopped there
  task automatic run_to(int ft);
    logic [31:0] st;
    opb_write(TU + 4, 32'(ft));
    opb_write(TU + 0, 32'h4);
    do opb_read(TU + 12, st); while (!st[1]);
    opb_read(TU + 8, st);
    check(st == 32'(ft), $sformatf("stopped at %0d, FT %0d", st, ft));
    if (st == 32'(ft)) n_stop++;
  endtask

  logic [31:0] outs [NSYM];
  logic [31:0] dets [NW];

  task automatic read_back();
    logic [31:0] d;
    opb_read(UUT + 4, d);
    check(d == NSYM, $sformatf("OUT_CNT %0d", d));
    opb_read(UUT + 8, d);
    check(d == NW, $sformatf("DET_CNT %0d", d));
    for (int i = 0; i < NSYM; i++) opb_read(UUT + 32'h8000 + 4 * i, outs[i]);
    for (int w = 0; w < NW; w++)   opb_read(UUT + 32'hC000 + 4 * w, dets[w]);
  endtask

  // compare with the golden run; returns the per-word mismatch flags
  function automatic logic [NW-1:0] compare(logic [31:0] g [NSYM]);
    logic [NW-1:0] bad = '0;
    for (int i = 0; i < NSYM; i++) if (outs[i][7:0] != g[i][7:0]) bad[i / 255] = 1;
    return bad;
  endfunction

  task automatic classify(logic [31:0] g [NSYM], string what);
    logic [NW-1:0] bad;
    bad = compare(g);
    if (bad == 0) begin
      n_silent++;
      for (int w = 0; w < NW; w++) check(!dets[w][0], $sformatf("%s: silent run flagged", what));
    end else begin
      n_wrong++;
      for (int w = 0; w < NW; w++) begin
        if (bad[w]) begin
          check(dets[w][0], $sformatf("%s: wrong word %0d not detected", what, w));
          if (dets[w][1]) n_p1++;
          if (dets[w][2]) n_p2++;
        end
      end
    end
  endtask

  logic [31:0] golden [NSYM];

  initial begin
    word_t cw[NW], rx[NW];
    int nerr[NW];
    tables_init();
    nerr[0] = 0; nerr[1] = 5; nerr[2] = 8;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // pre-running: load the test pattern
    for (int w = 0; w < NW; w++) begin
      cw[w] = encode(random_word(239), 16, 0);
      rx[w] = add_errors(cw[w], nerr[w]);
      for (int i = 0; i < 255; i++) opb_write(UUT + 32'h4000 + 4 * (w * 255 + i), 32'(rx[w][i]));
    end
    opb_write(UUT + 0, NSYM);
    // golden run
    uut_reset();
    run_to(FT_END);
    read_back();
    for (int i = 0; i < NSYM; i++) begin
      golden[i] = outs[i];
      check(outs[i][7:0] == cw[i / 255][i % 255], $sformatf("golden symbol %0d", i));
    end
    for (int w = 0; w < NW; w++) begin
      check(dets[w][3:0] == 4'b0, $sformatf("golden verdict of word %0d", w));
      check(dets[w][27:20] == 8'(nerr[w]), "golden weight");
    end
    n_golden++;
    // campaign: random fault time and location
    for (int f = 0; f < NF; f++) begin
      int ft, kind, a, b, j;
      string what;
      ft   = $urandom_range(1, 1000);
      kind = f % 4;
      b    = $urandom_range(0, 7);
      uut_reset();
      run_to(ft);
      case (kind)
        0: begin
          a = $urandom_range(0, 511);
          dut.u_uut.u_core.u_dec.buf_mem[a][b] = ~dut.u_uut.u_core.u_dec.buf_mem[a][b];
          what = $sformatf("FT %0d buffer[%0d].%0d", ft, a, b);
        end
        1: begin
          j = $urandom_range(0, 15);
          dut.u_uut.u_core.u_dec.syn[j][b] = ~dut.u_uut.u_core.u_dec.syn[j][b];
          what = $sformatf("FT %0d syndrome register %0d.%0d", ft, j, b);
        end
        2: begin
          j = $urandom_range(0, 8);
          dut.u_uut.u_core.u_dec.lt[j][b] = ~dut.u_uut.u_core.u_dec.lt[j][b];
          what = $sformatf("FT %0d Chien register %0d.%0d", ft, j, b);
        end
        default: begin
          j = $urandom_range(0, 7);
          dut.u_uut.u_core.u_dec.omega[j][b] = ~dut.u_uut.u_core.u_dec.omega[j][b];
          what = $sformatf("FT %0d evaluator register %0d.%0d", ft, j, b);
        end
      endcase
      run_to(FT_END);
      read_back();
      classify(golden, what);
    end
    // aimed SEU: word 0 is waiting in buffer 0 at cycle 256
    uut_reset();
    run_to(256);
    dut.u_uut.u_core.u_dec.buf_mem[200][3] = ~dut.u_uut.u_core.u_dec.buf_mem[200][3];
    run_to(FT_END);
    read_back();
    classify(golden, "aimed SEU");
    // aimed change by a whole codeword: the output is a wrong codeword
    uut_reset();
    run_to(256);
    begin
      word_t d;
      d = encode(random_word(239), 16, 0);
      for (int i = 0; i < 255; i++)
        dut.u_uut.u_core.u_dec.buf_mem[i] = dut.u_uut.u_core.u_dec.buf_mem[i] ^ d[i];
    end
    run_to(FT_END);
    read_back();
    classify(golden, "codeword change");
    check(dets[0][2:0] == 3'b101, "codeword change seen as property 2");
    begin
      logic [31:0] fl;
      opb_read(UUT + 32'h10, fl);
      check(fl == 1, $sformatf("FLAGGED %0d after the codeword change", fl));
    end

    $display("golden=%0d resets=%0d stops=%0d silent=%0d wrong=%0d prop1=%0d prop2=%0d",
             n_golden, n_reset, n_stop, n_silent, n_wrong, n_p1, n_p2);
    check(n_golden > 0 && n_reset > 0 && n_stop > 0, "campaign control exercised");
    check(n_silent > 0, "a silent fault");
    check(n_wrong > 0, "a wrong answer");
    check(n_p1 > 0, "a property 1 detection");
    check(n_p2 > 0, "a property 2 detection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
