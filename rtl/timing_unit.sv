// timing_unit: drives the clock and reset of the unit under test (UUT).
//
// The fault-injection processor uses it to reset the UUT, to let it run,
// and to run it up to a chosen clock cycle FT and stop there, so that a
// flip-flop can be read and flipped at exactly that cycle before the run
// is resumed. That is the document's function for this unit; the register
// map below and the way the clock is stopped are this design's choices.
//
// OPB registers (word offsets from ADDR_BASE):
//   0x0 CTRL   bit0 UUT reset (1 holds the UUT in reset, also clears CYCLE)
//              bit1 RUN: free run
//              bit2 RUN_TO_FT: run while CYCLE < FT, then stop (cleared then)
//   0x4 FT     fault injection time, in UUT clock cycles
//   0x8 CYCLE  read only: UUT clock edges since the UUT reset
//   0xC STATUS read only: bit0 UUT clock running, bit1 FT reached
// Clock: uut_clk = clk AND an enable re-timed on the falling edge of clk,
// so it has no glitches and its rising edges are those of clk. A rising
// edge reaches the UUT in clock cycle i+1 when the enable was high in
// cycle i; CYCLE counts those edges. uut_rst_n is low while the system
// reset is low or the CTRL reset bit is set.
module timing_unit #(
  parameter logic [31:0] ADDR_BASE = 32'h4000_0000,
  parameter int unsigned CNT_W     = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  opb_if.slave        opb,
  output logic        uut_clk,
  output logic        uut_rst_n,
  output logic [CNT_W-1:0] cycle
);

  typedef struct packed {
    logic run_to_ft;
    logic run;
    logic uut_reset;
  } ctrl_t;

  ctrl_t             ctrl;
  logic [CNT_W-1:0]  ft;
  logic              reached;
  logic              en, en_n;
  logic              hit;
  logic [1:0]        reg_sel;

  assign hit     = opb.select && (opb.abus[31:4] == ADDR_BASE[31:4]);
  assign reg_sel = opb.abus[3:2];
  assign en      = !ctrl.uut_reset && (ctrl.run || (ctrl.run_to_ft && cycle < ft));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl         <= '{uut_reset: 1'b1, default: 1'b0};
      ft           <= '0;
      cycle        <= '0;
      reached      <= 1'b0;
      opb.xfer_ack <= 1'b0;
      opb.sl_dbus  <= '0;
    end else begin
      // UUT clock counting and stop at FT
      if (ctrl.uut_reset)  cycle <= '0;
      else if (en)         cycle <= cycle + 1'b1;
      if (ctrl.run_to_ft && !ctrl.uut_reset && cycle >= ft) begin
        ctrl.run_to_ft <= 1'b0;
        reached        <= 1'b1;
      end
      // OPB slave: one acknowledge per selected transfer
      opb.xfer_ack <= hit && !opb.xfer_ack;
      opb.sl_dbus  <= '0;
      if (hit && !opb.xfer_ack) begin
        if (opb.rnw) begin
          unique case (reg_sel)
            2'd0: opb.sl_dbus <= 32'(ctrl);
            2'd1: opb.sl_dbus <= 32'(ft);
            2'd2: opb.sl_dbus <= 32'(cycle);
            2'd3: opb.sl_dbus <= {30'b0, reached, en};
            default: ;
          endcase
        end else begin
          unique case (reg_sel)
            2'd0: begin
              ctrl <= ctrl_t'(opb.dbus[2:0]);
              if (opb.dbus[2]) reached <= 1'b0;
            end
            2'd1: ft <= CNT_W'(opb.dbus);
            default: ;
          endcase
        end
      end
    end
  end

  // glitch-free clock gate: enable changes only while clk is low
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_n <= 1'b0;
    else        en_n <= en;
  end

  assign uut_clk   = clk & en_n;
  assign uut_rst_n = rst_n && !ctrl.uut_reset;

endmodule
