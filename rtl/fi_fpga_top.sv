// fi_fpga_top: FPGA side of the fault-injection system.
//
// Two OPB slaves share the bus: the timing unit, which owns the clock and
// reset of the unit under test, and the UUT wrapper, which holds the
// self-checking RS(255,239) decoder with its pattern and capture memory.
// The bus master (the processor that runs the campaign) and the
// configuration access port it uses to read and flip the UUT's flip-flops
// are outside this module: the OPB master signals come in as ports and the
// slaves' acknowledges and read data, zero when a slave is not addressed,
// are ORed onto the outgoing ports, as on the OPB. uut_clk, uut_rst_n and
// the per-word verdict are brought out for monitoring.
//
// Address map: timing unit at TU_BASE (16 bytes), UUT wrapper at UUT_BASE
// (64 KiB). Each transfer is acknowledged one cycle after select rises.
module fi_fpga_top #(
  parameter logic [31:0] TU_BASE  = 32'h4000_0000,
  parameter logic [31:0] UUT_BASE = 32'h4001_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        OPB_select,
  input  logic        OPB_RNW,
  input  logic [31:0] OPB_ABus,
  input  logic [31:0] OPB_DBus,
  output logic        Sl_xferAck,
  output logic [31:0] Sl_DBus,
  output logic        uut_clk,
  output logic        uut_rst_n,
  output logic [31:0] uut_cycle,
  output logic        det_valid,
  output logic        fault_detected
);

  opb_if tu_bus ();
  opb_if uut_bus ();

  assign tu_bus.select  = OPB_select;
  assign tu_bus.rnw     = OPB_RNW;
  assign tu_bus.abus    = OPB_ABus;
  assign tu_bus.dbus    = OPB_DBus;
  assign uut_bus.select = OPB_select;
  assign uut_bus.rnw    = OPB_RNW;
  assign uut_bus.abus   = OPB_ABus;
  assign uut_bus.dbus   = OPB_DBus;

  assign Sl_xferAck = tu_bus.xfer_ack | uut_bus.xfer_ack;
  assign Sl_DBus    = tu_bus.sl_dbus  | uut_bus.sl_dbus;

  timing_unit #(.ADDR_BASE(TU_BASE)) u_tu (
    .clk       (clk),
    .rst_n     (rst_n),
    .opb       (tu_bus.slave),
    .uut_clk   (uut_clk),
    .uut_rst_n (uut_rst_n),
    .cycle     (uut_cycle)
  );

  uut_wrapper #(.ADDR_BASE(UUT_BASE)) u_uut (
    .clk                (clk),
    .rst_n              (rst_n),
    .opb                (uut_bus.slave),
    .uut_clk            (uut_clk),
    .uut_rst_n          (uut_rst_n),
    .dbg_det_valid      (det_valid),
    .dbg_fault_detected (fault_detected)
  );

endmodule
