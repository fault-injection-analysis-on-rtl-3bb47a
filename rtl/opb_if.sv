// opb_if: the slave side of an On-chip Peripheral Bus (OPB) transfer, the
// bundle shared by the timing unit and the UUT wrapper.
//
// Only the signals these slaves need are carried: the master's select,
// read-not-write, address and write data, and the slave's transfer
// acknowledge and read data. A slave acknowledges a selected transfer with
// a one-cycle xfer_ack; it drives sl_dbus with read data in that cycle and
// with zeros otherwise, so the responses of several slaves can be ORed.
// The document only names the bus; this subset and the fixed one-cycle wait
// state are this design's choices.
interface opb_if;
  logic        select;
  logic        rnw;
  logic [31:0] abus;
  logic [31:0] dbus;
  logic        xfer_ack;
  logic [31:0] sl_dbus;

  modport slave  (input select, rnw, abus, dbus, output xfer_ack, sl_dbus);
  modport master (output select, rnw, abus, dbus, input xfer_ack, sl_dbus);
endinterface
