// uut_wrapper: puts the self-checking RS decoder (the IP core) on the OPB
// and under the timing unit's clock and reset.
//
// The processor cannot feed the core one symbol per clock over the bus, so
// the wrapper holds an IP memory: a pattern memory the processor fills
// before a run, which the wrapper streams into the core at full rate, and
// capture memories that record every output symbol and every per-word
// verdict, which the processor reads back after the run and compares with
// the golden run. The document says only that the wrapper links the UUT's
// ports to the OPB and its clock and reset to the timing unit, and shows an
// IP memory next to the core; its organisation below is this design's.
//
// OPB map (byte offsets from ADDR_BASE, 32-bit words):
//   0x0000 IN_LEN   number of pattern symbols streamed per run (R/W)
//   0x0004 OUT_CNT  output symbols captured since the UUT reset (RO)
//   0x0008 DET_CNT  word verdicts captured since the UUT reset (RO)
//   0x000C FED      pattern symbols taken by the core (RO)
//   0x0010 FLAGGED  words flagged as faulty since the UUT reset (RO)
//   0x4000 + 4i     pattern symbol i (R/W, bits 7:0)
//   0x8000 + 4i     output symbol i: {out_err[15:8], out_data[7:0]} (RO)
//   0xC000 + 4i     verdict of word i (RO): bit0 fault_detected,
//                   bit1 property 1, bit2 property 2, bit3 decoder
//                   failure, bits 19:4 non-zero syndromes, 27:20 weight
// Clocking: everything that talks to the core runs on uut_clk and is reset
// by uut_rst_n; the OPB side runs on clk. The processor writes the pattern
// memory and reads the capture memories only while the UUT clock is stopped.
module uut_wrapper #(
  parameter logic [31:0] ADDR_BASE = 32'h4001_0000,
  parameter int unsigned IN_DEPTH  = 1024,
  parameter int unsigned OUT_DEPTH = 1024,
  parameter int unsigned DET_DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  opb_if.slave opb,
  input  logic uut_clk,
  input  logic uut_rst_n,
  output logic dbg_det_valid,
  output logic dbg_fault_detected
);

  localparam int unsigned M   = 8;
  localparam int unsigned IW  = $clog2(IN_DEPTH);
  localparam int unsigned OW  = $clog2(OUT_DEPTH);
  localparam int unsigned DW  = $clog2(DET_DEPTH);

  // ---------------- IP memory ----------------
  logic [M-1:0]  in_mem  [IN_DEPTH];
  logic [15:0]   out_mem [OUT_DEPTH];
  logic [27:0]   det_mem [DET_DEPTH];
  logic [IW:0]   in_len;

  // ---------------- UUT side ----------------
  logic          c_in_valid, c_in_ready;
  logic [M-1:0]  c_in_data;
  logic          c_out_valid, c_out_first, c_out_last, c_out_fail;
  logic [M-1:0]  c_out_data, c_out_err;
  logic          c_det_valid, c_fd, c_p1, c_p2;
  logic [31:0]   c_det_count;
  logic [M-1:0]  c_syn [16];
  logic [15:0]   c_nz;
  logic [7:0]    c_weight;
  logic          fail_seen;
  logic [IW:0]   fed;
  logic [OW:0]   out_cnt;
  logic [DW:0]   det_cnt;

  assign c_in_valid = (fed < in_len);
  assign c_in_data  = in_mem[fed[IW-1:0]];

  sc_rs_decoder u_core (
    .clk            (uut_clk),
    .rst_n          (uut_rst_n),
    .in_valid       (c_in_valid),
    .in_ready       (c_in_ready),
    .in_data        (c_in_data),
    .out_valid      (c_out_valid),
    .out_first      (c_out_first),
    .out_last       (c_out_last),
    .out_data       (c_out_data),
    .out_err        (c_out_err),
    .out_fail       (c_out_fail),
    .det_valid      (c_det_valid),
    .fault_detected (c_fd),
    .prop1_violated (c_p1),
    .prop2_violated (c_p2),
    .det_count      (c_det_count),
    .syndromes      (c_syn),
    .syn_nonzero    (c_nz),
    .weight         (c_weight)
  );

  always_ff @(posedge uut_clk or negedge uut_rst_n) begin
    if (!uut_rst_n) begin
      fed       <= '0;
      out_cnt   <= '0;
      det_cnt   <= '0;
      fail_seen <= 1'b0;
    end else begin
      if (c_in_valid && c_in_ready) fed <= fed + 1'b1;
      if (c_out_valid && out_cnt < (OW+1)'(OUT_DEPTH)) out_cnt <= out_cnt + 1'b1;
      if (c_out_valid && c_out_last) fail_seen <= c_out_fail;
      if (c_det_valid && det_cnt < (DW+1)'(DET_DEPTH)) det_cnt <= det_cnt + 1'b1;
    end
  end

  always_ff @(posedge uut_clk) begin
    if (c_out_valid && out_cnt < (OW+1)'(OUT_DEPTH))
      out_mem[out_cnt[OW-1:0]] <= {c_out_err, c_out_data};
    if (c_det_valid && det_cnt < (DW+1)'(DET_DEPTH))
      det_mem[det_cnt[DW-1:0]] <= {c_weight, c_nz, fail_seen, c_p2, c_p1, c_fd};
  end

  assign dbg_det_valid      = c_det_valid;
  assign dbg_fault_detected = c_fd;

  // ---------------- OPB side ----------------
  logic        hit;
  logic [1:0]  region;
  logic [13:0] woff;     // word offset inside a region

  assign hit    = opb.select && (opb.abus[31:16] == ADDR_BASE[31:16]);
  assign region = opb.abus[15:14];
  assign woff   = opb.abus[15:2] & 14'h0FFF;

  always_ff @(posedge clk) begin
    if (hit && !opb.xfer_ack && !opb.rnw && region == 2'd1)
      in_mem[woff[IW-1:0]] <= opb.dbus[M-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_len       <= '0;
      opb.xfer_ack <= 1'b0;
      opb.sl_dbus  <= '0;
    end else begin
      opb.xfer_ack <= hit && !opb.xfer_ack;
      opb.sl_dbus  <= '0;
      if (hit && !opb.xfer_ack) begin
        if (opb.rnw) begin
          unique case (region)
            2'd0: unique case (woff[2:0])
              3'd0: opb.sl_dbus <= 32'(in_len);
              3'd1: opb.sl_dbus <= 32'(out_cnt);
              3'd2: opb.sl_dbus <= 32'(det_cnt);
              3'd3: opb.sl_dbus <= 32'(fed);
              3'd4: opb.sl_dbus <= c_det_count;
              default: ;
            endcase
            2'd1: opb.sl_dbus <= 32'(in_mem[woff[IW-1:0]]);
            2'd2: opb.sl_dbus <= 32'(out_mem[woff[OW-1:0]]);
            2'd3: opb.sl_dbus <= 32'(det_mem[woff[DW-1:0]]);
            default: ;
          endcase
        end else if (region == 2'd0 && woff[2:0] == 3'd0) begin
          in_len <= opb.dbus[IW:0];
        end
      end
    end
  end

  initial assert (IN_DEPTH <= 4096 && OUT_DEPTH <= 4096 && DET_DEPTH <= 4096)
    else $error("uut_wrapper: a region holds at most 4096 words");

endmodule
