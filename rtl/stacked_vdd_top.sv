// stacked_vdd_top: two test chips meant to be stacked in series on the supply, each with
// its receiver.
//
// The upper and lower chips (coding_tx) sit between 3.6 V and 0 V, one above the other,
// sharing the intermediate node at about 1.8 V. Their supply currents are equal only if
// their I/O buffers switch equally often; with mode MODE_8B10B_TOGGLE each chip switches
// 5 lines per word on average, to within one line in total, whatever data it sends, so the
// node needs no regulator. The power connection and the pad buffers are not logic: the
// pad line states of both chips are brought out (up_pad, lo_pad), and each chip's lines
// feed a receiver (coding_rx) that recovers the bytes.
//
// Both chips share the clock and the mode; each has its own SRAM access port. Latency:
// a read at edge k puts the word on the pads after edge k+1 and the recovered byte on
// *_data after edge k+2.
module stacked_vdd_top
  import coding_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mode_e             mode,
  // upper chip SRAM port
  input  logic              up_we,
  input  logic              up_re,
  input  logic [ADDR_W-1:0] up_addr,
  input  logic [7:0]        up_wdata,
  // lower chip SRAM port
  input  logic              lo_we,
  input  logic              lo_re,
  input  logic [ADDR_W-1:0] lo_addr,
  input  logic [7:0]        lo_wdata,
  // line states driven into the I/O buffers
  output logic [9:0]        up_pad,
  output logic              up_pad_valid,
  output logic [9:0]        lo_pad,
  output logic              lo_pad_valid,
  // receiver outputs
  output logic [7:0]        up_data,
  output logic              up_data_valid,
  output logic              up_code_err,
  output logic              up_disp_err,
  output logic [7:0]        lo_data,
  output logic              lo_data_valid,
  output logic              lo_code_err,
  output logic              lo_disp_err
);

  coding_tx #(.ADDR_W(ADDR_W)) u_upper_chip (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (mode),
    .we        (up_we),
    .re        (up_re),
    .addr      (up_addr),
    .wdata     (up_wdata),
    .pad       (up_pad),
    .pad_valid (up_pad_valid)
  );

  coding_tx #(.ADDR_W(ADDR_W)) u_lower_chip (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (mode),
    .we        (lo_we),
    .re        (lo_re),
    .addr      (lo_addr),
    .wdata     (lo_wdata),
    .pad       (lo_pad),
    .pad_valid (lo_pad_valid)
  );

  coding_rx u_upper_rx (
    .clk        (clk),
    .rst_n      (rst_n),
    .mode       (mode),
    .pad        (up_pad),
    .pad_valid  (up_pad_valid),
    .data       (up_data),
    .data_valid (up_data_valid),
    .code_err   (up_code_err),
    .disp_err   (up_disp_err)
  );

  coding_rx u_lower_rx (
    .clk        (clk),
    .rst_n      (rst_n),
    .mode       (mode),
    .pad        (lo_pad),
    .pad_valid  (lo_pad_valid),
    .data       (lo_data),
    .data_valid (lo_data_valid),
    .code_err   (lo_code_err),
    .disp_err   (lo_disp_err)
  );

endmodule
