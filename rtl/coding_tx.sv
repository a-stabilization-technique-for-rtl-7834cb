// coding_tx: one stacked-supply test chip, from SRAM to the output pads.
//
// The SRAM's 8-bit words can leave the chip in four ways, chosen by mode (coding_pkg::mode_e):
//   MODE_RAW           pad[7:0] = data, pad[9:8] = 0
//   MODE_BUS_INV       pad[8] = invert line, pad[7:0] = data or ~data (bus_invert_enc), pad[9] = 0
//   MODE_8B10B         pad[9:0] = 8B/10B code word (enc_8b10b)
//   MODE_8B10B_TOGGLE  the 8B/10B code word's ones are sent as line toggles (toggle_tx)
// The last mode is the point of the design: every word then switches 4 to 6 of the ten I/O
// buffers and the running disparity keeps the total at 5 per word to within one, so the
// supply current of a chip no longer depends on its data. Two such chips stacked in series
// between the supply rails then draw equal current, and the node between them stays put.
//
// Timing: a read (re high, we low) at rising edge k registers the SRAM word; the coded word
// is registered onto pad at edge k+1, with pad_valid high for that cycle. One word per
// clock can be streamed. Between words the pads hold, so they do not switch.
// The mode input and line assignment for the non-toggle modes, and pad_valid, are this
// design's own choices; the coder chain (SRAM, 8B/10B, toggle flip-flops, 10 lines)
// follows the described chip.
module coding_tx
  import coding_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mode_e             mode,
  input  logic              we,
  input  logic              re,
  input  logic [ADDR_W-1:0] addr,
  input  logic [7:0]        wdata,
  output logic [9:0]        pad,
  output logic              pad_valid
);

  logic [7:0] rdata;
  logic       word_valid;       // rdata holds a freshly read word this cycle
  logic [8:0] bi_code;
  logic [9:0] enc_code;
  logic [9:0] code;

  sram #(.DATA_W(8), .ADDR_W(ADDR_W)) u_sram (
    .clk   (clk),
    .we    (we),
    .re    (re),
    .addr  (addr),
    .wdata (wdata),
    .rdata (rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) word_valid <= 1'b0;
    else        word_valid <= re && !we;
  end

  bus_invert_enc #(.DATA_W(8)) u_bus_inv (
    .data     (rdata),
    .bus_prev (pad[7:0]),
    .code     (bi_code)
  );

  enc_8b10b u_enc (
    .clk   (clk),
    .rst_n (rst_n),
    .valid (word_valid && (mode == MODE_8B10B || mode == MODE_8B10B_TOGGLE)),
    .data  (rdata),
    .code  (enc_code),
    .rd    ()
  );

  always_comb begin
    unique case (mode)
      MODE_RAW:     code = {2'b00, rdata};
      MODE_BUS_INV: code = {1'b0, bi_code};
      default:      code = enc_code;
    endcase
  end

  toggle_tx #(.W(10)) u_toggle (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid     (word_valid),
    .toggle_en (mode == MODE_8B10B_TOGGLE),
    .code      (code),
    .lines     (pad)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pad_valid <= 1'b0;
    else        pad_valid <= word_valid;
  end

endmodule
