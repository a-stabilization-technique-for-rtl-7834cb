// coding_rx: receiver for the ten lines of one chip.
//
// In MODE_8B10B_TOGGLE the lines first pass toggle_rx, which turns each line transition
// back into a 1, and the recovered code word goes to dec_10b8b. In MODE_8B10B the lines
// are the code word. In MODE_BUS_INV the byte is lines[7:0] XORed with the invert line
// lines[8]; in MODE_RAW it is lines[7:0]. The mode must match the transmitter's.
//
// Timing: a word on pad with pad_valid high at rising edge k gives data, data_valid and
// the error flags from edge k onwards for one cycle (one output register). The toggle and
// 10B/8B path follows the described receiver; the other modes' recovery and the error
// flags are this design's additions, made so every transmitter mode can be checked.
module coding_rx
  import coding_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mode_e      mode,
  input  logic [9:0] pad,
  input  logic       pad_valid,
  output logic [7:0] data,
  output logic       data_valid,
  output logic       code_err,
  output logic       disp_err
);

  logic [9:0] code;
  logic [7:0] dec_data;
  logic       dec_code_err, dec_disp_err;
  logic       is_8b10b;
  logic [7:0] byte_d;

  assign is_8b10b = (mode == MODE_8B10B) || (mode == MODE_8B10B_TOGGLE);

  toggle_rx #(.W(10)) u_toggle (
    .clk       (clk),
    .rst_n     (rst_n),
    .toggle_en (mode == MODE_8B10B_TOGGLE),
    .lines     (pad),
    .code      (code)
  );

  dec_10b8b u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid    (pad_valid && is_8b10b),
    .code     (code),
    .data     (dec_data),
    .code_err (dec_code_err),
    .disp_err (dec_disp_err)
  );

  always_comb begin
    unique case (mode)
      MODE_RAW:     byte_d = code[7:0];
      MODE_BUS_INV: byte_d = code[7:0] ^ {8{code[8]}};
      default:      byte_d = dec_data;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data       <= '0;
      data_valid <= 1'b0;
      code_err   <= 1'b0;
      disp_err   <= 1'b0;
    end else begin
      data_valid <= pad_valid;
      if (pad_valid) begin
        data     <= byte_d;
        code_err <= is_8b10b && dec_code_err;
        disp_err <= is_8b10b && dec_disp_err;
      end else begin
        code_err <= 1'b0;
        disp_err <= 1'b0;
      end
    end
  end

endmodule
