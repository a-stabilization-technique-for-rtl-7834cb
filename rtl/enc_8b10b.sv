// enc_8b10b: 8B/10B encoder with running disparity.
//
// Converts each 8-bit word into a 10-bit DC-balanced code word (standard data characters
// D.x.y, tables in coding_pkg). Every code word has 4, 5 or 6 ones; an unbalanced word is
// chosen so that it pulls the running disparity back, so after n words the total number
// of ones is always 5n or 5n+1. That bound is what lets the toggle converter that follows
// give two chips the same number of line transitions whatever their data.
//
// Timing: code is combinational from data and the running-disparity register rd; when
// valid is high, rd advances on the rising edge. Reset sets RD- (rd = 0), as the standard
// does. Output bit order: code[9:0] = a b c d e i f g h j.
module enc_8b10b
  import coding_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic [9:0] code,
  output logic       rd
);

  always_comb code = enc8b10b(data, rd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd <= 1'b0;
    else if (valid) rd <= rd_after(rd, code);
  end

endmodule
