// dec_10b8b: 10B/8B decoder with running-disparity tracking.
//
// Recovers the byte from a 10-bit code word {abcdei, fghj} (a in bit 9) by inverting the
// standard 5b/6b and 3b/4b tables of coding_pkg, then re-encodes the byte to check the
// word: if it equals the encoding at the present running disparity the word is good; if it
// equals the encoding at the other disparity, disp_err is raised; if neither, code_err is
// raised. The error flags are this design's addition. data and the flags are combinational;
// the running-disparity register (reset to RD-) advances on rising edges with valid high,
// flipping after every word whose number of ones is not 5.
module dec_10b8b
  import coding_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [9:0] code,
  output logic [7:0] data,
  output logic       code_err,
  output logic       disp_err
);

  logic       rd;
  logic [9:0] enc_same, enc_other;

  always_comb begin
    data      = {dec4b3b(code[3:0]), dec6b5b(code[9:4])};
    enc_same  = enc8b10b(data, rd);
    enc_other = enc8b10b(data, ~rd);
    code_err  = (code != enc_same) && (code != enc_other);
    disp_err  = (code != enc_same) && (code == enc_other);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd <= 1'b0;
    else if (valid) rd <= rd_after(rd, code);
  end

endmodule
