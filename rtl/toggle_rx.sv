// toggle_rx: toggle-to-"1" converter at the receiving end of the lines.
//
// A D flip-flop samples the received lines on every rising edge; XORing the present lines
// with the sampled previous state marks each line that changed with a 1, which undoes the
// transmitter's toggle conversion. With toggle_en low the lines pass through unchanged.
// code is combinational from the lines and the register. Reset clears the register, which
// must match the transmitter's reset state of the lines (also all zero).
module toggle_rx #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         toggle_en,
  input  logic [W-1:0] lines,
  output logic [W-1:0] code
);

  logic [W-1:0] prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prev <= '0;
    else        prev <= lines;
  end

  always_comb code = toggle_en ? (lines ^ prev) : lines;

endmodule
