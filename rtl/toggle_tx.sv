// toggle_tx: "1"-to-toggle converter, the register that drives the output pads.
//
// One toggle flip-flop per line: a D flip-flop whose input is its own output XORed with
// the code bit. Each 1 in a code word therefore flips its line and each 0 leaves it, so
// the number of line transitions per word equals the number of ones in the code word.
// After an 8B/10B encoder this makes the switching of a chip's I/O buffers nearly constant
// (5 per word on average, never more than one off in total), whatever the data.
//
// With toggle_en low the same flip-flops simply register the code word, so one register
// serves every coding mode. Lines change only on edges where valid is high; idle cycles
// hold them (no transitions). Reset clears the lines. Timing: lines show the effect of a
// code word from the rising edge on which it is presented.
module toggle_tx #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic         toggle_en,
  input  logic [W-1:0] code,
  output logic [W-1:0] lines
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         lines <= '0;
    else if (valid)     lines <= toggle_en ? (lines ^ code) : code;
  end

endmodule
