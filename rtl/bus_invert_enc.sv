// bus_invert_enc: bus-invert coder for a DATA_W-bit parallel output.
//
// Given the next data word and the present state of the data lines, it counts
// how many data lines would change (Hamming distance). If more than half of them would, it
// sends the complemented word and raises the invert line; otherwise it sends the word as it
// is with the invert line low. At most DATA_W/2 data lines then change per word, plus the
// invert line: the switching is roughly halved, at the cost of one extra line. A tie
// (exactly DATA_W/2) does not invert, and the invert line is not counted in the distance;
// both are this design's choices. Purely combinational; bus_prev comes from the register
// that drives the pads.
module bus_invert_enc #(
  parameter int unsigned DATA_W = 8
) (
  input  logic [DATA_W-1:0] data,
  input  logic [DATA_W-1:0] bus_prev,
  output logic [DATA_W:0]   code
);

  logic [DATA_W-1:0]       diff;
  logic [$clog2(DATA_W+1)-1:0] hdist;

  always_comb begin
    diff = data ^ bus_prev;
    hdist = '0;
    for (int i = 0; i < DATA_W; i++) hdist = hdist + ($bits(hdist))'(diff[i]);
    if (int'(hdist) > DATA_W / 2) code = {1'b1, ~data};
    else                         code = {1'b0, data};
  end

endmodule
