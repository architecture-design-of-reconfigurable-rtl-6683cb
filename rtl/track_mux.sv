// track_mux: the (T+1):1 input multiplexer in front of every functional-unit
// data input.  Select code 0 gives zero (GND), used for example to clear a
// register; code k (1..T) gives track k-1.  Codes above T also give zero.
// Purely combinational.  The size (T+1):1 follows the RaPiD description; the
// code assignment is this design's choice.
module track_mux
  import rapid_pkg::*;
#(
  parameter int NT    = T,
  parameter int SEL_W = $clog2(NT + 1),
  parameter int N     = DW
) (
  input  logic [NT-1:0][N-1:0] tracks,
  input  logic [SEL_W-1:0]     sel,
  output logic [N-1:0]         y
);
  always_comb begin
    y = '0;
    for (int k = 0; k < NT; k++)
      if (int'(sel) == k + 1) y = tracks[k];
  end
endmodule
