// bus_segment: one bus segment of a track together with the tristate drivers
// that can drive it.  Instead of real tristate buffers the segment is built
// as a daisy-chained priority: driver 0 wins if enabled, otherwise driver 1,
// and so on, so at most one driver is ever effective, even while the
// configuration is half written.  An undriven segment reads zero (unused
// buses are tied to ground).  Purely combinational.  The daisy chain follows
// the RaPiD-Benchmark reconfiguration scheme; modelling the drivers as a
// multiplexer is this design's choice for a two-state, single-driver netlist.
module bus_segment #(
  parameter int ND = 4,
  parameter int N  = 17
) (
  input  logic [ND-1:0][N-1:0] d,
  input  logic [ND-1:0]        en,
  output logic [N-1:0]         q,
  output logic                 driven
);
  always_comb begin
    q      = '0;
    driven = 1'b0;
    for (int k = ND - 1; k >= 0; k--)
      if (en[k]) begin
        q      = d[k];
        driven = 1'b1;
      end
  end
endmodule
