// local_ram: one of the three 64-word local memories of a RaPiD-Benchmark
// cell.  The address comes either from the datapath (hard bit ext_addr=1,
// low address bits of the addr input) or from a local sequential address
// counter.  Soft control {we, inc}: we writes din at the address, inc
// advances the local counter (wrapping at DEPTH) after the access.
//
// Timing: reading is synchronous, dout is the word at the address of the
// previous enabled cycle.  A read and a write of the same address in one
// cycle return the old contents, so with the local counter the memory is a
// DEPTH-stage shift register / delay line.  Reads and writes happen only
// when en is high.  Soft/hard split (2/1) and the sequential address
// generator follow the RaPiD-Benchmark description; the encoding is this
// design's choice.
module local_ram
  import rapid_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  word_t      din,
  input  word_t      addr,
  input  logic [1:0] sc,     // {we, inc}
  input  logic       ext_addr,
  output word_t      dout
);
  localparam int AW = $clog2(DEPTH);

  word_t          mem [DEPTH];
  logic [AW-1:0]  cnt, a;

  assign a = ext_addr ? addr.d[AW-1:0] : cnt;

  always_ff @(posedge clk) begin
    if (en && sc[1]) mem[a] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dout <= '0;
    else if (en) dout <= mem[a];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 cnt <= '0;
    else if (en && sc[0])     cnt <= cnt + 1'b1;
  end
endmodule
