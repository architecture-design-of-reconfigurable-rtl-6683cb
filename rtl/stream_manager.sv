// stream_manager: moves data between external memory and the datapath.
// There are NS input and NS output streams; each has an address generator
// (addr_gen) and a FIFO (stream_fifo).  Input streams fetch words at the
// addresses their generator produces and fill their FIFO; output streams
// write the words the datapath pushed into their FIFO to the addresses
// their generator produces.  The memory interface (mem_if) routes the
// requests to the external memory ports.  Address generation is thereby
// decoupled from the instruction stream; only the moments at which the
// datapath pops (in_rd) and pushes (out_wr) come from the control path.
//
// Halting: halt is high when the control path asks to pop an empty input
// FIFO or push into a full output FIFO; the whole array then stops (adv is
// low) until the stream manager has caught up.  Pops and pushes take
// effect only in cycles where adv is high.
//
// Program load: prog_sel 0..NS-1 selects an input stream's generator,
// NS..2NS-1 an output stream's.  done: all generators finished, no read in
// flight and every output FIFO drained.  Three input and three output
// streams with 16-entry FIFOs follow the RaPiD-Benchmark; the read-space
// reservation and the fixed read latency are this design's choice.
module stream_manager #(
  parameter int NS     = 3,
  parameter int AW     = 16,
  parameter int N      = 16,
  parameter int CW     = 16,
  parameter int FDEPTH = 16,
  parameter int PDEPTH = 16,
  localparam int PAW   = $clog2(PDEPTH),
  localparam int CIW   = 3 + CW + 2 * AW,
  localparam int SW    = $clog2(2 * NS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  prog_we,
  input  logic [SW-1:0]         prog_sel,
  input  logic [PAW-1:0]        prog_addr,
  input  logic [CIW-1:0]        prog_data,
  input  logic                  start,
  // datapath side
  input  logic                  adv,
  input  logic [NS-1:0]         in_rd,
  output logic [NS-1:0][N-1:0]  in_data,
  input  logic [NS-1:0]         out_wr,
  input  logic [NS-1:0][N-1:0]  out_data,
  output logic                  halt,
  output logic                  done,
  // external memory
  output logic [NS-1:0]         mem_req,
  output logic [NS-1:0]         mem_we,
  output logic [NS-1:0][AW-1:0] mem_addr,
  output logic [NS-1:0][N-1:0]  mem_wdata,
  input  logic [NS-1:0][N-1:0]  mem_rdata,
  input  logic [NS-1:0]         mem_ready
);
  localparam int FCW = $clog2(FDEPTH) + 1;

  logic [NS-1:0]          ia_v, ia_rdy, ia_done, oa_v, oa_rdy, oa_done;
  logic [NS-1:0][AW-1:0]  ia_addr, oa_addr;
  logic [NS-1:0]          if_empty, if_full, of_empty, of_full;
  logic [NS-1:0][FCW-1:0] if_cnt, of_cnt;
  logic [NS-1:0]          rd_req, rd_gnt, rd_valid, wr_req, wr_gnt, inflight;
  logic [NS-1:0][N-1:0]   rd_data, of_dout;

  for (genvar s = 0; s < NS; s++) begin : g_s
    addr_gen #(.AW(AW), .CW(CW), .DEPTH(PDEPTH)) u_iag (
      .clk, .rst_n, .prog_we(prog_we && prog_sel == SW'(s)), .prog_addr, .prog_data,
      .start, .addr(ia_addr[s]), .valid(ia_v[s]), .ready(ia_rdy[s]), .done(ia_done[s])
    );
    addr_gen #(.AW(AW), .CW(CW), .DEPTH(PDEPTH)) u_oag (
      .clk, .rst_n, .prog_we(prog_we && prog_sel == SW'(s + NS)), .prog_addr, .prog_data,
      .start, .addr(oa_addr[s]), .valid(oa_v[s]), .ready(oa_rdy[s]), .done(oa_done[s])
    );
    stream_fifo #(.N(N), .DEPTH(FDEPTH)) u_ififo (
      .clk, .rst_n, .clr(start), .push(rd_valid[s]), .din(rd_data[s]),
      .pop(in_rd[s] && adv), .dout(in_data[s]), .empty(if_empty[s]), .full(if_full[s]),
      .count(if_cnt[s])
    );
    stream_fifo #(.N(N), .DEPTH(FDEPTH)) u_ofifo (
      .clk, .rst_n, .clr(start), .push(out_wr[s] && adv), .din(out_data[s]),
      .pop(wr_gnt[s]), .dout(of_dout[s]), .empty(of_empty[s]), .full(of_full[s]),
      .count(of_cnt[s])
    );
    // a read is requested only if the FIFO has room for it and the one in flight
    assign rd_req[s] = ia_v[s] && (int'(if_cnt[s]) + int'(inflight[s]) < FDEPTH);
    assign ia_rdy[s] = rd_gnt[s];
    assign wr_req[s] = oa_v[s] && !of_empty[s];
    assign oa_rdy[s] = wr_gnt[s];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= rd_gnt;
  end

  mem_if #(.NPORT(NS), .AW(AW), .N(N)) u_mif (
    .clk, .rst_n, .rd_req, .rd_addr(ia_addr), .rd_gnt, .rd_valid, .rd_data,
    .wr_req, .wr_addr(oa_addr), .wr_data(of_dout), .wr_gnt,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ready
  );

  assign halt = |(in_rd & if_empty) || |(out_wr & of_full);
  assign done = (&ia_done) && (&oa_done) && (inflight == '0) && (&of_empty);

  logic unused;
  assign unused = ^if_full ^ ^of_cnt;
endmodule
