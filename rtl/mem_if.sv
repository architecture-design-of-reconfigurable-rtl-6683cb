// mem_if: the memory interface of the stream manager.  It routes the
// requests of the streams to NPORT external memory ports.  Port p is shared
// by input stream p (reads) and output stream p (writes); when both request
// in one cycle the port alternates between them (round robin), so each
// port does one access per cycle and the three ports together sustain up
// to three words per cycle.  A port whose mem_ready is low accepts no
// request that cycle.  External memory answers a read one cycle
// after the request (rd_valid/rd_data go back to the input stream).
// The routing role and the three-words-per-cycle target follow the RaPiD
// stream manager; port count, sharing and latency are this design's choice.
module mem_if #(
  parameter int NPORT = 3,
  parameter int AW    = 16,
  parameter int N     = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NPORT-1:0]        rd_req,
  input  logic [NPORT-1:0][AW-1:0] rd_addr,
  output logic [NPORT-1:0]        rd_gnt,
  output logic [NPORT-1:0]        rd_valid,
  output logic [NPORT-1:0][N-1:0] rd_data,
  input  logic [NPORT-1:0]        wr_req,
  input  logic [NPORT-1:0][AW-1:0] wr_addr,
  input  logic [NPORT-1:0][N-1:0] wr_data,
  output logic [NPORT-1:0]        wr_gnt,
  // external memory ports
  output logic [NPORT-1:0]        mem_req,
  output logic [NPORT-1:0]        mem_we,
  output logic [NPORT-1:0][AW-1:0] mem_addr,
  output logic [NPORT-1:0][N-1:0] mem_wdata,
  input  logic [NPORT-1:0][N-1:0] mem_rdata,
  input  logic [NPORT-1:0]        mem_ready
);
  logic [NPORT-1:0] last_wr, rd_pend;

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      rd_gnt[p]    = mem_ready[p] && rd_req[p] && (!wr_req[p] || last_wr[p]);
      wr_gnt[p]    = mem_ready[p] && wr_req[p] && !rd_gnt[p];
      mem_req[p]   = rd_gnt[p] || wr_gnt[p];
      mem_we[p]    = wr_gnt[p];
      mem_addr[p]  = wr_gnt[p] ? wr_addr[p] : rd_addr[p];
      mem_wdata[p] = wr_data[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_wr <= '0; rd_pend <= '0;
    end else begin
      rd_pend <= rd_gnt;
      for (int p = 0; p < NPORT; p++)
        if (mem_req[p]) last_wr[p] <= wr_gnt[p];
    end
  end

  assign rd_valid = rd_pend;
  assign rd_data  = mem_rdata;
endmodule
