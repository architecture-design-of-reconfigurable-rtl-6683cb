// ctrl_sync: the synchronisation unit between the parallel programmed
// controllers.  It keeps one pending-signal flag per controller.  A
// controller executing "signal NUM" sets the flag of controller NUM; a
// controller at a "wait" consumes its own flag (take) and continues.  A
// signal that arrives while the target is not waiting stays pending, so the
// target skips its next wait, as the signal/wait primitives require.
// Registered flags, one cycle from signal to release.  Flags are cleared
// by start.
module ctrl_sync #(
  parameter int NCTRL = 4,
  localparam int NW   = $clog2(NCTRL)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [NCTRL-1:0]           sig_valid,
  input  logic [NCTRL-1:0][NW-1:0]   sig_num,
  input  logic [NCTRL-1:0]           take,
  output logic [NCTRL-1:0]           pending
);
  logic [NCTRL-1:0] set;

  always_comb begin
    set = '0;
    for (int i = 0; i < NCTRL; i++)
      if (sig_valid[i]) set[sig_num[i]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pending <= '0;
    else if (start) pending <= '0;
    else            pending <= (pending & ~take) | set;
  end
endmodule
