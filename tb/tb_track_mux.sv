// tb_track_mux: self-checking testbench for track_mux.
// Selects every code 0..15 on random track contents and compares with the expected track or zero.
module tb_track_mux;
  import rapid_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [T-1:0][DW-1:0] tracks;
  logic [TSEL_W-1:0] sel;
  logic [DW-1:0] y;
  track_mux dut (.tracks, .sel, .y);

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int n = 0; n < 20; n++) begin
      for (int k = 0; k < T; k++) tracks[k] = DW'($urandom);
      for (int s = 0; s < 16; s++) begin
        sel = TSEL_W'(s); #1;
        check(y == ((s >= 1 && s <= T) ? tracks[s-1] : '0), $sformatf("sel=%0d", s));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
