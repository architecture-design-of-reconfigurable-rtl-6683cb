// tb_bus_connector: self-checking testbench for bus_connector.
// Checks the three modes and all delays: the value of the source segment must appear on the far side after the configured number of cycles, with only that side enabled.
module tb_bus_connector;
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

  logic en = 1'b1;
  bc_cfg_t cfg;
  logic [16:0] l_in, r_in, l_out, r_out;
  logic l_en, r_en;
  logic [16:0] hist [4];
  bus_connector #(.N(17)) dut (.clk, .rst_n, .en, .cfg, .l_in, .r_in, .l_out, .l_en, .r_out, .r_en);

  initial begin : main
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int m = 0; m < 3; m++)
      for (int dl = 0; dl < 4; dl++) begin
        cfg.mode = bc_mode_e'(m); cfg.dly = 2'(dl);
        for (int k = 0; k < 4; k++) hist[k] = '0;
        repeat (4) @(posedge clk);
        for (int n = 0; n < 20; n++) begin
          logic [16:0] src;
          l_in = 17'($urandom); r_in = 17'($urandom);
          src = (m == 2) ? r_in : l_in;
          #1;
          check(r_en == (m == 1) && l_en == (m == 2), "enables");
          if (n >= 4) begin
            if (m == 1) check(r_out == (dl == 0 ? src : hist[dl-1]), $sformatf("right dly=%0d", dl));
            if (m == 2) check(l_out == (dl == 0 ? src : hist[dl-1]), $sformatf("left dly=%0d", dl));
          end
          @(posedge clk); #1;
          hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = src;
        end
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
