// tb_rf_lut: checks the look-up table memory. All 512 entries are loaded
// with the resistive-fuse function G(d) of the reference model and read
// back by signed difference, checking sign extension of negative currents,
// the one-clock read latency, and a reload (linear to fuse mode switch).
module tb_rf_lut;
  import rf_tb_pkg::*;

  logic              clk = 1'b0;
  logic              we = 1'b0;
  logic [8:0]        waddr = '0, raddr = '0;
  logic signed [11:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  rf_lut dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic load(int delta);
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 9'(a); wdata = 12'(lut2_fn(idx_to_diff(a), delta));
    end
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic verify(int delta);
    for (int d = -255; d <= 255; d++) begin
      raddr = 9'(d);
      @(negedge clk);
      check(int'(rdata) == lut2_fn(d, delta),
            $sformatf("G(%0d) got %0d expected %0d", d, rdata, lut2_fn(d, delta)));
    end
  endtask

  initial begin
    load(LINEAR_DELTA);
    verify(LINEAR_DELTA);
    load(24);
    verify(24);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
