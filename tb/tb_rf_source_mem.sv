// tb_rf_source_mem: checks the source image memory. A full 64x64 image of
// random 8-bit pixels is written through the host port and read back in a
// scrambled order through the datapath port, checking the one-clock read
// latency, that rdata holds while re is low, and that a later overwrite of a
// word is returned.
module tb_rf_source_mem;
  localparam int DEPTH = 4096, WIDTH = 8, AW = 12;

  logic             clk = 1'b0;
  logic             we = 1'b0, re = 1'b0;
  logic [AW-1:0]    waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  rf_source_mem dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
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

  initial begin
    logic [WIDTH-1:0] held;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = WIDTH'($urandom);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      int a;
      a = (i * 1237 + 91) % DEPTH;
      re = 1'b1; raddr = AW'(a);
      @(negedge clk);
      check(rdata == model[a], $sformatf("read %0d got %h expected %h", a, rdata, model[a]));
    end
    // rdata holds while re is low
    held = rdata;
    re = 1'b0; raddr = 12'd5;
    repeat (3) @(negedge clk);
    check(rdata == held, "rdata holds while re is low");
    // overwrite and read back
    we = 1'b1; waddr = 12'd7; wdata = ~model[7];
    @(negedge clk);
    we = 1'b0; re = 1'b1; raddr = 12'd7;
    @(negedge clk);
    check(rdata == ~model[7], "overwrite visible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
