// tb_rf_dest_mem: checks the destination (node value) memory. Random 12-bit
// node values are written through the engine port; they are read back
// through the engine port (host_sel low) and through the host port
// (host_sel high), checking that each port's address is used only when it
// is selected, the one-clock latency, and that a read of the word being
// written in the same clock returns the old value.
module tb_rf_dest_mem;
  localparam int DEPTH = 4096, WIDTH = 12, AW = 12;

  logic             clk = 1'b0;
  logic             we = 1'b0, re = 1'b0, host_sel = 1'b0, host_re = 1'b0;
  logic [AW-1:0]    waddr = '0, raddr = '0, host_raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  rf_dest_mem dut (.*);

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
    int a, b;
    for (a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = WIDTH'($urandom);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      a = $urandom_range(0, DEPTH - 1);
      b = (a + 1 + $urandom_range(0, DEPTH - 2)) % DEPTH;   // b != a
      host_sel = i[0];
      if (host_sel) begin
        host_re = 1'b1; host_raddr = AW'(a); re = 1'b1; raddr = AW'(b);
      end else begin
        re = 1'b1; raddr = AW'(a); host_re = 1'b1; host_raddr = AW'(b);
      end
      @(negedge clk);
      check(rdata == model[a], $sformatf("%s read %0d got %h expected %h",
            host_sel ? "host" : "engine", a, rdata, model[a]));
    end
    // read-during-write of the same word returns the old value
    host_sel = 1'b0; host_re = 1'b0;
    we = 1'b1; waddr = 12'd100; wdata = ~model[100];
    re = 1'b1; raddr = 12'd100;
    @(negedge clk);
    check(rdata == model[100], "read during write returns old word");
    we = 1'b0;
    @(negedge clk);
    check(rdata == ~model[100], "new word visible next read");
    // no read enable: data holds
    re = 1'b0; raddr = 12'd3;
    @(negedge clk);
    check(rdata == ~model[100], "rdata holds without read enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
