// tb_rf_datapath: checks the node update against the reference model.
//
// The testbench plays the controller, the two memories and the two LUTs:
// it steps the phase 0..7 for each pixel, returns the centre node, the
// source pixel and the four neighbours one clock after the phase that reads
// them, and answers LUT addresses with one clock of latency from its own
// tables. For thousands of random pixels, neighbour values and border masks
// the phase-7 write value must equal rf_tb_pkg::node_update(). Two table
// sets are used: the physical network tables (linear and fuse) and random
// large tables that drive the sum past both ends of the node range, so that
// saturation is exercised. Copy-mode writes are checked as well.
module tb_rf_datapath;
  import rf_tb_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic [2:0]         phase = '0;
  logic [3:0]         nbr_valid = '0;
  logic               copy_wr = 1'b0;
  logic [7:0]         src_rdata = '0;
  logic [11:0]        dst_rdata = '0;
  logic [8:0]         lut1_addr, lut2_addr;
  logic signed [11:0] lut1_rdata = '0, lut2_rdata = '0;
  logic [11:0]        wdata;

  int checks = 0, failures = 0, n_sat = 0, n_cut = 0, n_border = 0;
  int t1 [512], t2 [512];

  rf_datapath dut (.*);

  always #5 clk = ~clk;

  // LUTs with one clock of read latency
  always_ff @(posedge clk) begin
    lut1_rdata <= 12'(t1[lut1_addr]);
    lut2_rdata <= 12'(t2[lut2_addr]);
  end

  initial begin : watchdog
    repeat (500_000) @(posedge clk);
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

  task automatic one_pixel();
    int oc, ic, exp, cuts;
    int nb[4]; bit nv[4]; bit sat;
    oc = $urandom_range(0, 4095);
    ic = $urandom_range(0, 255);
    for (int k = 0; k < 4; k++) begin
      nb[k] = $urandom_range(0, 4095);
      nv[k] = ($urandom_range(0, 7) != 0);
      if (!nv[k]) n_border++;
    end
    exp = node_update(oc, ic, nb, nv, t1, t2, sat, cuts);
    n_sat += sat;
    n_cut += cuts;
    nbr_valid = {nv[3], nv[2], nv[1], nv[0]};
    for (int p = 0; p < 8; p++) begin
      phase = 3'(p);
      unique case (p)
        1: begin dst_rdata = 12'(oc); src_rdata = 8'(ic); end
        2: dst_rdata = 12'(nb[0]);
        3: dst_rdata = 12'(nb[1]);
        4: dst_rdata = 12'(nb[2]);
        5: dst_rdata = 12'(nb[3]);
        default: dst_rdata = 12'($urandom);   // stale data must not matter
      endcase
      if (p == 7) check(int'(wdata) == exp,
          $sformatf("update oc=%0d ic=%0d got %0d expected %0d", oc, ic, wdata, exp));
      @(negedge clk);
    end
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 512; a++) begin
      t1[a] = lut1_fn(idx_to_diff(a));
      t2[a] = lut2_fn(idx_to_diff(a), LINEAR_DELTA);
    end
    repeat (2000) one_pixel();
    for (int a = 0; a < 512; a++) t2[a] = lut2_fn(idx_to_diff(a), 24);
    repeat (2000) one_pixel();
    for (int a = 0; a < 512; a++) begin
      t1[a] = int'($urandom_range(0, 4095)) - 2048;
      t2[a] = int'($urandom_range(0, 4095)) - 2048;
    end
    repeat (2000) one_pixel();
    // copy mode
    for (int i = 0; i < 200; i++) begin
      copy_wr = 1'b1; phase = 3'd0; src_rdata = 8'($urandom);
      #1;
      check(wdata == {src_rdata, 4'h0}, "copy write value");
      @(negedge clk);
    end
    copy_wr = 1'b0;
    $display("saturations %0d, open fuses %0d, border neighbours %0d", n_sat, n_cut, n_border);
    check(n_sat > 0, "saturation exercised");
    check(n_cut > 0, "open fuse exercised");
    check(n_border > 0, "border mask exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
