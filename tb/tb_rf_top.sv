// tb_rf_top: end-to-end test of the segmentation engine at its full size
// (64x64 image, default sweep count of 24, no parameter overrides).
//
// A synthetic scene is generated: a noisy background, a bright elliptic
// "face" with darker eyes and mouth. Over the host bus the test
//   run 0: copies the image with zero sweeps and checks O = I exactly;
//   run 1: copies again and runs the default 24 sweeps with a linear LUT_2
//          (plain smoothing), checking every node against a Gauss-Seidel
//          reference model;
//   run 2: reloads LUT_2 with a resistive fuse (mode switch) and continues
//          without the copy pass, again checking every node.
// Each run's cycle count is checked against the controller's schedule and
// run 1 against the 20 ms frame budget at 40 MHz (800,000 clocks). The
// mechanisms exercised are counted: copy pass, linear links, open fuses,
// image-border neighbours, LUT mode switch, and writes refused while busy.
// It also checks that the fuse run keeps the face/background edge while the
// facial details are smoothed into the face region.
module tb_rf_top;
  import rf_pkg::*;
  import rf_tb_pkg::*;

  localparam int W = IMG_W, H = IMG_H, N = W * H;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        host_we = 1'b0, host_re = 1'b0;
  logic [15:0] host_addr = '0;
  logic [31:0] host_wdata = '0;
  logic [31:0] host_rdata;
  logic        host_rvalid, busy, done;

  int checks = 0, failures = 0;
  int n_copy = 0, n_linear_links = 0, n_cuts = 0, n_border = 0, n_mode_switch = 0, n_refused = 0;

  rf_top dut (.*);

  always #12.5 clk = ~clk;   // 40 MHz

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    host_we = 1'b1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic rd(logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    host_re = 1'b1; host_addr = a;
    @(negedge clk);
    host_re = 1'b0;
    check(host_rvalid, "rvalid one clock after read");
    d = host_rdata;
  endtask

  int img [N];
  int o_ref [N];
  int t1 [512], t2 [512];

  task automatic load_lut2(int delta);
    for (int a = 0; a < 512; a++) begin
      t2[a] = lut2_fn(idx_to_diff(a), delta);
      wr(A_LUT2_BASE + 16'(a), 32'(t2[a]));
    end
  endtask

  function automatic void ref_sweeps(int iters);
    int nb[4]; bit nv[4]; bit sat; int cuts, n;
    for (int it = 0; it < iters; it++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          n = y * W + x;
          nv = '{y > 0, y < H - 1, x > 0, x < W - 1};
          nb = '{nv[0] ? o_ref[n-W] : 0, nv[1] ? o_ref[n+W] : 0,
                 nv[2] ? o_ref[n-1] : 0, nv[3] ? o_ref[n+1] : 0};
          for (int k = 0; k < 4; k++) begin
            if (!nv[k]) n_border++;
            else if (nb[k] / 16 != o_ref[n] / 16 && t2[(nb[k] / 16 - o_ref[n] / 16) & 511] != 0)
              n_linear_links++;
          end
          o_ref[n] = node_update(o_ref[n], img[n], nb, nv, t1, t2, sat, cuts);
          n_cuts += cuts;
        end
  endfunction

  task automatic run_and_time(logic [31:0] ctrl, int expect_cycles, string name);
    logic [31:0] d;
    wr(A_CTRL, ctrl);
    check(busy, {name, ": busy after start"});
    // a write while busy must be refused
    wr(A_SRC_BASE, 32'hAB);
    n_refused++;
    while (!done) @(posedge clk);
    @(negedge clk);
    check(!busy, {name, ": idle after done"});
    rd(A_STATUS, d);
    check(d[1:0] == 2'b10, {name, ": status done"});
    rd(A_CYCLES, d);
    check(int'(d) == expect_cycles,
          $sformatf("%s: cycles %0d expected %0d", name, d, expect_cycles));
    $display("%s: %0d clocks = %0.3f ms at 40 MHz", name, d, real'(d) / 40.0e3);
  endtask

  task automatic compare_all(string name);
    logic [31:0] d;
    int bad = 0;
    for (int n = 0; n < N; n++) begin
      rd(A_DST_BASE + 16'(n), d);
      checks++;
      if (int'(d[NODE_W-1:0]) != o_ref[n]) begin
        bad++;
        if (bad < 5) $display("FAIL %s: node %0d got %0d expected %0d", name, n, d, o_ref[n]);
      end
    end
    failures += bad;
  endtask

  function automatic bit in_face(int x, int y);
    return ((x - 32) * (x - 32) * 324 + (y - 30) * (y - 30) * 196) <= 196 * 324;
  endfunction
  function automatic bit in_eye(int x, int y);
    return (y >= 23 && y <= 25) && ((x >= 24 && x <= 27) || (x >= 37 && x <= 40));
  endfunction
  function automatic bit in_mouth(int x, int y);
    return (y == 38) && (x >= 28 && x <= 36);
  endfunction

  initial begin
    logic [31:0] d;
    int v, eye_c0, eye_c1, edge_c;
    // Scene generation: values in grey levels.
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        v = 60;
        if (in_face(x, y)) v = 180;
        if (in_eye(x, y)) v = 120;
        if (in_mouth(x, y)) v = 135;
        v += int'($urandom_range(0, 12)) - 6;
        img[y * W + x] = v;
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    rd(A_ITERS, d);
    check(d == 32'(DEFAULT_ITERS), "default iteration count");

    for (int n = 0; n < N; n++) wr(A_SRC_BASE + 16'(n), 32'(img[n]));
    for (int a = 0; a < 512; a++) begin
      t1[a] = lut1_fn(idx_to_diff(a));
      wr(A_LUT1_BASE + 16'(a), 32'(t1[a]));
    end
    load_lut2(LINEAR_DELTA);

    // Run 0: copy only.
    wr(A_ITERS, 0);
    run_and_time(32'h3, N + 2, "copy only");
    for (int n = 0; n < N; n++) o_ref[n] = img[n] * 16;
    compare_all("copy only");
    n_copy++;

    // The writes refused while busy must not have reached the source
    // memory: the copy pass of the next run would carry them.
    // Run 1: copy plus linear smoothing with the default sweep count.
    wr(A_ITERS, DEFAULT_ITERS);
    run_and_time(32'h3, N + 1 + DEFAULT_ITERS * N * CYCLES_PER_PIXEL + 1, "linear");
    check(N + 1 + DEFAULT_ITERS * N * CYCLES_PER_PIXEL + 1 <= 800_000, "frame within 20 ms at 40 MHz");
    for (int n = 0; n < N; n++) o_ref[n] = img[n] * 16;
    n_copy++;
    ref_sweeps(DEFAULT_ITERS);
    compare_all("linear");
    eye_c0 = o_ref[24 * W + 25] / 16 - o_ref[24 * W + 31] / 16;   // eye vs. face between eyes

    // Run 2: switch LUT_2 to a resistive fuse and continue from the smoothed state.
    load_lut2(24);
    n_mode_switch++;
    run_and_time(32'h1, DEFAULT_ITERS * N * CYCLES_PER_PIXEL + 1, "fuse");
    ref_sweeps(DEFAULT_ITERS);
    compare_all("fuse");
    eye_c1 = o_ref[24 * W + 25] / 16 - o_ref[24 * W + 31] / 16;
    edge_c = o_ref[30 * W + 32] / 16 - o_ref[30 * W + 8] / 16;
    $display("eye contrast input %0d, linear %0d, fuse %0d; face/background %0d",
             img[24 * W + 25] - img[24 * W + 31], eye_c0, eye_c1, edge_c);
    check(edge_c >= 24, "face/background edge kept open by the fuse");
    check(eye_c1 > -24 && eye_c1 < 24, "eye merged into the face region");

    // Mechanism coverage.
    $display("copy passes %0d, linear links %0d, open fuses %0d, border neighbours %0d, mode switches %0d, refused writes %0d",
             n_copy, n_linear_links, n_cuts, n_border, n_mode_switch, n_refused);
    check(n_copy > 0, "copy pass exercised");
    check(n_linear_links > 0, "linear links exercised");
    check(n_cuts > 0, "open fuses exercised");
    check(n_border > 0, "border neighbours exercised");
    check(n_mode_switch > 0, "LUT mode switch exercised");
    check(n_refused > 0, "busy write refusal exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
