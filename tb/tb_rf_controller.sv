// tb_rf_controller: checks the scan schedule of the controller on a small
// 5x4 image. An independent cycle-by-cycle model of the expected schedule
// (copy pass, then for every sweep and pixel: centre and source read,
// up/down/left/right reads with border pixels replaced by the centre, write
// in the last phase) is compared with every memory control output, the
// phase and the neighbour mask, and the run lengths are checked for a run
// with copy and two sweeps, a run without copy, and a copy-only run.
module tb_rf_controller;
  localparam int W = 5, H = 4, N = W * H, AW = 5;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0, copy_first = 1'b0;
  logic [15:0]   iters = '0;
  logic          busy, done, src_re, dst_re, dst_we, copy_wr;
  logic [AW-1:0] src_raddr, dst_raddr, dst_waddr;
  logic [2:0]    phase;
  logic [3:0]    nbr_valid;

  int checks = 0, failures = 0;

  rf_controller #(.W(W), .H(H)) dut (.*);

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

  // Expected outputs for one cycle.
  typedef struct {
    bit src_re; int src_a; bit dst_re; int dst_a; bit dst_we; int dst_wa; bit copy;
    int ph; bit [3:0] nv; bit ph_chk;
  } exp_t;
  exp_t sched [$];

  function automatic void build(bit cp, int it);
    exp_t e;
    if (cp) begin
      for (int n = 0; n <= N; n++) begin
        e = '{default: 0};
        if (n < N) begin e.src_re = 1; e.src_a = n; end
        if (n > 0) begin e.dst_we = 1; e.dst_wa = n - 1; e.copy = 1; end
        sched.push_back(e);
      end
    end
    for (int s = 0; s < it; s++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          for (int p = 0; p < 8; p++) begin
            int n;
            n = y * W + x;
            e = '{default: 0};
            e.ph_chk = 1; e.ph = p;
            e.nv = {x < W - 1, x > 0, y < H - 1, y > 0};
            case (p)
              0: begin e.src_re = 1; e.src_a = n; e.dst_re = 1; e.dst_a = n; end
              1: begin e.dst_re = 1; e.dst_a = (y > 0) ? n - W : n; end
              2: begin e.dst_re = 1; e.dst_a = (y < H - 1) ? n + W : n; end
              3: begin e.dst_re = 1; e.dst_a = (x > 0) ? n - 1 : n; end
              4: begin e.dst_re = 1; e.dst_a = (x < W - 1) ? n + 1 : n; end
              7: begin e.dst_we = 1; e.dst_wa = n; end
              default: ;
            endcase
            sched.push_back(e);
          end
  endfunction

  task automatic run(bit cp, int it);
    int cyc = 0;
    exp_t e;
    sched.delete();
    build(cp, it);
    @(negedge clk);
    start = 1'b1; copy_first = cp; iters = 16'(it);
    @(negedge clk);
    start = 1'b0;
    while (sched.size() > 0) begin
      e = sched.pop_front();
      check(busy && !done, "busy during run");
      check(src_re == e.src_re && (!e.src_re || src_raddr == AW'(e.src_a)),
            $sformatf("cycle %0d source read", cyc));
      check(dst_re == e.dst_re && (!e.dst_re || dst_raddr == AW'(e.dst_a)),
            $sformatf("cycle %0d destination read: re %0d addr %0d expected %0d %0d",
                      cyc, dst_re, dst_raddr, e.dst_re, e.dst_a));
      check(dst_we == e.dst_we && (!e.dst_we || dst_waddr == AW'(e.dst_wa)),
            $sformatf("cycle %0d destination write", cyc));
      check(copy_wr == e.copy, $sformatf("cycle %0d copy flag", cyc));
      if (e.ph_chk) begin
        check(phase == 3'(e.ph), $sformatf("cycle %0d phase", cyc));
        check(nbr_valid == e.nv, $sformatf("cycle %0d neighbour mask", cyc));
      end
      cyc++;
      @(negedge clk);
    end
    check(done && busy, "done pulse after last cycle");
    @(negedge clk);
    check(!done && !busy, "idle after done");
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !done, "idle after reset");
    run(1'b1, 2);
    run(1'b0, 1);
    run(1'b1, 0);
    run(1'b0, 3);
    run(1'b0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
