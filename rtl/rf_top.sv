// rf_top: FPGA coarse region segmentation engine (digital resistive-fuse
// network) as seen from the host PC over the board's bus.
//
// The host loads a 64x64 8-bit image into the source memory and the two
// look-up tables, writes the number of sweeps and starts a run. The engine
// copies the image into the destination memory and then repeats the
// Kirchhoff current-law update of every node (rf_datapath) in pixel-serial
// raster order (rf_controller) until the requested number of sweeps is
// done. The smoothed image, whose flat regions are separated by the open
// fuses at strong edges, is read back from the destination memory. Coarse
// segmentation is obtained by running first with a linear LUT_2 and then,
// without the copy pass, with a resistive-fuse LUT_2.
//
// Host interface: a simple synchronous word bus standing in for the PCI
// target logic of the board. host_we writes host_wdata at host_addr in the
// same clock; host_re returns host_rdata with host_rvalid one clock later.
// The address map is in rf_pkg. Memory and register writes are ignored
// while the engine is busy, and destination reads are only meaningful when
// it is idle. The cycle counter counts the clocks of the last run.
//
// The memories, the two LUTs and the node update follow the circuit
// description; the bus, its address map, the status registers and the copy
// pass are this design's choices.
module rf_top
  import rf_pkg::*;
#(
  parameter int unsigned W    = rf_pkg::IMG_W,
  parameter int unsigned H    = rf_pkg::IMG_H,
  parameter int unsigned IT_W = 16,
  localparam int unsigned N   = W * H,
  localparam int unsigned AW  = $clog2(N)
) (
  input  logic        clk,
  input  logic        rst_n,
  // host bus
  input  logic        host_we,
  input  logic        host_re,
  input  logic [15:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        host_rvalid,
  // run status
  output logic        busy,
  output logic        done
);

  // Host address decode.
  logic in_src, in_dst, in_lut1, in_lut2;
  always_comb begin
    in_src  = (host_addr & 16'hF000) == A_SRC_BASE;
    in_dst  = (host_addr & 16'hF000) == A_DST_BASE;
    in_lut1 = (host_addr & 16'hFE00) == A_LUT1_BASE;
    in_lut2 = (host_addr & 16'hFE00) == A_LUT2_BASE;
  end

  // Control registers.
  logic [IT_W-1:0] iters_q;
  logic            done_flag_q;
  logic [31:0]     cycles_q;
  logic            start;
  logic            copy_first;
  logic            host_wr_ok;

  assign host_wr_ok = host_we && !busy;
  assign start      = host_wr_ok && host_addr == A_CTRL && host_wdata[0];
  assign copy_first = host_wdata[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iters_q     <= IT_W'(DEFAULT_ITERS);
      done_flag_q <= 1'b0;
      cycles_q    <= '0;
    end else begin
      if (host_wr_ok && host_addr == A_ITERS) iters_q <= host_wdata[IT_W-1:0];
      if (start) begin
        done_flag_q <= 1'b0;
        cycles_q    <= '0;
      end else begin
        if (busy) cycles_q <= cycles_q + 1'b1;
        if (done) done_flag_q <= 1'b1;
      end
    end
  end

  // Engine.
  logic                   src_re, dst_re, dst_we, copy_wr;
  logic [AW-1:0]          src_raddr, dst_raddr, dst_waddr;
  logic [2:0]             phase;
  logic [3:0]             nbr_valid;
  logic [PIX_W-1:0]       src_rdata;
  logic [NODE_W-1:0]      dst_rdata, dst_wdata;
  logic [LUT_AW-1:0]      lut1_addr, lut2_addr;
  logic signed [LUT_W-1:0] lut1_rdata, lut2_rdata;

  rf_controller #(.W(W), .H(H), .IT_W(IT_W)) u_ctrl (
    .clk, .rst_n, .start, .copy_first, .iters(iters_q), .busy, .done,
    .src_re, .src_raddr, .dst_re, .dst_raddr, .dst_we, .dst_waddr,
    .phase, .nbr_valid, .copy_wr
  );

  rf_datapath u_dp (
    .clk, .rst_n, .phase, .nbr_valid, .copy_wr,
    .src_rdata, .dst_rdata,
    .lut1_addr, .lut1_rdata, .lut2_addr, .lut2_rdata,
    .wdata(dst_wdata)
  );

  rf_source_mem #(.DEPTH(N), .WIDTH(PIX_W)) u_src (
    .clk,
    .we(host_wr_ok && in_src), .waddr(host_addr[AW-1:0]), .wdata(host_wdata[PIX_W-1:0]),
    .re(src_re), .raddr(src_raddr), .rdata(src_rdata)
  );

  rf_dest_mem #(.DEPTH(N), .WIDTH(NODE_W)) u_dst (
    .clk,
    .we(dst_we), .waddr(dst_waddr), .wdata(dst_wdata),
    .re(dst_re), .raddr(dst_raddr),
    .host_sel(!busy), .host_re(host_re && in_dst), .host_raddr(host_addr[AW-1:0]),
    .rdata(dst_rdata)
  );

  rf_lut u_lut1 (
    .clk, .we(host_wr_ok && in_lut1), .waddr(host_addr[LUT_AW-1:0]),
    .wdata(host_wdata[LUT_W-1:0]), .raddr(lut1_addr), .rdata(lut1_rdata)
  );

  rf_lut u_lut2 (
    .clk, .we(host_wr_ok && in_lut2), .waddr(host_addr[LUT_AW-1:0]),
    .wdata(host_wdata[LUT_W-1:0]), .raddr(lut2_addr), .rdata(lut2_rdata)
  );

  // Host read path: one clock of latency, matching the memories.
  logic        rd_dst_q;
  logic [31:0] reg_rdata_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rvalid <= 1'b0;
      rd_dst_q    <= 1'b0;
      reg_rdata_q <= '0;
    end else begin
      host_rvalid <= host_re;
      rd_dst_q    <= host_re && in_dst;
      unique case (host_addr)
        A_ITERS:  reg_rdata_q <= 32'(iters_q);
        A_STATUS: reg_rdata_q <= {30'd0, done_flag_q, busy};
        A_CYCLES: reg_rdata_q <= cycles_q;
        default:  reg_rdata_q <= '0;
      endcase
    end
  end

  assign host_rdata = rd_dst_q ? 32'(dst_rdata) : reg_rdata_q;

endmodule
