// rf_controller: pixel-serial scan and iteration control of the
// resistive-fuse segmentation engine.
//
// A run starts with a start pulse. If copy_first is set, the controller first
// copies the source image into the destination memory (one pixel per clock,
// pipelined), so the network starts from O = I. It then sweeps the image
// `iters` times in raster order. Each pixel takes CYCLES_PER_PIXEL = 8
// clocks: in phase 0 it reads the centre node and source pixel, in phases
// 1-4 the up, down, left and right neighbours of the 3x3 window, and in
// phase 7 it writes the updated node back in place (Gauss-Seidel order: a
// pixel sees the already updated values of the pixels before it). Neighbours
// outside the image are flagged invalid and the centre address is read in
// their place. One cycle after the last write, `done` pulses and busy falls.
//
// Run length in clocks, from the cycle after start to the cycle done is high:
//   (copy_first ? W*H + 1 : 0) + iters * W*H * 8 + 1
// which for 64x64 and 24 sweeps is 790,530 clocks, 19.76 ms at 40 MHz.
//
// Pixel-serial sweeping, in-place update of the destination memory and
// repetition to a steady state follow the circuit description; the phase
// schedule, the copy pass and the boundary rule are this design's choices.
module rf_controller
  import rf_pkg::*;
#(
  parameter int unsigned W      = rf_pkg::IMG_W,
  parameter int unsigned H      = rf_pkg::IMG_H,
  parameter int unsigned IT_W   = 16,
  localparam int unsigned N     = W * H,
  localparam int unsigned AW    = $clog2(N),
  localparam int unsigned XW    = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned YW    = (H > 1) ? $clog2(H) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            copy_first,
  input  logic [IT_W-1:0] iters,
  output logic            busy,
  output logic            done,
  // source memory read port
  output logic            src_re,
  output logic [AW-1:0]   src_raddr,
  // destination memory ports
  output logic            dst_re,
  output logic [AW-1:0]   dst_raddr,
  output logic            dst_we,
  output logic [AW-1:0]   dst_waddr,
  // datapath control
  output logic [2:0]      phase,
  output logic [3:0]      nbr_valid,
  output logic            copy_wr
);

  typedef enum logic [2:0] {S_IDLE, S_COPY, S_COPY_TAIL, S_RUN, S_DONE} state_e;

  state_e          state_q;
  logic [XW-1:0]   x_q;
  logic [YW-1:0]   y_q;
  logic [2:0]      ph_q;
  logic [IT_W-1:0] it_q;        // sweeps still to do, including the current one
  logic [AW-1:0]   cp_q;        // copy pass read index
  logic            cp_v_q;      // copy write pending
  logic [AW-1:0]   cp_addr_q;
  logic [3:0]      nv;          // neighbour validity of the current pixel

  logic [AW-1:0]   pix;
  logic            last_pix;

  assign pix      = AW'(y_q) * AW'(W) + AW'(x_q);
  assign last_pix = (x_q == XW'(W - 1)) && (y_q == YW'(H - 1));

  // Neighbour validity of the current pixel.
  always_comb begin
    nv = '0;
    nv[NB_UP]    = (y_q != '0);
    nv[NB_DOWN]  = (y_q != YW'(H - 1));
    nv[NB_LEFT]  = (x_q != '0);
    nv[NB_RIGHT] = (x_q != XW'(W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      x_q       <= '0;
      y_q       <= '0;
      ph_q      <= '0;
      it_q      <= '0;
      cp_q      <= '0;
      cp_v_q    <= 1'b0;
      cp_addr_q <= '0;
    end else begin
      cp_v_q    <= (state_q == S_COPY);
      cp_addr_q <= cp_q;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            x_q  <= '0;
            y_q  <= '0;
            ph_q <= '0;
            cp_q <= '0;
            it_q <= iters;
            if (copy_first)        state_q <= S_COPY;
            else if (iters != '0)  state_q <= S_RUN;
            else                   state_q <= S_DONE;
          end
        end
        S_COPY: begin
          cp_q <= cp_q + 1'b1;
          if (cp_q == AW'(N - 1)) state_q <= S_COPY_TAIL;
        end
        S_COPY_TAIL: state_q <= (it_q != '0) ? S_RUN : S_DONE;
        S_RUN: begin
          ph_q <= ph_q + 1'b1;
          if (ph_q == 3'(CYCLES_PER_PIXEL - 1)) begin
            if (x_q == XW'(W - 1)) begin
              x_q <= '0;
              y_q <= (y_q == YW'(H - 1)) ? '0 : y_q + 1'b1;
            end else begin
              x_q <= x_q + 1'b1;
            end
            if (last_pix) begin
              it_q <= it_q - 1'b1;
              if (it_q == IT_W'(1)) state_q <= S_DONE;
            end
          end
        end
        S_DONE:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Memory addressing for the current phase.
  always_comb begin
    src_re    = 1'b0;
    src_raddr = pix;
    dst_re    = 1'b0;
    dst_raddr = pix;
    dst_we    = 1'b0;
    dst_waddr = pix;
    copy_wr   = cp_v_q;
    if (state_q == S_COPY) begin
      src_re    = 1'b1;
      src_raddr = cp_q;
    end
    if (cp_v_q) begin
      dst_we    = 1'b1;
      dst_waddr = cp_addr_q;
    end
    if (state_q == S_RUN) begin
      unique case (ph_q)
        3'd0: begin
          src_re = 1'b1;
          dst_re = 1'b1;
        end
        3'd1: begin
          dst_re = 1'b1;
          if (nv[NB_UP]) dst_raddr = pix - AW'(W);
        end
        3'd2: begin
          dst_re = 1'b1;
          if (nv[NB_DOWN]) dst_raddr = pix + AW'(W);
        end
        3'd3: begin
          dst_re = 1'b1;
          if (nv[NB_LEFT]) dst_raddr = pix - 1'b1;
        end
        3'd4: begin
          dst_re = 1'b1;
          if (nv[NB_RIGHT]) dst_raddr = pix + 1'b1;
        end
        3'd7:    dst_we = 1'b1;
        default: ;
      endcase
    end
  end

  assign phase     = ph_q;
  assign nbr_valid = nv;
  assign busy      = (state_q != S_IDLE);
  assign done      = (state_q == S_DONE);

  // A pixel update never overlaps the copy pass.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    !(cp_v_q && state_q == S_RUN && ph_q == 3'd7));

endmodule
