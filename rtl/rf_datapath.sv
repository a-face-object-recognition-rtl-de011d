// rf_datapath: node update of the digital resistive-fuse network.
//
// The analog network drives every node n from its input I_n through a
// conductance sigma and connects it to its neighbours k through nonlinear
// elements G. By Kirchhoff's current law the node moves by the sum of the
// currents flowing into it; repeating that update converges to the steady
// state of the network. This unit computes one such update per pixel:
//
//   O_n <- clamp( O_n + LUT_1[I_n - O_n] + sum over valid k of LUT_2[O_k - O_n] )
//
// The time step and the conductances are folded into the table contents, so
// the datapath itself only forms differences, adds and saturates. Neighbours
// are the 4-connected pixels of the 3x3 window around n; the controller
// masks those that fall outside the image. Differences use the integer part
// of the node values; the fraction bits of O_n accumulate the result.
//
// Timing (phase is supplied by rf_controller, one pixel per 8 phases; memory
// and LUT reads return data one clock after their address):
//   phase 1: dst_rdata = O_n, src_rdata = I_n   -> LUT_1 address, latch O_n
//   phase 2: dst_rdata = O_up                   -> LUT_2 address; acc = LUT_1 out
//   phase 3: dst_rdata = O_down                 -> LUT_2 address; acc += G(up)
//   phase 4: dst_rdata = O_left                 -> LUT_2 address; acc += G(down)
//   phase 5: dst_rdata = O_right                -> LUT_2 address; acc += G(left)
//   phase 6:                                       acc += G(right)
//   phase 7: wdata = clamp(O_n + acc), written back by the controller
// In copy mode (copy_wr high) wdata is the source pixel with a zero fraction,
// used to start the network from O = I.
//
// The LUT-based update follows the circuit description; the phase schedule,
// the fixed-point format and the saturation are this design's choices.
module rf_datapath
  import rf_pkg::*;
#(
  parameter int unsigned PW  = rf_pkg::PIX_W,
  parameter int unsigned FW  = rf_pkg::FRAC_W,
  parameter int unsigned LW  = rf_pkg::LUT_W,
  localparam int unsigned NW = PW + FW,
  localparam int unsigned AW = PW + 1,
  localparam int unsigned ACC_W = LW + 3,   // five LUT terms
  localparam int unsigned SUM_W = ((ACC_W > NW + 1) ? ACC_W : NW + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2:0]           phase,
  input  logic [3:0]           nbr_valid,   // indexed by rf_pkg::nbr_e
  input  logic                 copy_wr,
  // memory read data
  input  logic [PW-1:0]        src_rdata,
  input  logic [NW-1:0]        dst_rdata,
  // look-up tables
  output logic [AW-1:0]        lut1_addr,
  input  logic signed [LW-1:0] lut1_rdata,
  output logic [AW-1:0]        lut2_addr,
  input  logic signed [LW-1:0] lut2_rdata,
  // write-back value for the destination memory
  output logic [NW-1:0]        wdata
);

  logic [NW-1:0]           oc_q;     // O_n of the pixel being updated
  logic signed [ACC_W-1:0] acc_q;
  logic signed [AW-1:0]    diff;
  logic [PW-1:0]           oc_int;
  logic                    nb_ok;
  logic signed [SUM_W-1:0] sum;

  assign oc_int = (phase == 3'd1) ? dst_rdata[NW-1:FW] : oc_q[NW-1:FW];

  // Signed difference of integer pixel values, the LUT address.
  always_comb begin
    if (phase == 3'd1)
      diff = $signed({1'b0, src_rdata}) - $signed({1'b0, oc_int});
    else
      diff = $signed({1'b0, dst_rdata[NW-1:FW]}) - $signed({1'b0, oc_int});
    lut1_addr = diff;
    lut2_addr = diff;
  end

  // Which neighbour's G() arrives from LUT_2 in this phase.
  always_comb begin
    unique case (phase)
      3'd3:    nb_ok = nbr_valid[NB_UP];
      3'd4:    nb_ok = nbr_valid[NB_DOWN];
      3'd5:    nb_ok = nbr_valid[NB_LEFT];
      3'd6:    nb_ok = nbr_valid[NB_RIGHT];
      default: nb_ok = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oc_q      <= '0;
      acc_q     <= '0;
    end else begin
      unique case (phase)
        3'd1: oc_q <= dst_rdata;
        3'd2: acc_q <= ACC_W'(lut1_rdata);
        3'd3, 3'd4, 3'd5, 3'd6: begin
          if (nb_ok) acc_q <= acc_q + ACC_W'(lut2_rdata);
        end
        default: ;
      endcase
    end
  end

  // Saturating write-back value.
  always_comb begin
    sum = $signed(SUM_W'({1'b0, oc_q})) + SUM_W'(acc_q);
    if (copy_wr) begin
      wdata = {src_rdata, {FW{1'b0}}};
    end else if (sum < 0) begin
      wdata = '0;
    end else if (sum > $signed(SUM_W'({1'b0, {NW{1'b1}}}))) begin
      wdata = '1;
    end else begin
      wdata = NW'(sum);
    end
  end

endmodule
