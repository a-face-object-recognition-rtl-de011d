// rf_lut: look-up table memory used for LUT_1 and LUT_2 of the resistive-fuse
// circuit.
//
// LUT_1 maps the difference x = I_n - O_n to the current sigma*x that flows
// from the input source into node n. LUT_2 maps a neighbour difference
// d = O_k - O_n to the current G(d) through the nonlinear element between two
// nodes: linear (g*d) for a plain resistive network, and cut to zero when
// |d| reaches the threshold delta for a resistive fuse. Keeping both
// functions in RAM lets the host change sigma, g and delta, and switch the
// element from linear to fuse between runs, without touching the logic.
//
// The table is addressed by the signed difference in two's complement
// (LUT_AW bits, so index 0x1FF is -1). The host writes entries; the datapath
// reads them. Reads are synchronous with one clock of latency. Output words
// are signed currents with rf_pkg::FRAC_W fraction bits. No reset.
module rf_lut #(
  parameter int unsigned AW = rf_pkg::LUT_AW,
  parameter int unsigned DW = rf_pkg::LUT_W
) (
  input  logic                 clk,
  // host write port
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic signed [DW-1:0] wdata,
  // datapath read port
  input  logic [AW-1:0]        raddr,
  output logic signed [DW-1:0] rdata
);

  logic signed [DW-1:0] table_q [2**AW];

  always_ff @(posedge clk) begin
    if (we) table_q[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= table_q[raddr];
  end

endmodule
