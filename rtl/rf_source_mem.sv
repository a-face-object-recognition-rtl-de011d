// rf_source_mem: the "source memory" that holds the input image I_n.
//
// A simple dual-port RAM of DEPTH words: the host loads pixels through the
// write port, and the segmentation datapath reads them through the read port.
// Reads are synchronous: rdata holds mem[raddr] one clock after raddr is
// presented (re high). The memory has no reset; its contents are whatever
// the host last wrote. Sized for one 64x64 image of 8-bit pixels by default.
module rf_source_mem #(
  parameter int unsigned DEPTH = rf_pkg::IMG_W * rf_pkg::IMG_H,
  parameter int unsigned WIDTH = rf_pkg::PIX_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // host write port
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  // datapath read port
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
