// rf_dest_mem: the "destination memory" that holds the node values O_n.
//
// The segmentation engine updates node values in place, so this RAM has one
// write port and one read port, both owned by the engine while it runs. When
// the engine is idle (host_sel high) the read port is handed to the host,
// which reads back the segmented image. Reads are synchronous: rdata holds
// the addressed word one clock after the address is presented. A write and a
// read of the same word in the same cycle return the old word; the engine's
// schedule never needs the new one in that cycle. No reset; contents are
// whatever was last written.
module rf_dest_mem #(
  parameter int unsigned DEPTH = rf_pkg::IMG_W * rf_pkg::IMG_H,
  parameter int unsigned WIDTH = rf_pkg::NODE_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // engine write port
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  // engine read port
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  // host read port, used when host_sel is high
  input  logic             host_sel,
  input  logic             host_re,
  input  logic [AW-1:0]    host_raddr,
  // shared read data
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic             rd_en;
  logic [AW-1:0]    rd_addr;

  always_comb begin
    rd_en   = host_sel ? host_re    : re;
    rd_addr = host_sel ? host_raddr : raddr;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rdata <= mem[rd_addr];
  end

endmodule
