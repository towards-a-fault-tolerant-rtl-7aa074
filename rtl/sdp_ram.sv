// sdp_ram - simple dual-port block RAM, one write port and one read port.
//
// Write: when we is high, wdata is stored at waddr on the rising clock edge.
// Read: when re is high, the word at raddr appears on rdata after the edge
// (one cycle of latency, registered output, read-before-write when both ports
// address the same word). This is the behaviour of an FPGA block RAM and is
// used for both the main image memory and the back-up star memory. The array
// has no reset, like the memory it models.
module sdp_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned W     = 9,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
