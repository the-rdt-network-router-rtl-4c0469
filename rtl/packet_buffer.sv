// packet_buffer: dual-port RAM holding the flits of one packet.
//
// One write port and one read port work in the same cycle, so a flit can be
// pushed while another is pulled: this is what lets a packet be forwarded
// while its tail is still arriving, and lets the next packet be written while
// the last multicast of the previous one is still reading.  Flit i of a packet
// always sits at address i.  The depth (16 flits) is the longest packet; the
// width is one 18-bit bit-slice.  Both follow the document; the synchronous
// read (data one clock after the address) is this design's choice.
//
// Timing: write on the rising edge when we=1; rdata = mem[raddr] registered
// on the rising edge.  No reset: the contents are only read after being
// written.
module packet_buffer #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 18,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
