// sdp_ram -- simple dual-port memory with a registered read port.
//
// Models an FPGA block RAM used in simple dual-port mode: one write port and
// one read port on the same clock. The read address is registered, so data
// appears on rdata in the cycle after raddr is presented. A read of the
// address written in the same cycle returns the old contents; the queue
// manager's six-cycle schedule never does that. There is no reset: the
// contents are defined by the writes (the queue manager initialises the
// linked list after reset).
//
// The scheduler uses it for the linked list memory (F words of next-address
// links) and for the three pointer memories of the virtual queues (N words
// each). Depth and width are parameters; defaults are the linked list
// memory of a 128-port switch with F = 128.
module sdp_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 7,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
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
