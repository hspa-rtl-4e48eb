// sdp_ram: simple dual-port memory, one write port and one synchronous read
// port, as an FPGA block RAM provides. Accelerator-I uses it for every memory
// it has: each CE core's copy of the dense operand D, RAM_P holding the
// indices of the nonzero coefficients of B, and RAM_W holding the product.
//
// Timing: a write with we=1 takes effect at the clock edge. A read with re=1
// presents the word at raddr on rdata in the next cycle; rdata holds its value
// while re=0. A read of the address being written returns the old word.
// Contents are not reset (a block RAM is not); the accelerator never reads a
// word it has not written. Word size and depth follow the document
// (N_mem = 128 bits, ceil(n/N_mem) words); the one-cycle latency is this
// design's choice.
module sdp_ram #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 139,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
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
