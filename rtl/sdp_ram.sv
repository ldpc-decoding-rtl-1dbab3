// sdp_ram: simple dual-port synchronous memory, one write port and one read port, used for the
// Q (LPQ) memory, the Q sign memory and the hard-decision memory.
//
// A word is one circulant-wide vector. The read data appears one clock after the read address
// (registered read, as an SRAM macro would behave); a read of the address being written in the
// same cycle returns the old word. Contents are not reset. Memory organisation (depth = block
// columns or non-zero circulants, width = circulant size times bits per message) follows the
// decoder's memory plan; the port arrangement is this design's choice.
module sdp_ram #(
  parameter int DEPTH = 24,
  parameter int WIDTH = 768,
  parameter int AW    = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
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
    if (re) rdata <= mem[raddr];
  end

endmodule
