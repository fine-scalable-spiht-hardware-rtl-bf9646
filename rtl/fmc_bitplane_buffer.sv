// Bit-plane buffer of one SPIHT encoder core: DEPTH words of WIDTH bits
// (four 64-bit bit-planes by default, 256 bits).
//
// The transpose stage writes the four lower magnitude planes of a block here
// while the core is busy with the upper planes; one pipe time later the core
// reads them back, one plane per cycle.  Synchronous write (we, waddr,
// wdata), asynchronous read (raddr -> rdata in the same cycle).  The size is
// the one the FMC design gives for each core's buffer; the port arrangement
// is this design's choice.
module fmc_bitplane_buffer #(
  parameter int DEPTH = 4,
  parameter int WIDTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
