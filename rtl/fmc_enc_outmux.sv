// Output multiplexer of the dual-core FMC encoder.
//
// The two SPIHT cores finish their blocks in different cycles (their work is
// offset by one pipe time), so only one block bitstream is sent out at a
// time.  When a core raises done, its bitstream is copied into the output
// register and sent as nwords 64-bit words (6, 5 or 4 for the three target
// compression ratios), one per cycle starting in the next cycle; out_last
// marks the last word.  Word w carries bitstream bits 64w+63..64w.  A new
// done arrives at least 8 cycles after the previous one, so a block is
// always sent before the next is taken.  There is no back-pressure on the
// output: the bus side is assumed to take a word every cycle of a burst.
// Selecting one core's finished stream follows the FMC design; copying it
// into an output register is this design's choice (the core may start its
// next block while the words are still being sent).
module fmc_enc_outmux
  import fmc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         done,
  input  logic [TBL_MAX-1:0] bs [2],
  input  logic [2:0]         nwords,
  output logic               out_valid,
  output logic [BUS_W-1:0]   out_data,
  output logic               out_last
);
  localparam int NW = TBL_MAX / BUS_W;

  logic [BUS_W-1:0] words [NW];
  logic [2:0]       idx, n_q;
  logic             busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
      n_q  <= '0;
    end else if (done != 2'b00) begin
      busy <= 1'b1;
      idx  <= '0;
      n_q  <= nwords;
    end else if (busy) begin
      idx  <= idx + 3'd1;
      if (idx + 3'd1 == n_q) busy <= 1'b0;
    end
    if (done != 2'b00)
      for (int w = 0; w < NW; w++)
        words[w] <= done[1] ? bs[1][w*BUS_W +: BUS_W] : bs[0][w*BUS_W +: BUS_W];
  end

  assign out_valid = busy;
  assign out_data  = busy ? words[idx] : '0;
  assign out_last  = busy && (idx + 3'd1 == n_q);

  // the two cores never finish in the same cycle
  a_one_done: assert property (@(posedge clk) disable iff (!rst_n) done != 2'b11);
endmodule
