// Output multiplexer of the dual-core FMC decoder.
//
// The two iSPIHT cores finish their blocks in different cycles.  When a core
// pulses done, its coefficient buffer is copied into the hold register coef
// and valid is raised; the inverse DWT takes the block with take (at its next
// pipe boundary), which clears valid.  A new done always comes at least 8
// cycles after the previous one, after the block has been taken.  Selecting
// the finished core follows the FMC design; the hold register is this
// design's choice (the core may start its next block right away).
module fmc_dec_outmux
  import fmc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  done [2],
  input  coef_t coef_in [2][NCOEF],
  input  logic  take,
  output logic  valid,
  output coef_t coef [NCOEF]
);
  always_ff @(posedge clk) begin
    if (!rst_n)                valid <= 1'b0;
    else if (done[0] || done[1]) valid <= 1'b1;
    else if (take)             valid <= 1'b0;
    if (done[0])      coef <= coef_in[0];
    else if (done[1]) coef <= coef_in[1];
  end

  a_one_done: assert property (@(posedge clk) disable iff (!rst_n) !(done[0] && done[1]));
endmodule
