// FMC decoder: turns fixed-size block bitstreams (6, 5 or 4 words of 64 bits
// for cr_mode 0, 1, 2) back into 8x8 pixel blocks, 8 pixels per cycle.
//
// Everything runs on a pipe time of 8 cycles (pc = 0..7):
//   * input: the words of one block are collected in an input buffer
//     (in_ready is low while it holds a complete block);
//   * at the end of the pipe time in which the block became complete it is
//     handed to iSPIHT core (block parity), which decodes it in 11 cycles,
//     i.e. within its two pipe times;
//   * the output multiplexer takes the finished core's coefficients and the
//     2D iDWT loads them at the next pipe boundary;
//   * in the following pipe time the iDWT sends out the 8 rows.
// Even and odd blocks go to two cores, so one block leaves per pipe time
// although a core needs more than 8 cycles.  The dual-core scheme, the
// two-pipe-time decoding and the single shared iDWT follow the FMC design;
// the input buffer and the handshake are this design's choices.  cr_mode is
// expected to stay constant while blocks are in flight.
module fmc_decoder
  import fmc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        cr_mode,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [BUS_W-1:0]  in_data,
  output logic              out_valid,
  output logic [BUS_W-1:0]  out_data
);
  localparam int NW = TBL_MAX / BUS_W;

  logic [2:0]         pc, wcnt;
  logic               full, sel;
  logic [TBL_MAX-1:0] ibuf;
  logic               start [2];

  assign in_ready = !full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc   <= '0;
      wcnt <= '0;
      full <= 1'b0;
      sel  <= 1'b0;
    end else begin
      pc <= pc + 3'd1;
      if (in_valid && in_ready) begin
        wcnt <= wcnt + 3'd1;
        if (wcnt + 3'd1 == tbl_words(cr_mode)) full <= 1'b1;
      end
      if (full && pc == 3'd7) begin
        full <= 1'b0;
        wcnt <= '0;
        sel  <= ~sel;
      end
    end
    if (in_valid && in_ready) begin
      if (wcnt == 3'd0) ibuf <= TBL_MAX'(in_data);
      else ibuf[wcnt*BUS_W +: BUS_W] <= in_data;
    end
  end

  assign start[0] = full && pc == 3'd7 && sel == 1'b0;
  assign start[1] = full && pc == 3'd7 && sel == 1'b1;

  logic  done [2];
  coef_t cc [2][NCOEF];
  for (genvar k = 0; k < 2; k++) begin : g_core
    ispiht_core u_core (
      .clk, .rst_n, .start(start[k]), .bs_in(ibuf), .tbl_in(tbl_bits(cr_mode)),
      .done(done[k]), .coef(cc[k]));
  end

  logic  mv;
  coef_t mc [NCOEF];
  wire   take = mv && pc == 3'd7;
  fmc_dec_outmux u_mux (.clk, .rst_n, .done, .coef_in(cc), .take, .valid(mv), .coef(mc));

  fmc_idwt2d u_idwt (.clk, .rst_n, .load(take), .coef(mc), .out_valid, .out_row(out_data));

endmodule
