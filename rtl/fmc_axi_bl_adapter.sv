// Burst-length adapter for one AXI address channel (write or read) between
// the video codec and the bus.
//
// The codec moves frame data in bursts of BL_IN (16) beats of 64 bits, i.e.
// two 8x8 luma blocks.  After compression the same two blocks need only 12,
// 10 or 8 beats at target compression ratios of 25%, 37.5% and 50%
// (cr_mode 0, 1, 2), so a request of BL_IN beats is forwarded with its
// length rewritten to that value; any other request is forwarded unchanged.
// The address is kept, so every compressed burst starts where its
// uncompressed burst would and random access stays trivial.  This is a
// one-entry register slice: s_ready is high while the slice is empty or being
// emptied; a request appears on m_* one cycle after it is accepted.  AXI
// lengths are beats minus one.  The length rule follows the FMC design; the
// address mapping and the register slice are this design's choices.
module fmc_axi_bl_adapter #(
  parameter int ADDR_W = 32,
  parameter int BL_IN  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        cr_mode,
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [ADDR_W-1:0] s_addr,
  input  logic [7:0]        s_len,
  output logic              m_valid,
  input  logic              m_ready,
  output logic [ADDR_W-1:0] m_addr,
  output logic [7:0]        m_len
);
  function automatic logic [7:0] comp_len(logic [1:0] cr);
    case (cr)
      2'd0:    return 8'd11;   // 12 beats
      2'd1:    return 8'd9;    // 10 beats
      default: return 8'd7;    //  8 beats
    endcase
  endfunction

  assign s_ready = !m_valid || m_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
    end else if (s_ready) begin
      m_valid <= s_valid;
    end
    if (s_valid && s_ready) begin
      m_addr <= s_addr;
      m_len  <= (s_len == 8'(BL_IN - 1)) ? comp_len(cr_mode) : s_len;
    end
  end

  // AXI rule: a request stays valid and stable until it is taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           m_valid && !m_ready |=> m_valid && $stable(m_addr) && $stable(m_len));
endmodule
