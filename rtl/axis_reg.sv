// axis_reg: AXI-stream register slice.
//
// Registers one stream of W-bit payload (TDATA with any TUSER/TLAST packed in)
// between two blocks. The reference design places such a register after its
// input and on each of its four outputs; how it handles the handshake is this
// design's choice: a two-entry skid buffer. m_tdata/m_tvalid come straight from
// flip-flops and s_tready is registered too, so no combinational path crosses
// the slice, and it still passes one word per clock. When the output stalls,
// the word already in flight is caught in the skid register.
// Latency: one clock from s_tvalid && s_tready to m_tvalid. An assertion
// checks that a stalled output word is held.
module axis_reg #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] s_tdata,
  input  logic         s_tvalid,
  output logic         s_tready,
  output logic [W-1:0] m_tdata,
  output logic         m_tvalid,
  input  logic         m_tready
);
  logic [W-1:0] skid_data;
  logic         skid_valid;

  assign s_tready = !skid_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_tvalid   <= 1'b0;
      skid_valid <= 1'b0;
      m_tdata    <= '0;
      skid_data  <= '0;
    end else begin
      if (!m_tvalid || m_tready) begin
        // output register is free (or being emptied): refill it
        if (skid_valid) begin
          m_tdata    <= skid_data;
          m_tvalid   <= 1'b1;
          skid_valid <= 1'b0;
        end else begin
          m_tdata  <= s_tdata;
          m_tvalid <= s_tvalid;
        end
      end else if (s_tvalid && s_tready) begin
        // output stalled: park the incoming word
        skid_data  <= s_tdata;
        skid_valid <= 1'b1;
      end
    end
  end

  // AXI-stream rule: a word offered and not taken stays unchanged
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata));
endmodule
