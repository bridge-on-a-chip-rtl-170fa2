// asb_arbiter -- bus arbiter for two masters sharing one system bus.
//
// On the WLAN bus the WLAN ARM core and the DMA engine of the physical
// attachment interface both start transfers. When the bus is free the
// arbiter grants a requesting master at once, alternating between the two
// when both ask (round robin); the grant is then held until the slave
// answers with ready, so a transfer is never split. The master without the
// grant simply waits with its request raised.
//
// Timing: no added cycle for an uncontended transfer (the request passes
// straight through); a waiting master starts in the cycle after the other
// master's ready. conflict pulses when a grant is made while both request.
//
// Following the architecture: the "arbiter" part of the Decoder/Arbiter/
// Bridge of the WLAN bus, between the WLAN ARM and the PAI DMA. Round robin
// is this design's own choice.
module asb_arbiter
  import boc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req [2],
  output bus_rsp_t m_rsp [2],
  output bus_req_t s_req,
  input  bus_rsp_t s_rsp,
  output logic     conflict
);

  logic busy, owner, last, pick, cur, any;

  assign any  = m_req[0].req || m_req[1].req;
  assign pick = (m_req[0].req && m_req[1].req) ? !last : m_req[1].req;
  assign cur  = busy ? owner : pick;

  always_comb begin
    s_req = m_req[cur];
    if (!busy && !any) s_req.req = 1'b0;
    for (int i = 0; i < 2; i++)
      m_rsp[i] = (cur == 1'(i)) ? s_rsp : BUS_RSP_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      owner    <= 1'b0;
      last     <= 1'b1;
      conflict <= 1'b0;
    end else begin
      conflict <= !busy && m_req[0].req && m_req[1].req;
      if (!busy) begin
        if (any && !s_rsp.ready) begin
          busy  <= 1'b1;
          owner <= pick;
        end else if (any) last <= pick;
      end else if (s_rsp.ready) begin
        busy <= 1'b0;
        last <= owner;
      end
    end
  end

endmodule
