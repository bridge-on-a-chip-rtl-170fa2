// asb_decoder -- address decoder of one on-chip system bus.
//
// Routes each transfer of the bus master to the slave that owns its address
// region. Regions are the 256 MB blocks selected by address bits 31:28;
// REGIONS holds, for slave i, its 4-bit region code in bits 4*i+3:4*i. A
// transfer to an address no slave owns is answered by the decoder itself
// one cycle after it is taken, reading zero, and pulses err for one cycle,
// so a stray access cannot hang the bus.
//
// Timing: purely combinational between master and slaves apart from the
// default slave; the request reaches only the selected slave, and the
// selected slave's response goes back to the master.
//
// Following the architecture: the "decoder" part of the Decoder/Arbiter/
// Bridge of each ARM bus. The region map is this design's own.
module asb_decoder
  import boc_pkg::*;
#(
  parameter int unsigned    NS      = 5,
  parameter logic [4*NS-1:0] REGIONS = 20'h43210
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req,
  output bus_rsp_t m_rsp,
  output bus_req_t s_req [NS],
  input  bus_rsp_t s_rsp [NS],
  output logic     err
);

  logic          hit;
  logic [NS-1:0] sel;
  logic          def_rdy;

  always_comb begin
    hit = 1'b0;
    for (int unsigned i = 0; i < NS; i++) begin
      sel[i]       = (m_req.addr[31:28] == REGIONS[4*i +: 4]);
      hit          = hit | sel[i];
      s_req[i]     = m_req;
      s_req[i].req = m_req.req && sel[i];
    end
    m_rsp = '{ready: def_rdy, rdata: 32'h0};
    for (int unsigned i = 0; i < NS; i++)
      if (sel[i]) m_rsp = s_rsp[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) def_rdy <= 1'b0;
    else        def_rdy <= m_req.req && !hit && !def_rdy;
  end

  assign err = def_rdy;

endmodule
