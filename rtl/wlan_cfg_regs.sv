// wlan_cfg_regs -- WLAN configuration registers between the two ASBs.
//
// The only direct path between the inter-networking ARM and the WLAN ARM
// besides the common memory. Each side owns NMSG message registers that it
// writes and the other side reads, and each side can ring doorbell bits at
// the other, which raise that side's interrupt until it clears them. A
// message carries, for instance, the address of the Tx buffer descriptors
// of a packet to send on the WLAN, or of the Rx buffer descriptors of a
// frame just received from it.
//
// Register map, the same on both ports (byte offsets):
//   0x00 + 4*i  message i from the inter-networking side (IW writes)
//   0x20 + 4*i  message i from the WLAN side (WLAN writes)
//   0x40        doorbell: a write sets these bits at the other side;
//               a read returns the doorbell bits pending for this side
//   0x44        doorbell clear: a write clears these bits for this side
// Writes to the other side's messages are ignored.
//
// Bus timing: each port answers one cycle after it takes a request (two
// cycles per transfer). irq_to_iw / irq_to_wl are high while any doorbell
// bit for that side is set.
//
// Following the architecture: a set of registers reachable from both the
// inter-networking ASB and the WLAN ASB, used to tell the other processor
// of a packet and pass it a descriptor pointer. Own choices: the mailbox
// and doorbell organisation, NMSG = 4 and 8 doorbell bits.
module wlan_cfg_regs
  import boc_pkg::*;
#(
  parameter int unsigned NMSG = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t iw_req,
  output bus_rsp_t iw_rsp,
  input  bus_req_t wl_req,
  output bus_rsp_t wl_rsp,
  output logic     irq_to_iw,
  output logic     irq_to_wl
);

  logic [31:0] msg_iw [NMSG];   // written by the inter-networking side
  logic [31:0] msg_wl [NMSG];   // written by the WLAN side
  logic [7:0]  db_iw, db_wl;    // doorbells pending for each side
  logic        iw_rdy, wl_rdy;
  logic [31:0] iw_rd, wl_rd;
  logic        iw_take, wl_take;

  assign iw_take = iw_req.req && !iw_rdy;
  assign wl_take = wl_req.req && !wl_rdy;

  localparam int unsigned MI = (NMSG > 1) ? $clog2(NMSG) : 1;
  typedef logic [MI-1:0] midx_t;

  // doorbell bits set and cleared in this cycle
  logic [7:0] set_iw, set_wl, clr_iw, clr_wl;
  assign set_wl = (iw_take && iw_req.we && iw_req.addr[6:2] == 5'h10) ? iw_req.wdata[7:0] : '0;
  assign clr_iw = (iw_take && iw_req.we && iw_req.addr[6:2] == 5'h11) ? iw_req.wdata[7:0] : '0;
  assign set_iw = (wl_take && wl_req.we && wl_req.addr[6:2] == 5'h10) ? wl_req.wdata[7:0] : '0;
  assign clr_wl = (wl_take && wl_req.we && wl_req.addr[6:2] == 5'h11) ? wl_req.wdata[7:0] : '0;

  function automatic logic [31:0] rd(logic [6:0] a, logic [31:0] mi [NMSG],
                                     logic [31:0] mw [NMSG], logic [7:0] db);
    if (a[6])                               return (a[5:2] == 4'd0) ? {24'h0, db} : 32'h0;
    else if (int'(a[4:2]) >= NMSG)          return 32'h0;
    else if (a[5])                          return mw[midx_t'(a[4:2])];
    else                                    return mi[midx_t'(a[4:2])];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NMSG; i++) begin
        msg_iw[i] <= '0;
        msg_wl[i] <= '0;
      end
      db_iw  <= '0;
      db_wl  <= '0;
      iw_rdy <= 1'b0;
      wl_rdy <= 1'b0;
      iw_rd  <= '0;
      wl_rd  <= '0;
    end else begin
      iw_rdy <= iw_take;
      wl_rdy <= wl_take;
      if (iw_take) begin
        iw_rd <= rd(iw_req.addr[6:0], msg_iw, msg_wl, db_iw);
        if (iw_req.we) begin
          if (!iw_req.addr[6] && !iw_req.addr[5] && int'(iw_req.addr[4:2]) < NMSG)
            msg_iw[midx_t'(iw_req.addr[4:2])] <= iw_req.wdata;
        end
      end
      if (wl_take) begin
        wl_rd <= rd(wl_req.addr[6:0], msg_iw, msg_wl, db_wl);
        if (wl_req.we) begin
          if (!wl_req.addr[6] && wl_req.addr[5] && int'(wl_req.addr[4:2]) < NMSG)
            msg_wl[midx_t'(wl_req.addr[4:2])] <= wl_req.wdata;
        end
      end
      db_iw <= (db_iw & ~clr_iw) | set_iw;
      db_wl <= (db_wl & ~clr_wl) | set_wl;
    end
  end

  assign iw_rsp    = '{ready: iw_rdy, rdata: iw_rd};
  assign wl_rsp    = '{ready: wl_rdy, rdata: wl_rd};
  assign irq_to_iw = |db_iw;
  assign irq_to_wl = |db_wl;

endmodule
