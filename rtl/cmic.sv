// cmic -- Common Memory Interface Controller.
//
// The single point of access to the shared data memory, which holds the Rx
// connection table, the free buffer queue, all buffer descriptors, the
// transmit schedule table, the segmentation queue descriptors and the data
// buffers. Four masters reach it: the Segmentation Processor and the
// Reassembly Processor over their dedicated paths, and the two ARM cores
// through the inter-networking ASB and the WLAN ASB. Sharing one memory lets
// a packet move from one network to the other without being copied.
//
// How it works: when idle, a round-robin arbiter picks one requesting port,
// starting its search after the port served last, and latches its address,
// direction and write data. The external memory cycle then lasts WAIT+1
// clock cycles with the chip enable low; in the last of them the port gets
// ready, with read data taken straight from mem_rdata (an asynchronous SRAM
// is assumed). The controller then spends one cycle idle, so a port is never
// served twice on the strength of one request, and an access costs WAIT+2
// cycles. contention pulses when a grant is made while another port waits.
//
// Port order is a convention of the top level: 0 segmentation path,
// 1 reassembly path, 2 inter-networking ASB, 3 WLAN ASB.
//
// Following the architecture: arbitration among SP, RP, IWARM and WLANARM,
// and the external memory bus (55 signals: here 20 address, 32 data and
// three strobes; the data bus is split into mem_wdata/mem_rdata, to be
// merged in the pad ring). Own choices: round-robin policy, word-wide SRAM,
// one wait state.
module cmic
  import boc_pkg::*;
#(
  parameter int unsigned NM     = 4,
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned WAIT   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bus_req_t          s_req [NM],
  output bus_rsp_t          s_rsp [NM],
  // external memory bus
  output logic [ADDR_W-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata,
  output logic              mem_ce_n,
  output logic              mem_oe_n,
  output logic              mem_we_n,
  output logic              contention
);

  localparam int unsigned GW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned CW = $clog2(WAIT + 1) + 1;

  logic              busy;
  logic [GW-1:0]     gnt, last;
  logic [CW-1:0]     cnt;
  logic              we_q;
  logic [ADDR_W-1:0] addr_q;
  logic [31:0]       wdata_q;

  logic          any;
  logic [GW-1:0] pick;
  int unsigned   nreq;

  always_comb begin
    any  = 1'b0;
    pick = '0;
    nreq = 0;
    for (int unsigned k = 1; k <= NM; k++) begin
      int unsigned i;
      i = (int'(last) + k) % NM;
      if (s_req[i].req) begin
        nreq++;
        if (!any) begin
          any  = 1'b1;
          pick = GW'(i);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      gnt        <= '0;
      last       <= GW'(NM - 1);
      cnt        <= '0;
      we_q       <= 1'b0;
      addr_q     <= '0;
      wdata_q    <= '0;
      contention <= 1'b0;
    end else begin
      contention <= 1'b0;
      if (!busy) begin
        if (any) begin
          busy       <= 1'b1;
          gnt        <= pick;
          last       <= pick;
          cnt        <= CW'(WAIT);
          we_q       <= s_req[pick].we;
          addr_q     <= s_req[pick].addr[ADDR_W+1:2];
          wdata_q    <= s_req[pick].wdata;
          contention <= (nreq > 1);
        end
      end else if (cnt == 0) begin
        busy <= 1'b0;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  assign mem_addr  = addr_q;
  assign mem_wdata = wdata_q;
  assign mem_ce_n  = !busy;
  assign mem_oe_n  = !(busy && !we_q);
  // write strobe in the last cycle of the access, after the address settled
  assign mem_we_n  = !(busy && we_q && cnt == 0);

  always_comb begin
    for (int unsigned i = 0; i < NM; i++) begin
      s_rsp[i].ready = busy && (cnt == 0) && (gnt == GW'(i));
      s_rsp[i].rdata = mem_rdata;
    end
  end

endmodule
