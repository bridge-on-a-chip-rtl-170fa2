// prog_mem_ctrl -- program memory controller of one ARM core (IWMEM, WLANMEM).
//
// Gives an ARM core its own path to an external program memory, so that
// instruction fetches never compete with the other core or with the ATM
// hardware. The external memory is 16 bits wide: a 32-bit bus transfer is
// done as two halfword accesses, the high halfword (big-endian) at the even
// halfword address first. Each halfword access holds the chip enable low
// for WAIT+1 cycles; reads sample pm_rdata in the last of them and write
// strobes come in the last of them.
//
// Interface and timing: the bus side is the on-chip transfer handshake; a
// word costs 2*(WAIT+1) cycles plus one cycle to take the request. The
// external side has PADDR_W halfword address lines, 16 data lines (split
// into pm_wdata/pm_rdata) and three strobes: 16 + 16 + 3 = 35 signals.
//
// Following the architecture: one program memory controller per ARM core
// with a 35-signal external memory bus. Own choices: the 16-bit memory
// width and the split of the 35 signals, the access timing.
module prog_mem_ctrl
  import boc_pkg::*;
#(
  parameter int unsigned PADDR_W = 16,
  parameter int unsigned WAIT    = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_req_t           s_req,
  output bus_rsp_t           s_rsp,
  output logic [PADDR_W-1:0] pm_addr,
  output logic [15:0]        pm_wdata,
  input  logic [15:0]        pm_rdata,
  output logic               pm_ce_n,
  output logic               pm_oe_n,
  output logic               pm_we_n
);

  localparam int unsigned CW = $clog2(WAIT + 1) + 1;

  typedef enum logic [1:0] {P_IDLE, P_HI, P_LO, P_DONE} pstate_t;

  pstate_t          st;
  logic [CW-1:0]    cnt;
  logic [15:0]      hi_q;

  assign pm_addr  = {s_req.addr[PADDR_W:2], (st == P_LO)};
  assign pm_wdata = (st == P_LO) ? s_req.wdata[15:0] : s_req.wdata[31:16];
  assign pm_ce_n  = !(st == P_HI || st == P_LO);
  assign pm_oe_n  = pm_ce_n || s_req.we;
  assign pm_we_n  = pm_ce_n || !s_req.we || (cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= P_IDLE;
      cnt  <= '0;
      hi_q <= '0;
    end else begin
      case (st)
        P_IDLE: if (s_req.req) begin
          st  <= P_HI;
          cnt <= CW'(WAIT);
        end
        P_HI: if (cnt == 0) begin
          hi_q <= pm_rdata;
          st   <= P_LO;
          cnt  <= CW'(WAIT);
        end else cnt <= cnt - 1'b1;
        P_LO: if (cnt == 0) st <= P_DONE;
              else          cnt <= cnt - 1'b1;
        default: st <= P_IDLE;
      endcase
    end
  end

  // the low halfword is registered in the last cycle of P_LO and returned,
  // with the high halfword, together with ready in P_DONE
  logic [15:0] lo_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lo_q <= '0;
    else if (st == P_LO && cnt == 0) lo_q <= pm_rdata;
  end

  assign s_rsp = '{ready: (st == P_DONE), rdata: {hi_q, lo_q}};

endmodule
