// int_ctrl -- interrupt controller of one ARM core.
//
// Collects up to NSRC interrupt sources, each a one-cycle pulse or a level,
// into a sticky status register, masks it with an enable register and
// drives the core's IRQ line while any enabled status bit is set. Software
// reads the status to find the cause and clears bits by writing ones.
//
// Register map (byte offsets): 0x00 STATUS (read; write 1 to clear),
// 0x04 ENABLE (read/write), 0x08 PENDING = STATUS & ENABLE (read),
// 0x0C RAW source inputs (read). A source active in the same cycle as the
// clear of its bit stays set.
//
// Bus timing: a request is answered one cycle after it is taken; irq is a
// registered output, high one cycle after an enabled source fires.
//
// Following the architecture: an interrupt controller among the peripherals
// of each ARM core. Its registers are this design's own.
module int_ctrl
  import boc_pkg::*;
#(
  parameter int unsigned NSRC = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  bus_req_t        s_req,
  output bus_rsp_t        s_rsp,
  input  logic [NSRC-1:0] src,
  output logic            irq
);

  logic [NSRC-1:0] status, enable;
  logic            rdy_q;
  logic [31:0]     rdata_q;
  logic            take;

  assign take = s_req.req && !rdy_q;

  // bits software clears in this cycle
  logic [NSRC-1:0] clr;
  assign clr = (take && s_req.we && s_req.addr[3:2] == 2'd0) ? s_req.wdata[NSRC-1:0] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status  <= '0;
      enable  <= '0;
      rdy_q   <= 1'b0;
      rdata_q <= '0;
      irq     <= 1'b0;
    end else begin
      rdy_q <= take;
      if (take) begin
        case (s_req.addr[3:2])
          2'd0: rdata_q <= 32'(status);
          2'd1: rdata_q <= 32'(enable);
          2'd2: rdata_q <= 32'(status & enable);
          default: rdata_q <= 32'(src);
        endcase
        if (s_req.we) begin
          if (s_req.addr[3:2] == 2'd1) enable <= s_req.wdata[NSRC-1:0];
        end
      end
      status <= (status & ~clr) | src;
      irq    <= |(((status & ~clr) | src) & enable);
    end
  end

  assign s_rsp = '{ready: rdy_q, rdata: rdata_q};

endmodule
