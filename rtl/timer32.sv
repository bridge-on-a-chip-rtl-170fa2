// timer32 -- 32-bit down-counting timer with reload.
//
// Counts down once per clock while enabled. On reaching zero it raises its
// interrupt (a one-cycle pulse on irq and a sticky flag) and then either
// reloads from LOAD (periodic mode) or stops (one-shot mode). Writing LOAD
// also restarts the count from the new value.
//
// Register map (byte offsets): 0x00 LOAD, 0x04 VALUE (read), 0x08 CTRL
// (bit0 enable, bit1 periodic), 0x0C FLAG (read; any write clears it).
//
// Bus timing: a request is answered one cycle after it is taken. With
// LOAD = N the interrupt fires N+1 cycles after the count starts, and every
// N+1 cycles in periodic mode.
//
// Following the architecture: the 32-bit timers among the ARM peripherals,
// used by the MAC and bridge microcode for its protocol timeouts. Their
// registers and modes are this design's own.
module timer32
  import boc_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t s_req,
  output bus_rsp_t s_rsp,
  output logic     irq
);

  logic [W-1:0] load, value;
  logic         en, periodic, flag;
  logic         rdy_q;
  logic [31:0]  rdata_q;
  logic         take;

  assign take = s_req.req && !rdy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load     <= '0;
      value    <= '0;
      en       <= 1'b0;
      periodic <= 1'b0;
      flag     <= 1'b0;
      irq      <= 1'b0;
      rdy_q    <= 1'b0;
      rdata_q  <= '0;
    end else begin
      irq   <= 1'b0;
      rdy_q <= take;
      if (en) begin
        if (value == '0) begin
          irq  <= 1'b1;
          flag <= 1'b1;
          if (periodic) value <= load;
          else          en    <= 1'b0;
        end else begin
          value <= value - 1'b1;
        end
      end
      if (take) begin
        case (s_req.addr[3:2])
          2'd0: rdata_q <= 32'(load);
          2'd1: rdata_q <= 32'(value);
          2'd2: rdata_q <= {30'h0, periodic, en};
          default: rdata_q <= {31'h0, flag};
        endcase
        if (s_req.we) begin
          case (s_req.addr[3:2])
            2'd0: begin
              load  <= s_req.wdata[W-1:0];
              value <= s_req.wdata[W-1:0];
            end
            2'd2: {periodic, en} <= s_req.wdata[1:0];
            2'd3: flag <= 1'b0;
            default: ;
          endcase
        end
      end
    end
  end

  assign s_rsp = '{ready: rdy_q, rdata: rdata_q};

endmodule
