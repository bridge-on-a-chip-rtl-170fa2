// tb_bus_mem -- behavioural word memory with an on-chip bus slave port.
//
// Answers each request LAT cycles after it is first seen (ready for one
// cycle, read data valid with it); the request must stay raised until then.
// The array mem is reached hierarchically by testbenches to preload and
// inspect it. Addresses are byte addresses; bits above the array size wrap.
module tb_bus_mem
  import boc_pkg::*;
#(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned LAT   = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t s_req,
  output bus_rsp_t s_rsp
);
  logic [31:0] mem [WORDS];
  int unsigned cnt;
  logic        rdy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 0;
      rdy <= 1'b0;
    end else begin
      rdy <= 1'b0;
      if (s_req.req && !rdy) begin
        if (cnt + 1 >= LAT) begin
          cnt <= 0;
          rdy <= 1'b1;
          if (s_req.we) mem[(s_req.addr >> 2) % WORDS] <= s_req.wdata;
        end else cnt <= cnt + 1;
      end
    end
  end
  assign s_rsp.ready = rdy;
  assign s_rsp.rdata = mem[(s_req.addr >> 2) % WORDS];
endmodule
