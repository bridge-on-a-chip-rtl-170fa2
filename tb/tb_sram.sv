// tb_sram -- behavioural asynchronous SRAM (the external data memory).
//
// Reads are combinational while ce_n and oe_n are low; a write is taken on
// a rising clock edge where ce_n and we_n are low. mem is reached
// hierarchically by testbenches.
module tb_sram #(
  parameter int unsigned AW = 20,
  parameter int unsigned DW = 32,
  parameter int unsigned WORDS = 1 << AW
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n
);
  logic [DW-1:0] mem [WORDS];
  always_ff @(posedge clk) if (!ce_n && !we_n) mem[addr % WORDS] <= wdata;
  assign rdata = (!ce_n && !oe_n) ? mem[addr % WORDS] : '0;
endmodule
