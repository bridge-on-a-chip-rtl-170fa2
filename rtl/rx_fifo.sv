// rx_fifo -- receive cell FIFO of the ATM-SAR unit (UTOPIA Rx side).
//
// Takes cells from the ATM PHY over a UTOPIA level-1 style 8-bit receive
// interface and holds them, whole cells only, until the Reassembly Processor
// pops them byte by byte over the internal bus. Storage is DEPTH_CELLS slots
// of 53 bytes. A cell is committed only when all 53 octets have arrived; a
// cell cut short by a new start-of-cell, or one with an octet of wrong
// parity, is discarded and reported by a one-cycle pulse.
//
// Interface and timing: an octet moves on a rising clock edge where the PHY
// holds rx_clav high and this FIFO holds rx_enb_n low; rx_soc marks octet 0.
// rx_enb_n is low whenever a free slot exists, so the PHY sees back-pressure
// only when all slots hold unread cells. rd_data shows the oldest byte
// combinationally; rd_en pops it. cell_avail is high while at least one
// complete cell is stored.
//
// Following the architecture: a local receive FIFO between UTOPIA and the
// Reassembly Processor, with a 13-signal UTOPIA Rx port (8 data, SOC, enable,
// cell available, parity and the clock). Own choices: the single clock domain
// (the UTOPIA clock is taken as the chip clock), the octet-level handshake in
// place of UTOPIA's cell-level one, odd parity, and the depth of 4 cells.
module rx_fifo
  import boc_pkg::*;
#(
  parameter int unsigned DEPTH_CELLS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // UTOPIA receive (PHY to ATM layer)
  input  logic [7:0] rx_data,
  input  logic       rx_soc,
  input  logic       rx_prty,
  input  logic       rx_clav,
  output logic       rx_enb_n,
  // internal bus to the Reassembly Processor
  input  logic       rd_en,
  output logic [7:0] rd_data,
  output logic       cell_avail,
  // error pulses
  output logic       err_parity,
  output logic       err_short
);

  localparam int unsigned SW = (DEPTH_CELLS > 1) ? $clog2(DEPTH_CELLS) : 1;

  logic [7:0] mem [DEPTH_CELLS][CELL_BYTES];

  logic [SW-1:0] wr_slot, rd_slot;
  logic [5:0]    wr_off, rd_off;
  logic [SW:0]   ncell;
  logic          in_cell, bad;

  logic accept, par_ok, commit, pop_last;

  assign rx_enb_n   = (ncell >= (SW+1)'(DEPTH_CELLS));
  assign accept     = rx_clav && !rx_enb_n;
  assign par_ok     = ^{rx_data, rx_prty};
  assign commit     = accept && !rx_soc && in_cell && (wr_off == 6'(CELL_BYTES - 1)) && !bad && par_ok;
  assign pop_last   = rd_en && (ncell != 0) && (rd_off == 6'(CELL_BYTES - 1));
  assign rd_data    = mem[rd_slot][rd_off];
  assign cell_avail = (ncell != 0);

  function automatic logic [SW-1:0] next_slot(logic [SW-1:0] s);
    return (s == SW'(DEPTH_CELLS - 1)) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (accept && (rx_soc || in_cell)) mem[wr_slot][rx_soc ? 6'd0 : wr_off] <= rx_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_slot    <= '0;
      rd_slot    <= '0;
      wr_off     <= '0;
      rd_off     <= '0;
      ncell      <= '0;
      in_cell    <= 1'b0;
      bad        <= 1'b0;
      err_parity <= 1'b0;
      err_short  <= 1'b0;
    end else begin
      err_parity <= accept && !par_ok;
      err_short  <= accept && rx_soc && in_cell;
      if (accept) begin
        if (rx_soc) begin
          in_cell <= 1'b1;
          wr_off  <= 6'd1;
          bad     <= !par_ok;
        end else if (in_cell) begin
          if (wr_off == 6'(CELL_BYTES - 1)) begin
            in_cell <= 1'b0;
            wr_off  <= '0;
            if (commit) wr_slot <= next_slot(wr_slot);
          end else begin
            wr_off <= wr_off + 1'b1;
            if (!par_ok) bad <= 1'b1;
          end
        end
      end
      if (rd_en && ncell != 0) begin
        if (pop_last) begin
          rd_off  <= '0;
          rd_slot <= next_slot(rd_slot);
        end else begin
          rd_off <= rd_off + 1'b1;
        end
      end
      ncell <= ncell + (SW+1)'(commit) - (SW+1)'(pop_last);
    end
  end

endmodule
