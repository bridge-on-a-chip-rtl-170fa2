// tx_fifo -- transmit cell FIFO of the ATM-SAR unit (UTOPIA Tx side).
//
// The Segmentation Processor writes cells into it one byte per cycle over
// the internal bus; the FIFO sends them to the ATM PHY over a UTOPIA level-1
// style 8-bit transmit interface. Storage is DEPTH_CELLS slots of 53 bytes.
// A cell leaves only once it is complete in the FIFO, so the PHY never sees
// a cell interrupted by an underrun; it can pause the cell by dropping
// tx_clav.
//
// Interface and timing: the writer must see cell_room high before it starts
// a cell, then writes its 53 bytes (wr_en, wr_data) in order; cell_room
// stays true for that cell. On the UTOPIA side an octet moves on a rising
// edge where tx_enb_n is low and the PHY holds tx_clav high; tx_soc marks
// octet 0 and tx_prty carries odd parity. Output signals come straight from
// the storage and the read pointer.
//
// Following the architecture: a local transmit FIFO between the
// Segmentation Processor and UTOPIA with a 13-signal UTOPIA Tx port. Own
// choices: single clock domain, octet-level handshake, odd parity, depth of
// 4 cells.
module tx_fifo
  import boc_pkg::*;
#(
  parameter int unsigned DEPTH_CELLS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // internal bus from the Segmentation Processor
  input  logic       wr_en,
  input  logic [7:0] wr_data,
  output logic       cell_room,
  // UTOPIA transmit (ATM layer to PHY)
  output logic [7:0] tx_data,
  output logic       tx_soc,
  output logic       tx_prty,
  output logic       tx_enb_n,
  input  logic       tx_clav
);

  localparam int unsigned SW = (DEPTH_CELLS > 1) ? $clog2(DEPTH_CELLS) : 1;

  logic [7:0] mem [DEPTH_CELLS][CELL_BYTES];

  logic [SW-1:0] wr_slot, rd_slot;
  logic [5:0]    wr_off, rd_off;
  logic [SW:0]   ncell;     // complete cells stored
  logic          wr_busy;   // a cell is partly written
  logic          push_last, pop, pop_last;

  assign push_last = wr_en && (wr_off == 6'(CELL_BYTES - 1));
  assign pop       = tx_clav && !tx_enb_n;
  assign pop_last  = pop && (rd_off == 6'(CELL_BYTES - 1));

  // Room for another cell: slots in use (complete plus the one being written)
  // below the depth.
  assign cell_room = wr_busy ? 1'b1 : (ncell < (SW+1)'(DEPTH_CELLS));

  assign tx_enb_n = (ncell == 0);
  assign tx_data  = mem[rd_slot][rd_off];
  assign tx_soc   = (rd_off == 0) && (ncell != 0);
  assign tx_prty  = ~^tx_data;

  function automatic logic [SW-1:0] next_slot(logic [SW-1:0] s);
    return (s == SW'(DEPTH_CELLS - 1)) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_slot][wr_off] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_slot <= '0;
      rd_slot <= '0;
      wr_off  <= '0;
      rd_off  <= '0;
      ncell   <= '0;
      wr_busy <= 1'b0;
    end else begin
      if (wr_en) begin
        if (push_last) begin
          wr_off  <= '0;
          wr_slot <= next_slot(wr_slot);
          wr_busy <= 1'b0;
        end else begin
          wr_off  <= wr_off + 1'b1;
          wr_busy <= 1'b1;
        end
      end
      if (pop) begin
        if (pop_last) begin
          rd_off  <= '0;
          rd_slot <= next_slot(rd_slot);
        end else begin
          rd_off <= rd_off + 1'b1;
        end
      end
      ncell <= ncell + (SW+1)'(push_last) - (SW+1)'(pop_last);
    end
  end

endmodule
