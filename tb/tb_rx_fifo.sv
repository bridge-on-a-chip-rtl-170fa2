// tb_rx_fifo -- self-checking testbench of the receive cell FIFO.
//
// Sends cells over the UTOPIA receive side with random pauses, including a
// cell with a parity error and a cell cut short by a new start of cell,
// which must both be discarded. It fills all slots and checks that the
// FIFO then refuses octets, and reads the good cells back byte by byte,
// comparing them with the cells sent.
module tb_rx_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data;
  logic rx_soc, rx_prty, rx_clav, rx_enb_n;
  logic rd_en;
  logic [7:0] rd_data;
  logic cell_avail, err_parity, err_short;
  int checks = 0, failures = 0, n_par = 0, n_short = 0;
  byte unsigned expq[$];

  rx_fifo #(.DEPTH_CELLS(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && err_parity) n_par++;
    if (rst_n && err_short) n_short++;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_byte(byte unsigned b, bit soc, bit bad_par);
    rx_data = b; rx_soc = soc; rx_prty = ~^b ^ bad_par; rx_clav = 1;
    do @(posedge clk); while (rx_enb_n);
    #1 rx_clav = 0; rx_soc = 0;
    if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
  endtask

  task automatic send_cell(int seed, bit good, int bad_at, int len);
    byte unsigned b;
    for (int i = 0; i < len; i++) begin
      b = 8'(seed * 7 + i * 13);
      send_byte(b, i == 0, i == bad_at);
      if (good) expq.push_back(b);
    end
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rx_clav = 0; rx_soc = 0; rx_data = 0; rx_prty = 1; rd_en = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(!cell_avail && !rx_enb_n, "empty after reset");
    send_cell(1, 1, -1, 53);
    send_cell(2, 0, 20, 53);        // parity error: dropped
    send_cell(3, 0, -1, 30);        // cut short by the next cell
    send_cell(4, 1, -1, 53);
    send_cell(5, 1, -1, 53);
    send_cell(6, 1, -1, 53);
    repeat (2) @(posedge clk);
    check(rx_enb_n, "back-pressure with all slots full");
    check(n_par == 1, $sformatf("one parity error reported (%0d)", n_par));
    check(n_short == 1, $sformatf("one short cell reported (%0d)", n_short));
    // read all, compare; one more cell is sent while reading
    fork
      send_cell(7, 1, -1, 53);
      begin
        int got;
        byte unsigned e;
        got = 0;
        while (expq.size() > 0 || got < 5 * 53) begin
          if (cell_avail) begin
            e = expq.pop_front();
            #1;
            check(rd_data == e, $sformatf("byte %0d: got %02x exp %02x", got, rd_data, e));
            rd_en = 1; @(posedge clk); #1 rd_en = 0;
            got++;
          end else @(posedge clk);
          if (got == 5 * 53) break;
        end
      end
    join
    repeat (2) @(posedge clk);
    check(!cell_avail, "empty after reading 5 cells");
    check(expq.size() == 0, "all expected bytes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
