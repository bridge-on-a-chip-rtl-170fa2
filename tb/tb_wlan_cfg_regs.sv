// tb_wlan_cfg_regs -- self-checking testbench of the WLAN configuration registers.
//
// Passes messages both ways between the two bus ports, rings doorbells in
// both directions, checks the interrupt each raises and that clearing it
// drops the interrupt, checks that a side cannot overwrite the other
// side's messages, and runs both ports in the same cycle.
module tb_wlan_cfg_regs;
  import boc_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t iw_req, wl_req; bus_rsp_t iw_rsp, wl_rsp;
  logic irq_to_iw, irq_to_wl;
  int checks = 0, failures = 0;

  wlan_cfg_regs dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic xfer(bit side, bit we, logic [7:0] off, logic [31:0] wd, output logic [31:0] rd);
    #1;
    if (side == 0) iw_req = '{req: 1'b1, we: we, addr: 32'h3000_0000 | off, wdata: wd};
    else           wl_req = '{req: 1'b1, we: we, addr: 32'h3000_0000 | off, wdata: wd};
    do @(posedge clk); while (!(side ? wl_rsp.ready : iw_rsp.ready));
    rd = side ? wl_rsp.rdata : iw_rsp.rdata;
    #1;
    if (side == 0) iw_req = BUS_REQ_IDLE; else wl_req = BUS_REQ_IDLE;
  endtask

  initial begin
    logic [31:0] rd, rd2;
    iw_req = BUS_REQ_IDLE; wl_req = BUS_REQ_IDLE;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    check(!irq_to_iw && !irq_to_wl, "no doorbell after reset");
    for (int i = 0; i < 4; i++) xfer(0, 1, 8'(i * 4), 32'hA000_0000 + i, rd);
    for (int i = 0; i < 4; i++) xfer(1, 1, 8'(8'h20 + i * 4), 32'hB000_0000 + i, rd);
    xfer(1, 1, 8'h00, 32'hDEAD_BEEF, rd);   // WLAN side may not write IW messages
    xfer(0, 1, 8'h24, 32'hDEAD_BEEF, rd);
    for (int i = 0; i < 4; i++) begin
      xfer(1, 0, 8'(i * 4), 0, rd);
      check(rd == 32'hA000_0000 + i, $sformatf("WLAN reads IW message %0d: %08x", i, rd));
      xfer(0, 0, 8'(8'h20 + i * 4), 0, rd);
      check(rd == 32'hB000_0000 + i, $sformatf("IW reads WLAN message %0d: %08x", i, rd));
    end
    xfer(0, 1, 8'h40, 32'h5, rd);            // IW rings WLAN
    @(posedge clk);
    check(irq_to_wl && !irq_to_iw, "doorbell to WLAN");
    xfer(1, 0, 8'h40, 0, rd);
    check(rd == 32'h5, "WLAN sees doorbell bits");
    xfer(1, 1, 8'h44, 32'h1, rd);
    check(irq_to_wl, "one bit still pending");
    xfer(1, 1, 8'h44, 32'h4, rd);
    @(posedge clk);
    check(!irq_to_wl, "doorbell cleared");
    // both ports in the same cycle: WLAN rings IW while IW writes a message
    fork
      xfer(0, 1, 8'h08, 32'h1234_5678, rd);
      xfer(1, 1, 8'h40, 32'h80, rd2);
    join
    @(posedge clk);
    check(irq_to_iw, "doorbell to IW");
    xfer(0, 0, 8'h40, 0, rd);
    check(rd == 32'h80, "IW sees doorbell bits");
    xfer(1, 0, 8'h08, 0, rd);
    check(rd == 32'h1234_5678, "simultaneous message write");
    xfer(0, 1, 8'h44, 32'hFF, rd);
    @(posedge clk);
    check(!irq_to_iw, "IW doorbell cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
