// tb_prog_mem_ctrl -- self-checking testbench of the program memory controller.
//
// Connects the controller to a 16-bit SRAM model, writes 32-bit words
// through the bus, checks that each landed as two big-endian halfwords,
// reads them back, and checks the transfer time of 2*(WAIT+1)+1 cycles
// plus the ready cycle.
module tb_prog_mem_ctrl;
  import boc_pkg::*;
  localparam int AW = 12, WAIT = 1;
  logic clk = 0, rst_n = 0;
  bus_req_t s_req; bus_rsp_t s_rsp;
  logic [AW-1:0] pm_addr; logic [15:0] pm_wdata, pm_rdata; logic pm_ce_n, pm_oe_n, pm_we_n;
  int checks = 0, failures = 0;

  prog_mem_ctrl #(.PADDR_W(AW), .WAIT(WAIT)) dut (.*);
  tb_sram #(.AW(AW), .DW(16)) u_pm (.clk, .addr(pm_addr), .wdata(pm_wdata), .rdata(pm_rdata),
                                    .ce_n(pm_ce_n), .oe_n(pm_oe_n), .we_n(pm_we_n));
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic xfer(bit we, logic [31:0] a, logic [31:0] wd, output logic [31:0] rd, output int cyc);
    cyc = 0;
    #1 s_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    do begin @(posedge clk); cyc++; end while (!s_rsp.ready);
    rd = s_rsp.rdata;
    #1 s_req = BUS_REQ_IDLE;
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] rd, v; int cyc;
    s_req = BUS_REQ_IDLE;
    for (int i = 0; i < (1 << AW); i++) u_pm.mem[i] = 16'(i);
    repeat (3) @(posedge clk); #1 rst_n = 1;
    xfer(0, 32'h0000_0010, 0, rd, cyc);
    check(rd == {16'd8, 16'd9}, $sformatf("read preloaded word: %08x", rd));
    check(cyc == 2 * (WAIT + 1) + 2, $sformatf("read takes %0d cycles", cyc));
    for (int i = 0; i < 16; i++) begin
      v = $urandom;
      xfer(1, 32'(i * 4 + 64), v, rd, cyc);
      check(u_pm.mem[(i * 4 + 64) / 2] == v[31:16] && u_pm.mem[(i * 4 + 64) / 2 + 1] == v[15:0],
            $sformatf("halfwords of word %0d", i));
      xfer(0, 32'(i * 4 + 64), 0, rd, cyc);
      check(rd == v, $sformatf("read back %08x exp %08x", rd, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
