// tb_atm_cfg_regs -- self-checking testbench of the ATM configuration registers.
//
// Writes every configuration register with a distinct value, checks both
// the configuration outputs and the read-back, and checks that the status
// inputs from the two processors read back at their offsets. Each transfer
// must complete in two cycles.
module tb_atm_cfg_regs;
  import boc_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t s_req; bus_rsp_t s_rsp;
  atm_cfg_t cfg; rp_stat_t rp_stat; sp_stat_t sp_stat;
  int checks = 0, failures = 0;

  atm_cfg_regs dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic xfer(bit we, logic [7:0] off, logic [31:0] wd, output logic [31:0] rd);
    int cyc;
    cyc = 0;
    #1 s_req = '{req: 1'b1, we: we, addr: 32'h2000_0000 | off, wdata: wd};
    do begin @(posedge clk); cyc++; end while (!s_rsp.ready);
    rd = s_rsp.rdata;
    check(cyc == 2, $sformatf("transfer took %0d cycles", cyc));
    #1 s_req = BUS_REQ_IDLE;
  endtask

  initial begin
    logic [31:0] rd;
    logic [31:0] val [13];
    s_req = BUS_REQ_IDLE;
    rp_stat = '{fbq_cons: 16'h11, rxd_prod: 16'h22, cells: 16'h33, pkts: 16'h44,
                drop_unknown: 16'h55, drop_nobuf: 16'h66, crc_err: 16'h77};
    sp_stat = '{cells: 16'h88, pkts: 16'h99, tst_idx: 16'haa};
    repeat (3) @(posedge clk); #1 rst_n = 1;
    check(cfg == '0, "configuration cleared by reset");
    val[0] = 32'h3;
    for (int i = 1; i < 13; i++) val[i] = 32'h1000_0000 + 32'(i * 32'h0101);
    for (int i = 3; i < 13; i++) if (i != 5 && i != 9 && i != 11) val[i] = 32'(i * 17 + 3);
    for (int i = 0; i < 13; i++) xfer(1, 8'(i * 4), val[i], rd);
    for (int i = 0; i < 13; i++) begin
      xfer(0, 8'(i * 4), 0, rd);
      check(rd == val[i], $sformatf("readback reg %0d: %08x exp %08x", i, rd, val[i]));
    end
    check(cfg.rx_en && cfg.tx_en, "enables");
    check(cfg.rct_base == val[1] && cfg.fbq_base == val[2] && cfg.fbq_size == 16'(val[3]), "rx tables");
    check(cfg.fbq_prod == 16'(val[4]) && cfg.rxd_base == val[5] && cfg.rxd_size == 16'(val[6]), "rx rings");
    check(cfg.rxd_cons == 16'(val[7]) && cfg.buf_bytes == 16'(val[8]), "rx ring index, buffer size");
    check(cfg.tst_base == val[9] && cfg.tst_len == 16'(val[10]) && cfg.sqd_base == val[11], "tx tables");
    check(cfg.slot_cycles == 16'(val[12]), "slot length");
    begin
      logic [31:0] exp_st [10];
      exp_st = '{32'h11, 32'h22, 32'h33, 32'h44, 32'h55, 32'h66, 32'h77, 32'h88, 32'h99, 32'haa};
      for (int i = 0; i < 10; i++) begin
        xfer(0, (i < 7) ? 8'(8'h40 + i * 4) : 8'(8'h60 + (i - 7) * 4), 0, rd);
        check(rd == exp_st[i], $sformatf("status %0d: %08x", i, rd));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
