// tb_cmic -- self-checking testbench of the common memory interface controller.
//
// Four masters issue random reads and writes to a shared external SRAM
// model, each to its own address range, while a reference array tracks
// what every word must hold. Checks read data, that an uncontended access
// takes WAIT+2 cycles, that with all four masters busy each is served at
// least once in every four consecutive grants (round robin), and that
// contention is reported.
module tb_cmic;
  import boc_pkg::*;
  localparam int NM = 4, AW = 10, WAIT = 1, NOPS = 200;
  logic clk = 0, rst_n = 0;
  bus_req_t s_req [NM];
  bus_rsp_t s_rsp [NM];
  logic [AW-1:0] mem_addr; logic [31:0] mem_wdata, mem_rdata;
  logic mem_ce_n, mem_oe_n, mem_we_n, contention;
  int checks = 0, failures = 0, n_cont = 0;
  logic [31:0] ref_mem [1 << AW];
  int since [NM];
  int done_cnt [NM];

  cmic #(.NM(NM), .ADDR_W(AW), .WAIT(WAIT)) dut (.*);
  tb_sram #(.AW(AW)) u_mem (.clk, .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata),
                            .ce_n(mem_ce_n), .oe_n(mem_oe_n), .we_n(mem_we_n));
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // fairness: count grants to others since a master's last service while it waits
  always @(posedge clk) if (rst_n) begin
    if (contention) n_cont++;
    for (int i = 0; i < NM; i++)
      if (s_rsp[i].ready) begin
        for (int j = 0; j < NM; j++)
          if (j != i && s_req[j].req) begin
            since[j]++;
            if (since[j] >= NM) begin
              checks++; failures++; $display("FAIL: master %0d starved", j);
            end
          end
        since[i] = 0;
      end
  end

  task automatic access(int m, bit we, int unsigned widx, logic [31:0] wd, output logic [31:0] rd, output int cyc);
    cyc = 0;
    #1;
    s_req[m] = '{req: 1'b1, we: we, addr: 32'h1000_0000 | (widx << 2), wdata: wd};
    do begin @(posedge clk); cyc++; end while (!s_rsp[m].ready);
    rd = s_rsp[m].rdata;
    if (we) ref_mem[widx] = wd;
    #1 s_req[m] = BUS_REQ_IDLE;
  endtask

  task automatic master(int m);
    logic [31:0] rd; int cyc; int unsigned w; bit we;
    for (int n = 0; n < NOPS; n++) begin
      w  = (m << (AW - 2)) | $urandom_range(0, 15);
      we = $urandom_range(0, 1);
      access(m, we, w, $urandom, rd, cyc);
      if (!we) check(rd == ref_mem[w], $sformatf("m%0d read %0d: %08x exp %08x", m, w, rd, ref_mem[w]));
      done_cnt[m]++;
    end
  endtask

  initial begin
    logic [31:0] rd; int cyc;
    for (int i = 0; i < NM; i++) begin s_req[i] = BUS_REQ_IDLE; since[i] = 0; done_cnt[i] = 0; end
    for (int i = 0; i < (1 << AW); i++) begin ref_mem[i] = 32'(i * 5); u_mem.mem[i] = 32'(i * 5); end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk);
    access(2, 1, 7, 32'hCAFEF00D, rd, cyc);
    check(cyc == WAIT + 2, $sformatf("uncontended write latency %0d", cyc));
    @(posedge clk);
    access(1, 0, 7, 0, rd, cyc);
    check(cyc == WAIT + 2 && rd == 32'hCAFEF00D, $sformatf("uncontended read latency %0d data %08x", cyc, rd));
    fork
      master(0); master(1); master(2); master(3);
    join
    check(n_cont > 0, "contention seen");
    for (int i = 0; i < NM; i++) check(done_cnt[i] == NOPS, "all operations done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
