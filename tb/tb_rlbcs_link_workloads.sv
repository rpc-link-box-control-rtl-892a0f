// Workload testbench at the default size: the Link Box with every
// parameter at its default, driven only through the CCU25 memory bus.
//  1. Configuration over the communication link. The box starts with the
//     forced-emergency line set, so the CBIC skips the FLASH; the whole
//     234456-byte CBPC image is then block-written into EM_DATA, two bytes
//     per 16-bit word, at the CCU25 block-mode rate of one byte per 250 ns
//     cycle. The Select Map side must keep up: the load must take
//     117228 x 500 ns = 58.6 ms of bus time (2344560 clocks, +-1%), with no
//     overrun, and the image must arrive intact. (The published 0.5 s
//     includes the CCU25 link and software overhead outside this logic.)
//  2. The other targets are then loaded from FLASH by a reconfiguration
//     request; the Link Boards load their FPGAs.
//  3. CCU25 block transfers of 8, 16, 32 and 64 bytes (the block sizes of
//     the published access-time table) to the Internal Interface of a Link
//     Board: every byte is a 250 ns cycle with a 50 ns strobe, reads
//     return the data one cycle late; each block is checked word by word
//     and its duration on the bus is checked against n x 250 ns (write)
//     and (n + 1) x 250 ns (read).
module tb_rlbcs_link_workloads;
  import tb_ref_pkg::*;
  localparam int NB = 234456, AW = 21, NL = 3, NT = NL + 1;
  localparam longint EM_CYC = longint'(NB / 2) * 20;
  logic clk = 0, rst = 1, force_em = 1;
  logic [16:0] ca;
  logic [7:0] cw, cr;
  logic wr_n, rd_n, alarm, lb_alarm;
  logic [AW-1:0] cfa;
  logic cfoe, cfwe_n, cfrdy;
  logic [31:0] cfw, cfd;
  logic [NT-1:0] cprog_b, ccs_b, cinit_b, cdone;
  logic cwrite_b;
  logic [7:0] cd;
  logic [NL-1:0][AW-1:0] lfa;
  logic [NL-1:0] lfoe, lfwe_n, lfrdy, lwrite_b, irq;
  logic [NL-1:0][31:0] lfw, lfd;
  logic [NL-1:0][1:0] lprog_b, lcs_b, linit_b, ldone;
  logic [NL-1:0][7:0] ld;
  logic [1:0] state;
  logic pc_act;
  logic [NL-1:0][9:0] ii_addr;
  logic [NL-1:0][15:0] ii_wdata, ii_rdata;
  logic [NL-1:0] ii_we, ii_re;
  logic [15:0] ii_mem [1024];
  int checks = 0, failures = 0;

  rlbcs_link_box dut (
    .clk(clk), .rst(rst), .ttc_reconf(1'b0), .ttc_lb_reconf(1'b0),
    .ccu_addr(ca), .ccu_wdata(cw), .ccu_wr_n(wr_n), .ccu_rd_n(rd_n), .ccu_rdata(cr),
    .ccu_force_emerg(force_em), .ccu_alarm(alarm), .ccu_lb_alarm(lb_alarm),
    .cbf_addr(cfa), .cbf_oe(cfoe), .cbf_we_n(cfwe_n), .cbf_wdata(cfw), .cbf_din(cfd), .cbf_rdy(cfrdy),
    .cb_sm_prog_b(cprog_b), .cb_sm_cs_b(ccs_b), .cb_sm_write_b(cwrite_b), .cb_sm_d(cd),
    .cb_sm_init_b(cinit_b), .cb_sm_done(cdone),
    .lbf_addr(lfa), .lbf_oe(lfoe), .lbf_we_n(lfwe_n), .lbf_wdata(lfw), .lbf_din(lfd), .lbf_rdy(lfrdy),
    .lb_sm_prog_b(lprog_b), .lb_sm_cs_b(lcs_b), .lb_sm_write_b(lwrite_b), .lb_sm_d(ld),
    .lb_sm_init_b(linit_b), .lb_sm_done(ldone),
    .lb_ii_addr(ii_addr), .lb_ii_wdata(ii_wdata), .lb_ii_we(ii_we), .lb_ii_re(ii_re),
    .lb_ii_rdata(ii_rdata),
    .cbic_state(state), .cbpc_active(pc_act), .lb_irq(irq));

  tb_ccu_model ccu (.ccu_addr(ca), .ccu_wdata(cw), .ccu_wr_n(wr_n), .ccu_rd_n(rd_n), .ccu_rdata(cr));
  tb_flash_model #(.AW(AW), .SEED_BASE(1), .N_IMG(NT), .STRIDE_LOG2(17), .NBYTES(NB)) cfl (
    .clk(clk), .addr(cfa), .oe(cfoe), .we_n(cfwe_n), .wdata(cfw), .dout(cfd), .rdy(cfrdy));
  for (genvar i = 0; i < NT; i++) begin : g_cf
    tb_fpga_model #(.SEED(1 + i), .NBYTES(NB)) f (
      .clk(clk), .prog_b(cprog_b[i]), .cs_b(ccs_b[i]), .write_b(cwrite_b), .d(cd),
      .init_b(cinit_b[i]), .done(cdone[i]));
  end
  for (genvar k = 0; k < NL; k++) begin : g_lb
    tb_flash_model #(.AW(AW), .SEED_BASE(10 * (k + 1)), .N_IMG(2), .STRIDE_LOG2(17), .NBYTES(NB)) fl (
      .clk(clk), .addr(lfa[k]), .oe(lfoe[k]), .we_n(lfwe_n[k]), .wdata(lfw[k]), .dout(lfd[k]),
      .rdy(lfrdy[k]));
    for (genvar i = 0; i < 2; i++) begin : g_f
      tb_fpga_model #(.SEED(10 * (k + 1) + i), .NBYTES(NB)) f (
        .clk(clk), .prog_b(lprog_b[k][i]), .cs_b(lcs_b[k][i]), .write_b(lwrite_b[k]), .d(ld[k]),
        .init_b(linit_b[k][i]), .done(ldone[k][i]));
    end
  end

  // FPGA registers of Link Board 2 behind its Internal Interface
  assign ii_rdata[0] = '0;
  assign ii_rdata[1] = '0;
  assign ii_rdata[2] = ii_mem[ii_addr[2]];
  always @(posedge clk) if (ii_we[2]) ii_mem[ii_addr[2]] <= ii_wdata[2];
  initial for (int i = 0; i < 1024; i++) ii_mem[i] = '0;

  always #12.5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [15:0] r, v [$], got [$];
    longint d;
    realtime t0;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    repeat (50) @(posedge clk);
    chk(state == 2'd3 && alarm && cfl.reads == 0, "forced emergency at power-up");
    force_em = 0;

    // 1. CBPC image over the CCU25
    ccu.write16(16'h0002, 16'h0000);
    v = {};
    for (int i = 0; i < NB / 2; i++) v.push_back({img_byte(1, 2 * i + 1), img_byte(1, 2 * i)});
    ccu.bwrite16_port(16'h0003, NB / 2, v);
    repeat (200) @(posedge clk);
    ccu.read16(16'h0004, r);
    chk(r == 16'h0100 && cdone[0] && g_cf[0].f.loads == 1, $sformatf("CBPC loaded over the link %h", r));
    d = g_cf[0].f.last - g_cf[0].f.first;
    chk(d > EM_CYC * 99 / 100 && d < EM_CYC * 101 / 100,
        $sformatf("link load took %0d clocks, bus time %0d", d, EM_CYC));
    ccu.read16(16'h0000, r);
    chk(!r[6], $sformatf("no overrun, status %h", r));

    // 2. the rest from FLASH, then the Link Boards
    ccu.write16(16'h0001, 16'h0002);
    while (state != 2'd2) @(posedge clk);
    chk(cdone == '1 && !alarm, "all Control Board targets loaded");
    while (ldone != '1) @(posedge clk);
    repeat (100) @(posedge clk);
    chk(!lb_alarm && irq == '0, "Link Board FPGAs loaded");

    // 3. block transfers of the published sizes
    for (int j = 0; j < 4; j++) begin
      int n, nw;
      n = 8 << j;
      nw = n / 2;
      v = {};
      for (int i = 0; i < nw; i++) v.push_back(16'($urandom));
      t0 = $realtime;
      ccu.bwrite16(16'h9400, nw, v);
      chk($realtime - t0 == real'(n) * 250.0, $sformatf("%0d-byte write took %0t", n, $realtime - t0));
      repeat (20) @(posedge clk);
      for (int i = 0; i < nw; i++) chk(ii_mem[i] == v[i], $sformatf("%0d-byte block, word %0d written", n, i));
      t0 = $realtime;
      ccu.bread16(16'h9400, nw, got);
      chk($realtime - t0 == real'(n + 1) * 250.0, $sformatf("%0d-byte read took %0t", n, $realtime - t0));
      for (int i = 0; i < nw; i++) chk(got[i] == v[i], $sformatf("%0d-byte block, word %0d read %h vs %h", n, i, got[i], v[i]));
    end
    ccu.read16(16'h0000, r);
    chk(!r[6], "no overrun after the block transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
