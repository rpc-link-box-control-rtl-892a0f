// End-to-end testbench of the Link Box (two Link Boards, 100-byte images
// so that every load takes a few hundred clocks). Around the design: a
// CCU25 model, the Control Board FLASH and three Select Map FPGA models
// (CBPC, LB0, LB1), and per Link Board a FLASH and two FPGA models.
//
// Every mechanism is counted in mech[]; a mechanism that never happened
// is a failure:
//   BOOT     power-up load of all Control Board targets, then sleep
//   LBLOAD   Link Board FPGAs loaded once the LBCs are activated
//   SINGLE   single-mode CCU25 access to a Link Board register
//   BLOCK_W  block-mode write through the converters
//   BLOCK_R  block-mode read with the delayed read data
//   LB_CHK   Link Board background checker raises the CCU25 alarm
//   LB_REFR  Link Board FLASH refreshed over the CCU25 and reloaded
//   CB_CHK   CBPC background checker raises the alarm, cleared over CCU25
//   TTC_LB   TTC command reloads the Link Board FPGAs
//   EMERG    failed FLASH load ends in emergency mode with the alarm
//   EM_LOAD  FPGA loaded with data written by the CCU25, then activate
//   CB_REFR  damaged Control Board image rewritten through the CBPC
//   FORCED   forced emergency mode, then reconfiguration from FLASH
//   INT_IF   CCU25 block access to the registers of a Link Board FPGA
//            through the LBC Internal Interface
// The Control Board alarm (CBIC, CBPC) and the Link Board alarm (LBC
// interrupts) are separate CCU25 alarm inputs and are checked apart.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_rlbcs_link_box;
  import tb_ref_pkg::*;
  localparam int NB = 100, AW = 21, NL = 2, NT = NL + 1;
  typedef enum int {BOOT, LBLOAD, SINGLE, BLOCK_W, BLOCK_R, LB_CHK, LB_REFR, CB_CHK,
                    TTC_LB, EMERG, EM_LOAD, CB_REFR, FORCED, INT_IF, N_MECH} mech_e;
  int mech [N_MECH];
  logic clk = 0, rst = 1, ttc = 0, ttc_lb = 0, force_em = 0;
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
  logic [15:0] ii_mem [NL][1024];
  int checks = 0, failures = 0;

  rlbcs_link_box #(.N_LB(NL), .CFG_BYTES(NB), .FLASH_AW(AW), .IMG_STRIDE_LOG2(17), .RD_CYC(6),
                   .PROG_CYC(8), .TIMEOUT(3000), .BUF_GROUPS(16), .WR_TIMEOUT(100000)) dut (
    .clk(clk), .rst(rst), .ttc_reconf(ttc), .ttc_lb_reconf(ttc_lb),
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
  tb_flash_model #(.AW(AW), .SEED_BASE(1), .N_IMG(NT), .STRIDE_LOG2(17), .NBYTES(NB),
                   .SECT_LOG2(12), .BUSY_CYC(30)) cfl (
    .clk(clk), .addr(cfa), .oe(cfoe), .we_n(cfwe_n), .wdata(cfw), .dout(cfd), .rdy(cfrdy));
  for (genvar i = 0; i < NT; i++) begin : g_cf
    tb_fpga_model #(.SEED(1 + i), .NBYTES(NB)) f (
      .clk(clk), .prog_b(cprog_b[i]), .cs_b(ccs_b[i]), .write_b(cwrite_b), .d(cd),
      .init_b(cinit_b[i]), .done(cdone[i]));
  end
  for (genvar k = 0; k < NL; k++) begin : g_lb
    tb_flash_model #(.AW(AW), .SEED_BASE(10 * (k + 1)), .N_IMG(2), .STRIDE_LOG2(17), .NBYTES(NB),
                     .SECT_LOG2(12), .BUSY_CYC(30)) fl (
      .clk(clk), .addr(lfa[k]), .oe(lfoe[k]), .we_n(lfwe_n[k]), .wdata(lfw[k]), .dout(lfd[k]),
      .rdy(lfrdy[k]));
    for (genvar i = 0; i < 2; i++) begin : g_f
      tb_fpga_model #(.SEED(10 * (k + 1) + i), .NBYTES(NB)) f (
        .clk(clk), .prog_b(lprog_b[k][i]), .cs_b(lcs_b[k][i]), .write_b(lwrite_b[k]), .d(ld[k]),
        .init_b(linit_b[k][i]), .done(ldone[k][i]));
    end
  end

  // register model of the loaded FPGAs behind each Internal Interface
  for (genvar k = 0; k < NL; k++) begin : g_ii
    assign ii_rdata[k] = ii_mem[k][ii_addr[k]];
    always @(posedge clk) if (ii_we[k]) ii_mem[k][ii_addr[k]] <= ii_wdata[k];
  end
  initial for (int k = 0; k < NL; k++) for (int i = 0; i < 1024; i++) ii_mem[k][i] = '0;

  always #12.5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] zero_bit(logic [31:0] w);
    for (int b = 5; b < 32; b++) if (!w[b]) return 32'(1) << b;
    return 32'h0;
  endfunction

  task automatic wait_state(int s, int max_cyc);
    int c;
    c = 0;
    while (state != 3'(s) && c < max_cyc) begin @(posedge clk); c++; end
  endtask

  int lb0_loads;
  always_comb lb0_loads = g_lb[0].g_f[0].f.loads;

  task automatic wait_lb0(int n);
    int c;
    c = 0;
    while (lb0_loads < n && c < 20000) begin @(posedge clk); c++; end
    repeat (20) @(posedge clk);
  endtask

  initial begin
    logic [15:0] r, v [$], got [$];
    int a;
    repeat (5) @(posedge clk);
    #1 rst = 0;

    // BOOT and LBLOAD
    wait_state(2, 100000);
    chk(state == 3'd2 && pc_act && cdone == '1 && !alarm, "power-up load");
    if (state == 3'd2 && cdone == '1) mech[BOOT]++;
    repeat (2000) @(posedge clk);
    chk(ldone == '1 && irq == '0, $sformatf("Link Board FPGAs %b", ldone));
    if (ldone == '1) mech[LBLOAD]++;

    // SINGLE: Link Board 1 status and writer registers
    ccu.read16(16'h8800, r);
    chk(r[7:0] == 8'h03 && !r[15], $sformatf("LB1 status %h", r));
    ccu.write16(16'h8900, 16'h8234);
    ccu.read16(16'h8900, r);
    chk(r == 16'h8234, $sformatf("LB1 writer register %h", r));
    if (r == 16'h8234) mech[SINGLE]++;

    // BLOCK_W / BLOCK_R on the writer group registers of Link Board 0
    v = {16'hA5C3, 16'h0001};
    ccu.bwrite16(16'h8100, 2, v);
    repeat (20) @(posedge clk);
    ccu.read16(16'h8100, r);
    chk(r == 16'hA5C3, $sformatf("block write %h", r));
    if (r == 16'hA5C3) mech[BLOCK_W]++;
    ccu.bread16(16'h8100, 2, got);
    chk(got[0] == 16'hA5C3 && got[1] == 16'h0001, $sformatf("block read %h %h", got[0], got[1]));
    if (got[0] == 16'hA5C3 && got[1] == 16'h0001) mech[BLOCK_R]++;

    // INT_IF: block write and block read of LB1 FPGA registers
    v = {16'h0A01, 16'h0B02, 16'h0C03, 16'h0D04};
    ccu.bwrite16(16'h8C10, 4, v);
    repeat (20) @(posedge clk);
    chk(ii_mem[1][16] == 16'h0A01 && ii_mem[1][19] == 16'h0D04 && ii_mem[0][16] == 0, "FPGA registers written");
    ccu.bread16(16'h8C10, 4, got);
    chk(got == v, "FPGA registers read back");
    if (got == v && ii_mem[1][17] == 16'h0B02) mech[INT_IF]++;

    // LB_CHK: a correctable error in LB0 image 1
    a = ref_scatter((1 << 17) + 4 * 2 + 1);
    g_lb[0].fl.corrupt(a, zero_bit(g_lb[0].fl.base_word(a)));
    a = ref_scatter((1 << 17) + 4 * 2 + 2);
    g_lb[0].fl.corrupt(a, zero_bit(g_lb[0].fl.base_word(a)));
    repeat (2000) @(posedge clk);
    chk(irq == 2'b01 && lb_alarm && !alarm, "LB0 checker interrupt");
    ccu.read16(16'h8000, r);
    chk(r[12], $sformatf("LB0 fatal flag %h", r));
    if (irq[0] && lb_alarm && r[12]) mech[LB_CHK]++;

    // LB_REFR: erase and rewrite LB0 image 1 over the CCU25, reload, clear
    ccu.write16(16'h8100, 16'h8000);
    ccu.write16(16'h8101, 16'h0000);
    ccu.write16(16'h8103, 16'h0002);
    do ccu.read16(16'h8103, r); while (r[15]);
    v = {};
    for (int i = 0; i < NB / 2; i++) v.push_back({img_byte(11, 2 * i + 1), img_byte(11, 2 * i)});
    ccu.bwrite16_port(16'h8102, NB / 2, v);
    repeat (20) @(posedge clk);
    ccu.write16(16'h8103, 16'h0001);
    do ccu.read16(16'h8103, r); while (r[15]);
    chk(g_lb[0].fl.programs == 40 && g_lb[0].fl.erases == 1, "LB0 image rewritten");
    ccu.write16(16'h8001, 16'h0007);
    wait_lb0(3);
    ccu.read16(16'h8000, r);
    chk(!irq[0] && r[7:0] == 8'h03 && g_lb[0].g_f[1].f.loads == 2, $sformatf("LB0 reload %h", r));
    if (!irq[0] && g_lb[0].fl.programs == 40 && g_lb[0].g_f[1].f.bad == 0) mech[LB_REFR]++;
    chk(!alarm && !lb_alarm, "alarms clear");

    // CB_CHK: CBPC finds a corrupted word in the Control Board FLASH
    a = ref_scatter((2 << 17) + 4 * 4);
    cfl.corrupt(a, zero_bit(cfl.base_word(a)));
    repeat (3000) @(posedge clk);
    ccu.read16(16'h0110, r);
    chk(alarm && !lb_alarm && r[15], $sformatf("CBPC corruption %h", r));
    cfl.heal();
    ccu.write16(16'h0111, 16'h0003);
    repeat (3000) @(posedge clk);
    chk(!alarm, "CBPC flag cleared");
    if (r[15] && !alarm) mech[CB_CHK]++;

    // TTC_LB
    @(posedge clk); #1 ttc_lb = 1; @(posedge clk); #1 ttc_lb = 0;
    wait_lb0(4);
    repeat (500) @(posedge clk);
    chk(g_lb[1].g_f[1].f.loads == 2 && ldone == '1, "TTC Link Board reload");
    if (g_lb[1].g_f[1].f.loads == 2) mech[TTC_LB]++;

    // EMERG: damaged CBPC image (target 0), global reconfiguration
    a = ref_scatter(4 * 3);
    cfl.corrupt(a, zero_bit(cfl.base_word(a)));
    a = ref_scatter(4 * 3 + 2);
    cfl.corrupt(a, zero_bit(cfl.base_word(a)));
    @(posedge clk); #1 ttc = 1; @(posedge clk); #1 ttc = 0;
    wait_state(3, 100000);
    chk(state == 3'd3 && alarm && !pc_act, "emergency mode");
    if (state == 3'd3 && alarm) mech[EMERG]++;
    ccu.read16(16'h0000, r);
    chk(r[15:8] == 8'h06, $sformatf("other targets loaded %h", r));

    // EM_LOAD: CBPC image written by the CCU25
    ccu.write16(16'h0002, 16'h0000);
    v = {};
    for (int i = 0; i < NB / 2; i++) v.push_back({img_byte(1, 2 * i + 1), img_byte(1, 2 * i)});
    ccu.bwrite16_port(16'h0003, NB / 2, v);
    repeat (200) @(posedge clk);
    ccu.read16(16'h0004, r);
    chk(r == 16'h0100 && cdone[0], $sformatf("emergency result %h", r));
    ccu.write16(16'h0001, 16'h0004);
    repeat (2000) @(posedge clk);
    chk(state == 3'd2 && pc_act, "activated after emergency load");
    if (r == 16'h0100 && state == 3'd2) mech[EM_LOAD]++;
    // the active CBPC reports the damaged image; it is refreshed through
    // the CBPC FLASH controller and the flags are cleared
    ccu.read16(16'h0110, r);
    chk(alarm && r[14], $sformatf("CBPC reports the damaged image %h", r));
    ccu.write16(16'h0100, 16'h0000);
    ccu.write16(16'h0101, 16'h0000);
    ccu.write16(16'h0103, 16'h0002);
    do ccu.read16(16'h0103, r); while (r[15]);
    ccu.bwrite16_port(16'h0102, NB / 2, v);
    repeat (20) @(posedge clk);
    ccu.write16(16'h0103, 16'h0001);
    do ccu.read16(16'h0103, r); while (r[15]);
    ccu.write16(16'h0111, 16'h0003);
    repeat (3000) @(posedge clk);
    ccu.read16(16'h0110, r);
    chk(!alarm && r[15:14] == 2'b00 && cfl.programs == 40, $sformatf("CBPC image refreshed %h", r));
    if (!alarm && cfl.programs == 40) mech[CB_REFR]++;

    // FORCED
    force_em = 1;
    a = g_cf[0].f.loads;
    @(posedge clk); #1 ttc = 1; @(posedge clk); #1 ttc = 0;
    repeat (50) @(posedge clk);
    chk(state == 3'd3 && alarm && g_cf[0].f.loads == a, "forced emergency");
    force_em = 0;
    ccu.write16(16'h0001, 16'h0002);
    wait_state(2, 100000);
    chk(state == 3'd2 && cdone == '1 && g_cf[0].f.loads == a + 1, "reconfiguration after forced emergency");
    if (state == 3'd2 && g_cf[0].f.loads == a + 1) mech[FORCED]++;
    repeat (2000) @(posedge clk);
    chk(!alarm && !lb_alarm && ldone == '1, "all quiet at the end");

    for (int m = 0; m < N_MECH; m++) begin
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
