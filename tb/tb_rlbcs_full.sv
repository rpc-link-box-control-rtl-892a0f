// Full-size testbench: the Link Box with every parameter at its default
// (three Link Boards, XC2S300E images of 234456 bytes, FLASH read at six
// clocks per word). It runs one complete power-up: the CBIC loads the
// CBPC and the three LBC FPGAs from the Control Board FLASH one after the
// other, goes to sleep and activates the LBCs, which load their two FPGAs
// each. Checked: every FPGA gets its exact image; one image takes
// 23446 groups x 25 clocks = 586150 clocks (14.65 ms at 40 MHz, the
// published "ca. 15 ms" from FLASH); no alarm; the status register read
// over the CCU25 shows all four targets loaded.
module tb_rlbcs_full;
  import tb_ref_pkg::*;
  localparam int NB = 234456, AW = 21, NL = 3, NT = NL + 1;
  localparam longint IMG_CYC = longint'((NB + 9) / 10) * 25;
  logic clk = 0, rst = 1;
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
  int checks = 0, failures = 0;
  longint dur [NT];

  rlbcs_link_box dut (
    .clk(clk), .rst(rst), .ttc_reconf(1'b0), .ttc_lb_reconf(1'b0),
    .ccu_addr(ca), .ccu_wdata(cw), .ccu_wr_n(wr_n), .ccu_rd_n(rd_n), .ccu_rdata(cr),
    .ccu_force_emerg(1'b0), .ccu_alarm(alarm), .ccu_lb_alarm(lb_alarm),
    .cbf_addr(cfa), .cbf_oe(cfoe), .cbf_we_n(cfwe_n), .cbf_wdata(cfw), .cbf_din(cfd), .cbf_rdy(cfrdy),
    .cb_sm_prog_b(cprog_b), .cb_sm_cs_b(ccs_b), .cb_sm_write_b(cwrite_b), .cb_sm_d(cd),
    .cb_sm_init_b(cinit_b), .cb_sm_done(cdone),
    .lbf_addr(lfa), .lbf_oe(lfoe), .lbf_we_n(lfwe_n), .lbf_wdata(lfw), .lbf_din(lfd), .lbf_rdy(lfrdy),
    .lb_sm_prog_b(lprog_b), .lb_sm_cs_b(lcs_b), .lb_sm_write_b(lwrite_b), .lb_sm_d(ld),
    .lb_sm_init_b(linit_b), .lb_sm_done(ldone),
    .lb_ii_addr(), .lb_ii_wdata(), .lb_ii_we(), .lb_ii_re(), .lb_ii_rdata('0),
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

  always #12.5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic chk_time(longint d, string what);
    chk(d >= IMG_CYC - 100 && d <= IMG_CYC + 100,
        $sformatf("%s took %0d clocks, expected about %0d", what, d, IMG_CYC));
  endtask

  initial begin
    logic [15:0] r;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    wait (state == 3'd2);
    chk(cdone == '1 && !alarm && pc_act, "Control Board targets loaded");
    dur[0] = g_cf[0].f.last - g_cf[0].f.first;
    dur[1] = g_cf[1].f.last - g_cf[1].f.first;
    dur[2] = g_cf[2].f.last - g_cf[2].f.first;
    dur[3] = g_cf[3].f.last - g_cf[3].f.first;
    chk_time(dur[0], "CBPC load");
    chk_time(dur[1], "LB0 CBIC load");
    chk_time(dur[2], "LB1 CBIC load");
    chk_time(dur[3], "LB2 CBIC load");
    $display("image load %0d clocks = %0.2f ms at 40 MHz", dur[0], real'(dur[0]) * 25.0e-6);
    wait (ldone == '1);
    repeat (100) @(posedge clk);
    chk(g_lb[0].g_f[0].f.loads == 1 && g_lb[0].g_f[1].f.loads == 1, "LB0 FPGAs");
    chk(g_lb[1].g_f[0].f.loads == 1 && g_lb[1].g_f[1].f.loads == 1, "LB1 FPGAs");
    chk(g_lb[2].g_f[0].f.loads == 1 && g_lb[2].g_f[1].f.loads == 1, "LB2 FPGAs");
    chk_time(g_lb[2].g_f[1].f.last - g_lb[2].g_f[1].f.first, "LB2 FPGA 1 load");
    chk(irq == '0 && !alarm && !lb_alarm, "no alarm");
    ccu.read16(16'h0000, r);
    chk(r[15:8] == 8'h0F && r[2:0] == 3'd2, $sformatf("CBIC status %h", r));
    $display("power-up finished at %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
