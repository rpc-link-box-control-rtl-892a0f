// Testbench of the LBC with a Link Board FLASH model and two FPGA models.
// Checked: activation loads both FPGAs; a TTC request loads them again;
// an uncorrectable image makes the load fail and raises the interrupt;
// after the image is refreshed over the Control Bus a load command
// succeeds and the interrupt can be cleared; the background checker
// reports a correctable corruption through the interrupt. The Internal
// Interface window reaches a register model of the FPGAs only while they
// are all loaded.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_lbc;
  import tb_ref_pkg::*;
  localparam int AW = 21, NB = 100;
  logic clk = 0, rst = 1, active = 0, ttc = 0, irq, foe, fwe_n, rdy;
  logic [15:0] cba, cbw, cbr;
  logic wr_n, rd_n;
  logic [AW-1:0] fa;
  logic [31:0] fw, fd;
  logic [1:0] prog_b, cs_b, init_b, done_o;
  logic write_b;
  logic [7:0] d;
  logic [9:0] ii_addr;
  logic [15:0] ii_wdata, ii_rdata;
  logic ii_we, ii_re;
  logic [15:0] ii_mem [1024];
  int ii_writes = 0, ii_reads = 0;
  int checks = 0, failures = 0;

  lbc #(.BASE(16'h1000), .N_FPGA(2), .CFG_BYTES(NB), .FLASH_AW(AW), .IMG_STRIDE_LOG2(17),
        .RD_CYC(6), .PROG_CYC(8), .TIMEOUT(3000), .BUF_GROUPS(16), .WR_TIMEOUT(100000)) dut (
    .clk(clk), .rst(rst), .active(active), .ttc_reconf(ttc), .cb_addr(cba), .cb_wdata(cbw),
    .cb_wr_n(wr_n), .cb_rd_n(rd_n), .cb_rdata(cbr), .f_addr(fa), .f_oe(foe), .f_we_n(fwe_n),
    .f_wdata(fw), .f_din(fd), .f_rdy(rdy), .sm_prog_b(prog_b), .sm_cs_b(cs_b),
    .sm_write_b(write_b), .sm_d(d), .sm_init_b(init_b), .sm_done(done_o),
    .ii_addr(ii_addr), .ii_wdata(ii_wdata), .ii_we(ii_we), .ii_re(ii_re), .ii_rdata(ii_rdata),
    .irq(irq));

  // registers of the loaded FPGAs behind the Internal Interface
  assign ii_rdata = ii_mem[ii_addr];
  always @(posedge clk) begin
    if (ii_we) begin ii_mem[ii_addr] <= ii_wdata; ii_writes++; end
    if (ii_re) ii_reads++;
  end
  initial for (int i = 0; i < 1024; i++) ii_mem[i] = 16'(i * 3);

  tb_cbus_driver drv (.clk(clk), .cb_addr(cba), .cb_wdata(cbw), .cb_wr_n(wr_n), .cb_rd_n(rd_n), .cb_rdata(cbr));
  tb_flash_model #(.AW(AW), .SEED_BASE(30), .N_IMG(2), .STRIDE_LOG2(17), .NBYTES(NB),
                   .SECT_LOG2(12), .BUSY_CYC(30)) fl (
    .clk(clk), .addr(fa), .oe(foe), .we_n(fwe_n), .wdata(fw), .dout(fd), .rdy(rdy));
  for (genvar i = 0; i < 2; i++) begin : g_f
    tb_fpga_model #(.SEED(30 + i), .NBYTES(NB)) f (
      .clk(clk), .prog_b(prog_b[i]), .cs_b(cs_b[i]), .write_b(write_b), .d(d),
      .init_b(init_b[i]), .done(done_o[i]));
  end

  always #12.5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // one payload bit that is still 0 in word w, to be flipped to 1
  function automatic logic [31:0] zero_bit(logic [31:0] w);
    for (int b = 5; b < 32; b++) if (!w[b]) return 32'(1) << b;
    return 32'h0;
  endfunction

  task automatic wait_cfg();
    logic [15:0] s;
    repeat (20) @(posedge clk);
    do drv.read(16'h1000, s); while (s[15]);
  endtask

  initial begin
    logic [15:0] r;
    int a;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    repeat (50) @(posedge clk);
    chk(prog_b == 2'b11 && g_f[0].f.loads == 0, "idle while inactive");
    active = 1;
    wait_cfg();
    drv.read(16'h1000, r);
    chk(r[7:0] == 8'h03 && !r[14] && !irq, $sformatf("load after activation %h", r));
    chk(g_f[0].f.loads == 1 && g_f[1].f.loads == 1, "both FPGAs loaded");
    // Internal Interface to the loaded FPGAs
    drv.write(16'h1405, 16'hCAFE);
    drv.read(16'h1405, r);
    chk(r == 16'hCAFE && ii_mem[5] == 16'hCAFE, $sformatf("internal interface write/read %h", r));
    drv.read(16'h17FF, r);
    chk(r == 16'(1023 * 3) && ii_writes == 1 && ii_reads == 2, $sformatf("internal interface read %h, %0d writes %0d reads", r, ii_writes, ii_reads));
    @(posedge clk); #1 ttc = 1; @(posedge clk); #1 ttc = 0;
    wait_cfg();
    chk(g_f[0].f.loads == 2 && g_f[1].f.loads == 2 && !irq, "TTC reload");
    // uncorrectable damage in image 1
    a = ref_scatter((1 << 17) + 4 * 3);
    fl.corrupt(a, zero_bit(fl.base_word(a)));
    a = ref_scatter((1 << 17) + 4 * 3 + 1);
    fl.corrupt(a, zero_bit(fl.base_word(a)));
    drv.write(16'h1001, 16'h0005);
    wait_cfg();
    drv.read(16'h1000, r);
    drv.write(16'h1406, 16'h1111);
    drv.read(16'h1405, r);
    chk(r == 16'h0000 && ii_writes == 1 && ii_reads == 2, "internal interface closed after a failed load");
    drv.read(16'h1000, r);
    chk(irq && r[14] && r[7:0] == 8'h01, $sformatf("failed load reported %h loads %0d %0d bad %0d", r, g_f[0].f.loads, g_f[1].f.loads, g_f[1].f.bad));
    // refresh image 1 (group index 2^17/4 = 8000h)
    drv.write(16'h1100, 16'h8000);
    drv.write(16'h1101, 16'h0000);
    drv.write(16'h1103, 16'h0002);
    do drv.read(16'h1103, r); while (r[15]);
    for (int i = 0; i < NB / 2; i++) drv.write(16'h1102, {img_byte(31, 2 * i + 1), img_byte(31, 2 * i)});
    drv.write(16'h1103, 16'h0001);
    do drv.read(16'h1103, r); while (r[15]);
    chk(fl.programs == 40 && fl.erases == 1, "image 1 rewritten");
    drv.write(16'h1001, 16'h0007);      // load again, clear causes, keep checking
    wait_cfg();
    drv.read(16'h1000, r);
    chk(!irq && r[7:0] == 8'h03 && g_f[1].f.loads == 3, $sformatf("load after refresh %h", r));
    // background check finds a correctable error in image 0
    a = ref_scatter(4 * 5 + 2);
    fl.corrupt(a, zero_bit(fl.base_word(a)));
    repeat (3000) @(posedge clk);
    drv.read(16'h1000, r);
    chk(irq && r[13] && !r[12], $sformatf("background corruption %h", r));
    drv.read(16'h1002, r);
    chk(r > 0, "checker passes counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
