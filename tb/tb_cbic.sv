// Testbench of the CBIC with one Link Board (two configuration targets),
// a CCU25 model, a Control Board FLASH model, two FPGA models and a
// Control Bus memory. Sequence: power-up load from FLASH and sleep; CBus
// accesses through the converters in single and block mode; a
// reconfiguration request with a damaged FLASH image leads to emergency
// mode with the alarm; the failed target is loaded with data written by
// the CCU25; the activate command ends emergency mode; a forced emergency
// skips the FLASH.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_cbic;
  import tb_ref_pkg::*;
  localparam int NB = 200, AW = 21;
  logic clk = 0, rst = 1, reconf = 0, force_em = 0;
  logic [16:0] ca;
  logic [7:0] cw, cr;
  logic wr_n, rd_n, alarm;
  logic [15:0] cba, cbw, cbr;
  logic cboe, cbwr_n, cbrd_n;
  logic [AW-1:0] fa;
  logic foe;
  logic [31:0] fd;
  logic [1:0] prog_b, cs_b, init_b, done_o;
  logic write_b, pc_act, lb_act;
  logic [7:0] d;
  logic [1:0] state;
  int checks = 0, failures = 0;

  cbic #(.N_LB(1), .CFG_BYTES(NB), .FLASH_AW(AW), .IMG_STRIDE_LOG2(17), .RD_CYC(6),
         .PROG_CYC(8), .TIMEOUT(3000), .CCU_AW(17)) dut (
    .clk(clk), .rst(rst), .ttc_reconf(reconf), .force_emerg(force_em),
    .ccu_addr(ca), .ccu_wdata(cw), .ccu_wr_n(wr_n), .ccu_rd_n(rd_n), .ccu_rdata(cr),
    .alarm(alarm), .cb_addr(cba), .cb_wdata(cbw), .cb_oe(cboe), .cb_wr_n(cbwr_n),
    .cb_rd_n(cbrd_n), .cb_rdata(cbr), .f_addr(fa), .f_oe(foe), .f_din(fd),
    .sm_prog_b(prog_b), .sm_cs_b(cs_b), .sm_write_b(write_b), .sm_d(d), .sm_init_b(init_b),
    .sm_done(done_o), .cbpc_active(pc_act), .lbc_active(lb_act), .state(state));

  tb_ccu_model ccu (.ccu_addr(ca), .ccu_wdata(cw), .ccu_wr_n(wr_n), .ccu_rd_n(rd_n), .ccu_rdata(cr));
  tb_cbus_mem #(.SEL(4'h2)) cbm (.cb_addr(cba), .cb_wdata(cbw), .cb_wr_n(cbwr_n), .cb_rd_n(cbrd_n), .cb_rdata(cbr));
  tb_flash_model #(.AW(AW), .SEED_BASE(1), .N_IMG(2), .STRIDE_LOG2(17), .NBYTES(NB)) fl (
    .clk(clk), .addr(fa), .oe(foe), .we_n(1'b1), .wdata('0), .dout(fd), .rdy());
  for (genvar i = 0; i < 2; i++) begin : g_f
    tb_fpga_model #(.SEED(1 + i), .NBYTES(NB)) f (
      .clk(clk), .prog_b(prog_b[i]), .cs_b(cs_b[i]), .write_b(write_b), .d(d),
      .init_b(init_b[i]), .done(done_o[i]));
  end

  always #12.5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_state(int s, int max_cyc);
    int c;
    c = 0;
    while (state != 3'(s) && c < max_cyc) begin @(posedge clk); c++; end
  endtask

  initial begin
    logic [15:0] r, v [$], got [$];
    repeat (5) @(posedge clk);
    #1 rst = 0;
    wait_state(2, 100000);
    chk(state == 3'd2 && pc_act && lb_act && !alarm, "power-up load ends in sleep");
    chk(done_o == 2'b11 && g_f[0].f.loads == 1 && g_f[1].f.loads == 1, "both FPGAs loaded");
    // single-mode CBus access through both converters
    ccu.write16(16'h2010, 16'hBEEF);
    chk(cbm.mem.exists(16'h2010) && cbm.mem[16'h2010] == 16'hBEEF, "single write");
    ccu.read16(16'h2010, r);
    chk(r == 16'hBEEF, $sformatf("single read %h", r));
    // block mode
    v = {};
    for (int i = 0; i < 8; i++) v.push_back(16'($urandom));
    ccu.bwrite16(16'h2100, 8, v);
    repeat (20) @(posedge clk);   // the last write is posted
    for (int i = 0; i < 8; i++) chk(cbm.mem[16'h2100 + i] == v[i], $sformatf("block write %0d", i));
    ccu.bread16(16'h2100, 8, got);
    for (int i = 0; i < 8; i++) chk(got[i] == v[i], $sformatf("block read %0d: %h vs %h", i, got[i], v[i]));
    // CBIC status register
    ccu.read16(16'h0000, r);
    chk(r[2:0] == 3'd2 && r[15:8] == 8'h03, $sformatf("status %h", r));
    // damaged image 1 -> emergency mode
    fl.corrupt(ref_scatter((1 << 17) + 8), ~fl.base_word(ref_scatter((1 << 17) + 8)) & 32'h00F0_0000);
    fl.corrupt(ref_scatter((1 << 17) + 9), ~fl.base_word(ref_scatter((1 << 17) + 9)) & 32'h00F0_0000);
    @(posedge clk); #1 reconf = 1; @(posedge clk); #1 reconf = 0;
    wait_state(3, 100000);
    chk(state == 3'd3 && alarm && !pc_act, "emergency mode after failed load");
    chk(g_f[0].f.loads == 2, "target 0 reloaded");
    // emergency load of target 1 with data from the CCU25
    ccu.write16(16'h0002, 16'h0001);
    v = {};
    for (int i = 0; i < NB / 2; i++) v.push_back({img_byte(2, 2 * i + 1), img_byte(2, 2 * i)});
    ccu.bwrite16_port(16'h0003, NB / 2, v);
    repeat (200) @(posedge clk);
    ccu.read16(16'h0004, r);
    chk(r == 16'h0200, $sformatf("emergency result %h", r));
    chk(done_o[1] && g_f[1].f.loads == 2, "target 1 loaded from the CCU25");
    ccu.write16(16'h0001, 16'h0004);
    repeat (5) @(posedge clk);
    chk(state == 3'd2 && !alarm && pc_act, "activate ends emergency");
    // forced emergency: no FLASH reading
    fl.heal();
    force_em = 1;
    @(posedge clk); #1 reconf = 1; @(posedge clk); #1 reconf = 0;
    repeat (50) @(posedge clk);
    chk(state == 3'd3 && alarm && g_f[0].f.loads == 2, "forced emergency");
    force_em = 0;
    ccu.write16(16'h0001, 16'h0002);   // reconfigure request over the CCU25
    wait_state(2, 100000);
    chk(state == 3'd2 && g_f[0].f.loads == 3 && g_f[1].f.loads == 3, "reload after repair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
