// Testbench of the CBPC with a Control Board FLASH model holding two small
// images. Checked: nothing happens while inactive; once active the
// background checker completes passes without flags; a corrupted word
// raises the alarm; the image is refreshed over the Control Bus (sector
// erase, then block write of the image through the FLASH controller),
// after which the flags can be cleared and stay clear.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_cbpc;
  import tb_ref_pkg::*;
  localparam int AW = 21, NB = 100;
  logic clk = 0, rst = 1, active = 0, alarm, foe, fwe_n, rdy;
  logic [15:0] cba, cbw, cbr;
  logic wr_n, rd_n;
  logic [AW-1:0] fa;
  logic [31:0] fw, fd;
  int checks = 0, failures = 0;

  cbpc #(.BASE(16'h0000), .N_IMG(2), .CFG_BYTES(NB), .FLASH_AW(AW), .IMG_STRIDE_LOG2(17),
         .RD_CYC(6), .BUF_GROUPS(16), .WR_TIMEOUT(100000)) dut (
    .clk(clk), .rst(rst), .active(active), .cb_addr(cba), .cb_wdata(cbw), .cb_wr_n(wr_n),
    .cb_rd_n(rd_n), .cb_rdata(cbr), .f_addr(fa), .f_oe(foe), .f_we_n(fwe_n), .f_wdata(fw),
    .f_din(fd), .f_rdy(rdy), .alarm(alarm));

  tb_cbus_driver drv (.clk(clk), .cb_addr(cba), .cb_wdata(cbw), .cb_wr_n(wr_n), .cb_rd_n(rd_n), .cb_rdata(cbr));
  tb_flash_model #(.AW(AW), .SEED_BASE(7), .N_IMG(2), .STRIDE_LOG2(17), .NBYTES(NB),
                   .SECT_LOG2(12), .BUSY_CYC(30)) fl (
    .clk(clk), .addr(fa), .oe(foe), .we_n(fwe_n), .wdata(fw), .dout(fd), .rdy(rdy));

  always #12.5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_writer();
    logic [15:0] s;
    do drv.read(16'h0103, s); while (s[15]);
  endtask

  initial begin
    logic [15:0] r;
    int a;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    repeat (100) @(posedge clk);
    chk(fl.reads == 0 && !alarm, "inactive");
    drv.read(16'h0110, r);
    chk(r == 0, "no read data while inactive");
    active = 1;
    repeat (3000) @(posedge clk);
    drv.read(16'h0112, r);
    chk(r >= 2, $sformatf("checker passes %0d", r));
    drv.read(16'h0110, r);
    chk(r[15:14] == 2'b00 && r[13] && !alarm, $sformatf("clean status %h", r));
    // radiation damage in image 0
    a = ref_scatter(4 * 2 + 1);
    fl.corrupt(a, ~fl.base_word(a) & 32'h0000_0F00);
    repeat (1500) @(posedge clk);
    drv.read(16'h0110, r);
    chk(alarm && r[15] && !r[14], $sformatf("corruption reported %h", r));
    // refresh image 0: erase its sector, write the ten groups again
    drv.write(16'h0100, 16'h0000);
    drv.write(16'h0101, 16'h0000);
    drv.write(16'h0103, 16'h0002);
    wait_writer();
    chk(fl.erases == 1, "sector erased");
    for (int i = 0; i < NB / 2; i++) drv.write(16'h0102, {img_byte(7, 2 * i + 1), img_byte(7, 2 * i)});
    drv.write(16'h0103, 16'h0001);
    wait_writer();
    chk(fl.programs == 40, $sformatf("%0d words programmed", fl.programs));
    drv.read(16'h0110, r);
    chk(!r[11], "no writer error");
    drv.write(16'h0111, 16'h0003);      // clear flags, keep checking
    repeat (3000) @(posedge clk);
    drv.read(16'h0110, r);
    chk(!alarm && r[15:13] == 3'b001, $sformatf("clean after refresh %h", r));
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
