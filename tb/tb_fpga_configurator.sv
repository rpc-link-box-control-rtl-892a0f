// Testbench of fpga_configurator: two FPGAs loaded from their FLASH images
// in turn, with the load time checked against 4*RD_CYC+1 clocks per group;
// an uncorrectable group in image 1 fails target 1 only; a correctable one
// is reported in flash_err but loads; a single target is loaded from the
// external byte stream at one byte per clock.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_fpga_configurator;
  import tb_ref_pkg::*;
  localparam int AW = 21, NB = 400, RD = 6, NG = (NB + 9) / 10;
  logic clk = 0, rst = 1, sa = 0, so = 0, ext = 0, ev = 0, er;
  logic one = 0;
  logic [7:0] ed;
  logic busy, done;
  logic [1:0] okm, failm;
  logic ferr;
  logic [AW-1:0] fa;
  logic foe;
  logic [31:0] fd;
  logic [1:0] prog_b, cs_b, init_b, done_o;
  logic write_b;
  logic [7:0] d;
  int checks = 0, failures = 0;

  fpga_configurator #(.AW(AW), .N_TGT(2), .CFG_BYTES(NB), .IMG_STRIDE_LOG2(17), .RD_CYC(RD),
                      .PROG_CYC(8), .TIMEOUT(2000)) dut (
    .clk(clk), .rst(rst), .start_all(sa), .start_one(so), .one_tgt(one), .ext(ext),
    .ext_valid(ev), .ext_data(ed), .ext_ready(er), .busy(busy), .done(done), .ok_mask(okm),
    .fail_mask(failm), .flash_err(ferr), .f_addr(fa), .f_oe(foe), .f_din(fd),
    .sm_prog_b(prog_b), .sm_cs_b(cs_b), .sm_write_b(write_b), .sm_d(d),
    .sm_init_b(init_b), .sm_done(done_o));

  tb_flash_model #(.AW(AW), .SEED_BASE(20), .N_IMG(2), .STRIDE_LOG2(17), .NBYTES(NB)) fl (
    .clk(clk), .addr(fa), .oe(foe), .we_n(1'b1), .wdata('0), .dout(fd), .rdy());

  for (genvar i = 0; i < 2; i++) begin : g_f
    tb_fpga_model #(.SEED(20 + i), .NBYTES(NB)) f (
      .clk(clk), .prog_b(prog_b[i]), .cs_b(cs_b[i]), .write_b(write_b), .d(d),
      .init_b(init_b[i]), .done(done_o[i]));
  end

  always #5 clk = ~clk;

  int eidx = 0;
  always @(posedge clk) if (ev && er) eidx <= eidx + 1;
  assign ed = img_byte(21, eidx);

  task automatic wait_done(output longint c);
    c = 0;
    while (!done && c < 100000) begin @(posedge clk); c++; end
    #1;
  endtask

  initial begin
    longint c;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    sa = 1; @(posedge clk); #1 sa = 0;
    wait_done(c);
    checks++; if (okm != 2'b11 || failm != 0 || ferr) begin failures++; $display("FAIL clean ok=%b fail=%b", okm, failm); end
    checks++; if (!done_o[0] || !done_o[1]) begin failures++; $display("FAIL DONE pins"); end
    for (int i = 0; i < 2; i++) begin
      longint span;
      span = (i == 0) ? g_f[0].f.last - g_f[0].f.first : g_f[1].f.last - g_f[1].f.first;
      checks++;
      if (span > NG * (4 * RD + 1) + 10 || span < (NG - 1) * (4 * RD + 1) - 10) begin
        failures++; $display("FAIL load span %0d expected about %0d", span, NG * (4 * RD + 1));
      end
    end
    // correctable error in image 0, uncorrectable in image 1
    fl.corrupt(ref_scatter(3 * 4 + 0), ~fl.base_word(ref_scatter(12)) & 32'h0F00_0000);
    fl.corrupt(ref_scatter((1 << 17) + 7 * 4 + 0), ~fl.base_word(ref_scatter((1 << 17) + 28)) & 32'h0F00_0000);
    fl.corrupt(ref_scatter((1 << 17) + 7 * 4 + 2), ~fl.base_word(ref_scatter((1 << 17) + 30)) & 32'h0F00_0000);
    sa = 1; @(posedge clk); #1 sa = 0;
    wait_done(c);
    checks++; if (okm != 2'b01 || failm != 2'b10 || !ferr) begin failures++; $display("FAIL damaged ok=%b fail=%b ferr=%b", okm, failm, ferr); end
    // external stream into target 1
    fl.heal();
    ext = 1; ev = 1; one = 1; eidx = 0;
    so = 1; @(posedge clk); #1 so = 0;
    wait_done(c);
    checks++; if (okm != 2'b10 || failm != 0 || !done_o[1]) begin failures++; $display("FAIL ext ok=%b fail=%b", okm, failm); end
    checks++; if (g_f[1].f.last - g_f[1].f.first != NB - 1) begin failures++; $display("FAIL ext rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
