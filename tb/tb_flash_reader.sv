// Testbench of flash_reader with a FLASH model: an image is read and its
// bytes compared with the reference; with the consumer always ready the
// transfer must take 4*RD_CYC+1 clocks per group (plus a small start-up);
// with a stalling consumer every byte must still arrive in order. A single
// corrupted word must be corrected and reported in err_seen; two corrupted
// words of one group must set fatal_seen.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_flash_reader;
  import tb_ref_pkg::*;
  localparam int AW = 21, RD = 6, NB = 995, NG = (NB + 9) / 10;
  logic clk = 0, rst = 1, start = 0, stop = 0, busy, done, err, fat;
  logic ob_valid, ob_ready = 1;
  logic [7:0] ob_data;
  logic [AW-1:0] fa, base = '0;
  logic foe;
  logic [31:0] fd;
  int checks = 0, failures = 0;

  flash_reader #(.AW(AW), .RD_CYC(RD)) dut (
    .clk(clk), .rst(rst), .start(start), .stop(stop), .base(base), .n_groups(AW'(NG)),
    .busy(busy), .done(done), .err_seen(err), .fatal_seen(fat), .ob_valid(ob_valid),
    .ob_data(ob_data), .ob_ready(ob_ready), .f_addr(fa), .f_oe(foe), .f_din(fd));

  tb_flash_model #(.AW(AW), .SEED_BASE(3), .N_IMG(2), .STRIDE_LOG2(17), .NBYTES(NB)) fl (
    .clk(clk), .addr(fa), .oe(foe), .we_n(1'b1), .wdata('0), .dout(fd), .rdy());

  always #5 clk = ~clk;

  int nrx = 0, seed = 3, bad = 0;
  bit stall = 0;
  always @(posedge clk) begin
    if (ob_valid && ob_ready) begin
      if (nrx < NB && ob_data != img_byte(seed, nrx)) bad++;
      nrx++;
    end
    ob_ready <= stall ? 1'($urandom % 3 == 0) : 1'b1;
  end

  task automatic run(int img, output longint cycles);
    longint c;
    nrx = 0; bad = 0; seed = 3 + img;
    base = AW'(img << 17);
    @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
    c = 0;
    while (!done && c < 200000) begin @(posedge clk); c++; end
    #1 cycles = c;
  endtask

  initial begin
    longint cyc;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // clean image, consumer always ready
    run(0, cyc);
    checks++; if (nrx != NG * 10 || bad != 0) begin failures++; $display("FAIL bytes %0d bad %0d", nrx, bad); end
    checks++; if (err || fat) begin failures++; $display("FAIL flags on clean image"); end
    checks++;
    if (cyc < NG * (4 * RD + 1) || cyc > NG * (4 * RD + 1) + 20) begin
      failures++; $display("FAIL cycles %0d expected %0d", cyc, NG * (4 * RD + 1));
    end
    checks++; if (fl.reads != NG * 4) begin failures++; $display("FAIL reads %0d", fl.reads); end
    // second image with a stalling consumer
    stall = 1;
    run(1, cyc);
    checks++; if (nrx != NG * 10 || bad != 0) begin failures++; $display("FAIL stalled bytes %0d bad %0d", nrx, bad); end
    stall = 0;
    // one corrupted word in group 5 (word 1): corrected, err set
    fl.corrupt(ref_scatter(5 * 4 + 1), ~fl.base_word(ref_scatter(5 * 4 + 1)) & 32'h0001_0000 | 32'h0);
    fl.corrupt(ref_scatter(5 * 4 + 1), ~fl.base_word(ref_scatter(5 * 4 + 1)) & 32'h00FF_FF00);
    run(0, cyc);
    checks++; if (nrx != NG * 10 || bad != 0) begin failures++; $display("FAIL corrected bytes bad %0d", bad); end
    checks++; if (!err || fat) begin failures++; $display("FAIL flags single error err=%0b fat=%0b", err, fat); end
    // second corrupted word in the same group: uncorrectable
    fl.corrupt(ref_scatter(5 * 4 + 3), ~fl.base_word(ref_scatter(5 * 4 + 3)) & 32'h0FF0_0000);
    run(0, cyc);
    checks++; if (!err || !fat) begin failures++; $display("FAIL flags double error"); end
    // stop in the middle
    @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
    repeat (100) @(posedge clk);
    #1 stop = 1; @(posedge clk); #1 stop = 0;
    @(posedge clk);
    checks++; if (busy || foe) begin failures++; $display("FAIL stop"); end
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
