// Testbench of bg_checker with the FLASH model holding two clean images:
// passes must be counted without flags; one corrupted word must set
// corrupt (not fatal) within one pass; clear must reset it; two corrupted
// words of a group must set fatal; pause must release the FLASH port.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_bg_checker;
  import tb_ref_pkg::*;
  localparam int AW = 21, NB = 200, RD = 6, NG = (NB + 9) / 10;
  logic clk = 0, rst = 1, en = 1, pause = 0, clear = 0, corrupt, fatal, idle, foe;
  logic [15:0] scans;
  logic [AW-1:0] fa;
  logic [31:0] fd;
  int checks = 0, failures = 0;

  bg_checker #(.AW(AW), .N_IMG(2), .IMG_STRIDE_LOG2(17), .N_GROUPS(NG), .RD_CYC(RD)) dut (
    .clk(clk), .rst(rst), .enable(en), .pause(pause), .clear(clear), .corrupt(corrupt),
    .fatal(fatal), .scans(scans), .idle(idle), .f_addr(fa), .f_oe(foe), .f_din(fd));

  tb_flash_model #(.AW(AW), .SEED_BASE(5), .N_IMG(2), .STRIDE_LOG2(17), .NBYTES(NB)) fl (
    .clk(clk), .addr(fa), .oe(foe), .we_n(1'b1), .wdata('0), .dout(fd), .rdy());

  always #5 clk = ~clk;

  localparam int PASS = 2 * NG * (4 * RD + 1) + 40;

  initial begin
    int a;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3 * PASS) @(posedge clk);
    checks++; if (scans < 2 || scans > 3) begin failures++; $display("FAIL %0d scans", scans); end
    checks++; if (corrupt || fatal) begin failures++; $display("FAIL flags on clean FLASH"); end
    a = ref_scatter((1 << 17) + 4 * 9 + 2);
    fl.corrupt(a, ~fl.base_word(a) & 32'h0300_0000);
    repeat (PASS + 10) @(posedge clk);
    checks++; if (!corrupt || fatal) begin failures++; $display("FAIL single corruption c=%0b f=%0b", corrupt, fatal); end
    #1 clear = 1; @(posedge clk); #1 clear = 0;
    @(posedge clk);
    checks++; if (corrupt) begin failures++; $display("FAIL clear"); end
    fl.heal();
    repeat (PASS + 10) @(posedge clk);
    checks++; if (corrupt) begin failures++; $display("FAIL flag after heal"); end
    a = ref_scatter(4 * 3 + 0);
    fl.corrupt(a, ~fl.base_word(a) & 32'h0300_0000);
    a = ref_scatter(4 * 3 + 1);
    fl.corrupt(a, ~fl.base_word(a) & 32'h0300_0000);
    repeat (PASS + 10) @(posedge clk);
    checks++; if (!fatal) begin failures++; $display("FAIL double corruption"); end
    #1 pause = 1;
    repeat (3) @(posedge clk);
    checks++; if (!idle || foe) begin failures++; $display("FAIL pause"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * PASS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
