// Testbench of flash_writer with the FLASH model: two groups (ten 16-bit
// words) are buffered and programmed; the eight FLASH words at their
// scattered addresses must equal the reference encoding, and the model
// must have seen exactly eight program sequences. A block longer than one
// command is written in two parts (group index continues). A sector erase
// must clear the sector, and a FLASH that never becomes ready must end the
// command with the error flag.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_flash_writer;
  import tb_ref_pkg::*;
  localparam int AW = 21;
  logic clk = 0, rst = 1, we = 0, busy, err, fwe_n, rdy_m, stuck = 0;
  logic [1:0] ra = 0;
  logic [15:0] wd = 0, rd;
  logic [AW-1:0] fa;
  logic [31:0] fw, fd;
  int checks = 0, failures = 0;

  flash_writer #(.AW(AW), .BUF_GROUPS(4), .WE_CYC(3), .TIMEOUT(3000)) dut (
    .clk(clk), .rst(rst), .reg_we(we), .reg_addr(ra), .reg_wdata(wd), .reg_rdata(rd),
    .busy(busy), .error(err), .f_addr(fa), .f_we_n(fwe_n), .f_wdata(fw), .f_rdy(rdy_m && !stuck));

  tb_flash_model #(.AW(AW), .SEED_BASE(1), .N_IMG(1), .STRIDE_LOG2(17), .NBYTES(10),
                   .SECT_LOG2(12), .BUSY_CYC(40)) fl (
    .clk(clk), .addr(fa), .oe(1'b0), .we_n(fwe_n), .wdata(fw), .dout(fd), .rdy(rdy_m));

  always #5 clk = ~clk;

  task automatic wreg(int a, logic [15:0] v);
    @(posedge clk); #1 we = 1; ra = 2'(a); wd = v;
    @(posedge clk); #1 we = 0;
  endtask

  task automatic wait_idle();
    int c;
    c = 0;
    @(posedge clk);
    while (busy && c < 100000) begin @(posedge clk); c++; end
  endtask

  function automatic bit check_group(int grp, logic [79:0] data);
    logic [127:0] enc;
    enc = ref_encode({1'b0, data});
    for (int k = 0; k < 4; k++)
      if (fl.word_at(ref_scatter(4 * grp + k)) != enc[32*k +: 32]) return 0;
    return 1;
  endfunction

  initial begin
    logic [79:0] g [4];
    foreach (g[i]) for (int k = 0; k < 5; k++) g[i][16*k +: 16] = 16'($urandom);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wreg(0, 16'd10); wreg(1, 16'd0);
    for (int i = 0; i < 2; i++) for (int k = 0; k < 5; k++) wreg(2, g[i][16*k +: 16]);
    #1 ra = 2; #1;
    checks++; if (rd != 16'd10) begin failures++; $display("FAIL fill %0d", rd); end
    wreg(3, 16'd1);
    wait_idle();
    checks++; if (!check_group(10, g[0]) || !check_group(11, g[1])) begin failures++; $display("FAIL programmed words"); end
    checks++; if (fl.programs != 8) begin failures++; $display("FAIL %0d programs", fl.programs); end
    checks++; if (err) begin failures++; $display("FAIL error flag"); end
    #1 ra = 0; #1;
    checks++; if (rd != 16'd12) begin failures++; $display("FAIL group index %0d", rd); end
    // continue the block with two more groups, plus a partial one ignored
    for (int i = 2; i < 4; i++) for (int k = 0; k < 5; k++) wreg(2, g[i][16*k +: 16]);
    wreg(2, 16'h1234);
    wreg(3, 16'd1);
    wait_idle();
    checks++; if (!check_group(12, g[2]) || !check_group(13, g[3])) begin failures++; $display("FAIL second part"); end
    checks++; if (fl.programs != 16) begin failures++; $display("FAIL %0d programs", fl.programs); end
    // erase the sector of group 12
    wreg(0, 16'd12);
    wreg(3, 16'd2);
    wait_idle();
    checks++; if (fl.erases != 1 || fl.word_at(ref_scatter(48)) != 32'hFFFF_FFFF) begin failures++; $display("FAIL erase"); end
    // FLASH stuck busy
    stuck = 1;
    for (int k = 0; k < 5; k++) wreg(2, g[0][16*k +: 16]);
    wreg(3, 16'd1);
    wait_idle();
    checks++; if (!err) begin failures++; $display("FAIL no timeout error"); end
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
