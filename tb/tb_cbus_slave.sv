// Testbench of cbus_slave: bus cycles with 2 clocks setup and 6 clocks of
// strobe. Writes in the board's range give exactly one reg_we pulse with
// the right address and data, writes elsewhere give none; reads in range
// return the register value before the strobe ends, reads elsewhere see 0.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_cbus_slave;
  logic clk = 0, rst = 1, wr_n = 1, rd_n = 1, we, re;
  logic [15:0] cba = 0, cbw = 0, cbr, ra, rw, rr;
  int checks = 0, failures = 0;

  cbus_slave #(.BASE(16'h3000), .MASK(16'hF000)) dut (
    .clk(clk), .rst(rst), .cb_addr(cba), .cb_wdata(cbw), .cb_wr_n(wr_n), .cb_rd_n(rd_n),
    .cb_rdata(cbr), .reg_we(we), .reg_re(re), .reg_addr(ra), .reg_wdata(rw), .reg_rdata(rr));

  always #5 clk = ~clk;

  logic [15:0] regs [4096];
  int wes = 0, res = 0;
  always @(posedge clk) begin
    if (!rst && we) begin regs[ra[11:0]] <= rw; wes++; end
    if (!rst && re) res++;
  end
  assign rr = regs[ra[11:0]];

  task automatic cyc(bit w, logic [15:0] a, logic [15:0] d, output logic [15:0] r);
    @(posedge clk); #1 cba = a; cbw = d;
    repeat (2) @(posedge clk);
    #1 if (w) wr_n = 0; else rd_n = 0;
    repeat (6) @(posedge clk);
    r = cbr;
    #1 wr_n = 1; rd_n = 1;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    logic [15:0] r;
    logic [15:0] v [20];
    foreach (regs[i]) regs[i] = 16'h0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 20; i++) begin
      v[i] = 16'($urandom) | 16'h1;
      cyc(1, 16'h3000 + 16'(i * 5), v[i], r);
    end
    checks++; if (wes != 20) begin failures++; $display("FAIL %0d write pulses", wes); end
    cyc(1, 16'h4005, 16'hFFFF, r);
    cyc(1, 16'h0005, 16'hFFFF, r);
    checks++; if (wes != 20) begin failures++; $display("FAIL write outside range taken"); end
    for (int i = 0; i < 20; i++) begin
      cyc(0, 16'h3000 + 16'(i * 5), 0, r);
      checks++;
      if (r != v[i]) begin failures++; $display("FAIL read %0d: %h expected %h", i, r, v[i]); end
    end
    checks++; if (res != 20) begin failures++; $display("FAIL %0d read pulses", res); end
    cyc(0, 16'h5000, 0, r);
    checks++; if (r != 0) begin failures++; $display("FAIL unselected slave drove %h", r); end
    checks++; if (cbr != 0) begin failures++; $display("FAIL bus driven when idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
