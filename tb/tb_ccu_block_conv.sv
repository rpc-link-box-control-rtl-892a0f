// Testbench of ccu_block_conv. A CCU25-like driver makes 250 ns access
// cycles with 50 ns strobes (10 and 2 clocks at 40 MHz); a downstream model
// answers after a slow, random latency from a byte memory. Checked: every
// write reaches the memory with its address and data; in a block of reads
// the first read returns the dummy byte and read n returns the data of
// read n-1 while the strobe is still low; a slow single-mode read returns
// its own data; a strobe during a pending request sets overrun.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_ccu_block_conv;
  localparam int AW = 17;
  logic clk = 0, rst = 1;
  logic [AW-1:0] ca = '0;
  logic [7:0] cw = 0, cr;
  logic wr_n = 1, rd_n = 1;
  logic d_req, d_we, d_ack = 0, ovr;
  logic [AW-1:0] d_addr;
  logic [7:0] d_wdata, d_rdata = 0;
  int checks = 0, failures = 0;

  ccu_block_conv #(.AW(AW)) dut (
    .clk(clk), .rst(rst), .ccu_addr(ca), .ccu_wdata(cw), .ccu_wr_n(wr_n), .ccu_rd_n(rd_n),
    .ccu_rdata(cr), .d_req(d_req), .d_we(d_we), .d_addr(d_addr), .d_wdata(d_wdata),
    .d_ack(d_ack), .d_rdata(d_rdata), .overrun(ovr));

  always #12.5 clk = ~clk;   // 40 MHz

  logic [7:0] mem [int];
  int lat = 4;
  // downstream model
  initial forever begin
    @(posedge clk);
    if (!rst && d_req && !d_ack) begin
      repeat (lat + $urandom % 2) @(posedge clk);
      #1;
      if (d_we) mem[int'(d_addr)] = d_wdata;
      d_rdata = mem.exists(int'(d_addr)) ? mem[int'(d_addr)] : 8'hEE;
      d_ack = 1;
      @(posedge clk); #1 d_ack = 0;
    end
  end

  // one CCU access: strobe of `sl` ns inside a 250 ns cycle; returns the
  // byte on the bus just before the strobe ends
  task automatic acc(bit we, int a, logic [7:0] wd, int sl, output logic [7:0] rd);
    ca = AW'(a); cw = wd;
    #50;
    if (we) wr_n = 0; else rd_n = 0;
    #(sl - 1);
    rd = cr;
    #1 wr_n = 1; rd_n = 1;
    if (sl < 200) #(200 - sl);
  endtask

  initial begin
    logic [7:0] r;
    logic [7:0] exp [8];
    #100 rst = 0;
    #100;
    // block write of 8 bytes
    for (int i = 0; i < 8; i++) begin
      exp[i] = 8'($urandom);
      acc(1, 16'h100 + i, exp[i], 50, r);
    end
    #500;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (!mem.exists(16'h100 + i) || mem[16'h100 + i] != exp[i]) begin
        failures++; $display("FAIL write %0d", i);
      end
    end
    // block read of 8 bytes: data delayed by one read
    for (int i = 0; i < 9; i++) begin
      acc(0, 16'h100 + (i % 8), 0, 50, r);
      checks++;
      if (i == 0) begin
        if (r != 8'h00) begin failures++; $display("FAIL dummy byte %h", r); end
      end else if (r != exp[i - 1]) begin
        failures++; $display("FAIL block read %0d: %h expected %h", i, r, exp[i - 1]);
      end
    end
    // single-mode read with a long strobe returns its own data
    mem[16'h1234] = 8'h5C;
    acc(0, 16'h1234, 0, 600, r);
    checks++; if (r != 8'h5C) begin failures++; $display("FAIL single read %h", r); end
    checks++; if (ovr) begin failures++; $display("FAIL overrun without cause"); end
    // downstream too slow for back-to-back cycles: overrun
    lat = 30;
    acc(1, 5, 1, 50, r);
    acc(1, 6, 2, 50, r);
    #2000;
    checks++; if (!ovr) begin failures++; $display("FAIL overrun not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
