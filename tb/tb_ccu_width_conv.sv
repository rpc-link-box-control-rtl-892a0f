// Testbench of ccu_width_conv: byte writes in low/high pairs must produce
// one 16-bit write each, with the right word address and data; byte reads
// must produce one 16-bit read per pair (low byte first) and return both
// bytes. The word side answers after a random latency.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_ccu_width_conv;
  localparam int AW = 17;
  logic clk = 0, rst = 1;
  logic u_req = 0, u_we = 0, u_ack, w_req, w_we, w_ack = 0;
  logic [AW-1:0] u_addr = '0;
  logic [AW-2:0] w_addr;
  logic [7:0] u_wdata = 0, u_rdata;
  logic [15:0] w_wdata, w_rdata = 0;
  int checks = 0, failures = 0;
  int wr_words = 0, rd_words = 0;

  ccu_width_conv #(.AW(AW)) dut (
    .clk(clk), .rst(rst), .u_req(u_req), .u_we(u_we), .u_addr(u_addr), .u_wdata(u_wdata),
    .u_ack(u_ack), .u_rdata(u_rdata), .w_req(w_req), .w_we(w_we), .w_addr(w_addr),
    .w_wdata(w_wdata), .w_ack(w_ack), .w_rdata(w_rdata));

  always #5 clk = ~clk;

  logic [15:0] mem [int];
  initial forever begin
    @(posedge clk);
    if (!rst && w_req && !w_ack) begin
      repeat ($urandom % 5) @(posedge clk);
      #1;
      if (w_we) begin mem[int'(w_addr)] = w_wdata; wr_words++; end
      else rd_words++;
      w_rdata = mem.exists(int'(w_addr)) ? mem[int'(w_addr)] : 16'hDEAD;
      w_ack = 1;
      @(posedge clk); #1 w_ack = 0;
    end
  end

  task automatic bacc(bit we, int a, logic [7:0] wd, output logic [7:0] rd);
    #1 u_req = 1; u_we = we; u_addr = AW'(a); u_wdata = wd;
    do @(posedge clk); while (!u_ack);
    rd = u_rdata;
    #1 u_req = 0;
    @(posedge clk);
  endtask

  initial begin
    logic [7:0] r, lo, hi;
    logic [15:0] v [16];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 16; i++) begin
      v[i] = 16'($urandom);
      bacc(1, 2 * (40 + i), v[i][7:0], r);
      bacc(1, 2 * (40 + i) + 1, v[i][15:8], r);
    end
    checks++; if (wr_words != 16) begin failures++; $display("FAIL %0d word writes", wr_words); end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (!mem.exists(40 + i) || mem[40 + i] != v[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    for (int i = 0; i < 16; i++) begin
      bacc(0, 2 * (40 + i), 0, lo);
      bacc(0, 2 * (40 + i) + 1, 0, hi);
      checks++;
      if ({hi, lo} != v[i]) begin failures++; $display("FAIL read %0d: %h expected %h", i, {hi, lo}, v[i]); end
    end
    checks++; if (rd_words != 16) begin failures++; $display("FAIL %0d word reads", rd_words); end
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
