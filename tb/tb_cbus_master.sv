// Testbench of cbus_master: for writes and reads the address and data must
// be stable SETUP_CYC clocks before the strobe, the strobe must last
// exactly STROBE_CYC clocks, the ack must come SETUP_CYC+STROBE_CYC+1
// clocks after the request is taken, the data must be driven only for writes and
// read data must be taken at the end of the strobe. A bus-side memory
// model checks the values.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_cbus_master;
  localparam int SU = 1, ST = 4, HO = 1;
  logic clk = 0, rst = 1, req = 0, we = 0, ack, oe, wr_n, rd_n;
  logic [15:0] addr = 0, wdata = 0, rdata, cba, cbw, cbr;
  int checks = 0, failures = 0;

  cbus_master #(.SETUP_CYC(SU), .STROBE_CYC(ST), .HOLD_CYC(HO)) dut (
    .clk(clk), .rst(rst), .req(req), .we(we), .addr(addr), .wdata(wdata), .ack(ack),
    .rdata(rdata), .cb_addr(cba), .cb_wdata(cbw), .cb_oe(oe), .cb_wr_n(wr_n), .cb_rd_n(rd_n),
    .cb_rdata(cbr));

  always #5 clk = ~clk;

  logic [15:0] mem [int];
  int low = 0, stable = 0, bad_len = 0, bad_setup = 0, bad_oe = 0;
  logic [15:0] a_q;
  bit strobe_q = 0;
  // bus monitor
  always @(posedge clk) begin
    bit s;
    s = !wr_n || !rd_n;
    if (!rst) begin
      if (cba != a_q) stable <= 0; else stable <= stable + 1;
      a_q <= cba;
      if (s) begin
        low <= low + 1;
        if (!strobe_q && stable < SU - 1) bad_setup++;
        if (!rd_n && oe) bad_oe++;
      end else if (strobe_q) begin
        if (low != ST) bad_len++;
        if (!wr_n_q) mem[int'(cba)] = cbw;
        low <= 0;
      end
      strobe_q <= s;
      wr_n_q <= wr_n;
    end
  end
  logic wr_n_q = 1;
  assign cbr = !rd_n ? (mem.exists(int'(cba)) ? mem[int'(cba)] : 16'h0BAD) : 16'h0000;

  task automatic acc(bit w, logic [15:0] a, logic [15:0] d, output logic [15:0] r, output int cyc);
    int c;
    #1 req = 1; we = w; addr = a; wdata = d;
    c = 0;
    do begin @(posedge clk); c++; end while (!ack);
    #1 r = rdata; req = 0; cyc = c;
  endtask

  initial begin
    logic [15:0] r, v [10];
    int cyc;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 10; i++) begin
      v[i] = 16'($urandom);
      acc(1, 16'h2000 + 16'(i), v[i], r, cyc);
      checks++;
      if (cyc != SU + ST + 2) begin failures++; $display("FAIL write cycle %0d clocks", cyc); end
    end
    for (int i = 0; i < 10; i++) begin
      acc(0, 16'h2000 + 16'(i), 0, r, cyc);
      checks++;
      if (r != v[i]) begin failures++; $display("FAIL read %0d: %h expected %h", i, r, v[i]); end
    end
    checks++;
    if (bad_len || bad_setup || bad_oe) begin
      failures++; $display("FAIL timing len=%0d setup=%0d oe=%0d", bad_len, bad_setup, bad_oe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
