// Testbench of selectmap_cfg with two FPGA models: a correct image loads
// at one byte per clock and ends with ok; a wrong image makes the model
// drop INIT_B and the load ends without ok; a target whose INIT_B never
// rises ends with a timeout. Only the addressed target sees PROG_B/CS_B.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_selectmap_cfg;
  import tb_ref_pkg::*;
  localparam int NB = 300;
  logic clk = 0, rst = 1, start = 0, busy, finish, ok, ib_valid = 0, ib_ready, write_b;
  logic [1:0] tgt = 0;
  logic [7:0] ib_data = 0, d;
  logic [2:0] prog_b, cs_b, init_b, done_o;
  int checks = 0, failures = 0;

  selectmap_cfg #(.N_TGT(3), .PROG_CYC(8), .TIMEOUT(500)) dut (
    .clk(clk), .rst(rst), .start(start), .target(tgt), .n_bytes(32'(NB)), .ib_valid(ib_valid),
    .ib_data(ib_data), .ib_ready(ib_ready), .busy(busy), .finish(finish), .ok(ok),
    .sm_prog_b(prog_b), .sm_cs_b(cs_b), .sm_write_b(write_b), .sm_d(d),
    .sm_init_b(init_b), .sm_done(done_o));

  for (genvar i = 0; i < 2; i++) begin : g_f
    tb_fpga_model #(.SEED(10 + i), .NBYTES(NB)) f (
      .clk(clk), .prog_b(prog_b[i]), .cs_b(cs_b[i]), .write_b(write_b), .d(d),
      .init_b(init_b[i]), .done(done_o[i]));
  end
  assign init_b[2] = 1'b0;   // a target that never leaves its clearing phase
  assign done_o[2] = 1'b0;

  always #5 clk = ~clk;

  int seed = 10, idx = 0;
  bit gaps = 0;
  // byte source
  always @(posedge clk) begin
    if (ib_valid && ib_ready) idx <= idx + 1;
  end
  always_comb ib_data = img_byte(seed, idx);
  always @(negedge clk) ib_valid = gaps ? 1'($urandom % 2) : 1'b1;

  task automatic load(int t, int s, output bit r_ok, output longint cyc);
    longint c;
    tgt = 2'(t); seed = s; idx = 0;
    @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
    c = 0;
    while (!finish && c < 5000) begin @(posedge clk); c++; end
    #1 r_ok = ok; cyc = c;
  endtask

  initial begin
    bit r; longint c;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    load(0, 10, r, c);
    checks++; if (!r || !done_o[0]) begin failures++; $display("FAIL target 0 load"); end
    checks++;
    if (g_f[0].f.last - g_f[0].f.first != NB - 1) begin
      failures++; $display("FAIL rate: %0d clocks for %0d bytes", g_f[0].f.last - g_f[0].f.first + 1, NB);
    end
    checks++; if (g_f[1].f.cleared) begin failures++; $display("FAIL target 1 touched"); end
    gaps = 1;
    load(1, 10, r, c);   // wrong image for target 1
    checks++; if (r || done_o[1]) begin failures++; $display("FAIL wrong image accepted"); end
    load(1, 11, r, c);
    checks++; if (!r || !done_o[1]) begin failures++; $display("FAIL target 1 load with gaps"); end
    checks++; if (!done_o[0]) begin failures++; $display("FAIL target 0 lost DONE"); end
    load(2, 12, r, c);
    checks++; if (r || c < 500) begin failures++; $display("FAIL init timeout ok=%0b c=%0d", r, c); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
