// Behavioural model of the CCU25 memory channel as a bus master, for the
// testbenches. Every byte access is a 250 ns cycle: address and data are
// set, the active-low strobe falls 50 ns later and lasts `strobe` ns
// (50 ns in block mode, longer in single mode). Word tasks use byte
// address 2*w (low byte) and 2*w+1 (high byte). A block read issues one
// extra byte read at the end and drops the first byte, because in block
// mode every read returns the byte of the read before it.
// The 50 ns strobe in a 250 ns cycle is the published CCU25 block-mode
// timing; the single-mode strobe length and the task interface are this
// design's.
module tb_ccu_model (
  output logic [16:0] ccu_addr,
  output logic [7:0]  ccu_wdata,
  output logic        ccu_wr_n,
  output logic        ccu_rd_n,
  input  logic [7:0]  ccu_rdata
);
  int single_strobe = 450;
  int accesses = 0;

  initial begin
    ccu_addr  = '0;
    ccu_wdata = '0;
    ccu_wr_n  = 1'b1;
    ccu_rd_n  = 1'b1;
  end

  task automatic acc(bit we, int a, logic [7:0] wd, int strobe, output logic [7:0] rd);
    ccu_addr  = 17'(a);
    ccu_wdata = wd;
    #50;
    if (we) ccu_wr_n = 1'b0; else ccu_rd_n = 1'b0;
    #(strobe - 1);
    rd = ccu_rdata;
    #1;
    ccu_wr_n = 1'b1;
    ccu_rd_n = 1'b1;
    if (strobe < 200) #(200 - strobe); else #50;
    accesses++;
  endtask

  task automatic write16(int w, logic [15:0] d);
    logic [7:0] r;
    acc(1, 2 * w, d[7:0], single_strobe, r);
    acc(1, 2 * w + 1, d[15:8], single_strobe, r);
  endtask

  task automatic read16(int w, output logic [15:0] d);
    logic [7:0] lo, hi;
    acc(0, 2 * w, 8'h00, single_strobe, lo);
    acc(0, 2 * w + 1, 8'h00, single_strobe, hi);
    d = {hi, lo};
  endtask

  // block write of n words from d[] to word addresses w, w+1, ...
  task automatic bwrite16(int w, int n, logic [15:0] d [$]);
    logic [7:0] r;
    for (int i = 0; i < n; i++) begin
      acc(1, 2 * (w + i), d[i][7:0], 50, r);
      acc(1, 2 * (w + i) + 1, d[i][15:8], 50, r);
    end
  endtask

  // block write of n words to one word address (a data port)
  task automatic bwrite16_port(int w, int n, logic [15:0] d [$]);
    logic [7:0] r;
    for (int i = 0; i < n; i++) begin
      acc(1, 2 * w, d[i][7:0], 50, r);
      acc(1, 2 * w + 1, d[i][15:8], 50, r);
    end
  endtask

  task automatic bread16(int w, int n, output logic [15:0] d [$]);
    logic [7:0] b [$];
    logic [7:0] r;
    d = {};
    for (int i = 0; i <= 2 * n; i++) begin
      acc(0, 2 * w + i, 8'h00, 50, r);
      if (i > 0) b.push_back(r);
    end
    for (int i = 0; i < n; i++) d.push_back({b[2 * i + 1], b[2 * i]});
  endtask
endmodule
