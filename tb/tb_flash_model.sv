// Behavioural model of a 32-bit NOR FLASH holding test images.
//
// Unprogrammed contents are computed: image i (logical word
// i*2^STRIDE_LOG2) holds the protected encoding of the test image with seed
// SEED_BASE+i and NBYTES bytes, stored at scattered addresses; other words
// read FFFFFFFFh. Programmed words and erased sectors (2^SECT_LOG2 words)
// override the computed contents. corrupt() ORs bits into a word to mimic
// radiation damage (a programmed 0 turning into 1). Writes follow the
// usual unlock sequences: 555h/AA, 2AAh/55, 555h/A0, addr/data programs
// (AND into the old contents); 555h/AA, 2AAh/55, 555h/80, 555h/AA,
// 2AAh/55, sector/30 erases. rdy is low for BUSY_CYC clocks afterwards.
// Reads are combinational; the reader's timing is checked elsewhere.
// The 0-to-1 damage model follows the published observation on FLASH
// radiation damage; the command set and timing are common NOR practice,
// chosen for this design.
module tb_flash_model
  import tb_ref_pkg::*;
#(
  parameter int AW          = 21,
  parameter int SEED_BASE   = 1,
  parameter int N_IMG       = 2,
  parameter int STRIDE_LOG2 = 17,
  parameter int NBYTES      = 100,
  parameter int SECT_LOG2   = 16,
  parameter int BUSY_CYC    = 20
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          oe,
  input  logic          we_n,
  input  logic [31:0]   wdata,
  output logic [31:0]   dout,
  output logic          rdy
);
  logic [31:0] prog_mem [int];
  logic [31:0] flip [int];
  bit          erased [int];
  int          programs = 0;
  int          erases   = 0;
  int          reads    = 0;
  int          seq      = 0;
  int          busy_cnt = 0;
  logic        we_q     = 1'b1;
  logic        oe_q     = 1'b0;
  logic [AW-1:0] addr_q  = '0;

  function automatic logic [31:0] base_word(int a);
    int l, img, w, g, k;
    logic [127:0] enc;
    if (prog_mem.exists(a)) return prog_mem[a];
    if (erased.exists(a >> SECT_LOG2)) return 32'hFFFF_FFFF;
    l   = ref_scatter(a);
    img = l >> STRIDE_LOG2;
    w   = l & ((1 << STRIDE_LOG2) - 1);
    g   = w / 4;
    k   = w % 4;
    if (img >= N_IMG || g >= (NBYTES + 9) / 10) return 32'hFFFF_FFFF;
    enc = ref_encode(group_bits(SEED_BASE + img, g, NBYTES));
    return enc[32*k +: 32];
  endfunction

  function automatic logic [31:0] word_at(int a);
    logic [31:0] v;
    v = base_word(a);
    if (flip.exists(a)) v |= flip[a];
    return v;
  endfunction

  task automatic corrupt(int a, logic [31:0] mask);
    flip[a] = mask;
  endtask

  task automatic heal();
    flip.delete();
  endtask

  always_comb dout = word_at(int'(addr));
  assign rdy = (busy_cnt == 0);

  always_ff @(posedge clk) begin
    we_q <= we_n;
    oe_q <= oe;
    addr_q <= addr;
    if (oe && (!oe_q || addr != addr_q)) reads <= reads + 1;
    if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    // a write cycle ends on the rising edge of we_n
    if (we_n && !we_q) begin
      int a;
      logic [15:0] d;
      a = int'(addr);
      d = wdata[15:0];
      if (seq == 3) begin
        prog_mem[a] = word_at(a) & wdata;
        flip.delete(a);
        programs <= programs + 1;
        busy_cnt <= BUSY_CYC;
        seq = 0;
      end else if (seq == 5 && d == 16'h0030) begin
        erased[a >> SECT_LOG2] = 1'b1;
        for (int i = 0; i < (1 << SECT_LOG2); i++) begin
          int x;
          x = ((a >> SECT_LOG2) << SECT_LOG2) + i;
          if (prog_mem.exists(x)) prog_mem.delete(x);
          if (flip.exists(x)) flip.delete(x);
        end
        erases <= erases + 1;
        busy_cnt <= BUSY_CYC;
        seq = 0;
      end else if ((seq == 0 || seq == 3) && a == 'h555 && d == 16'h00AA) seq = 1;
      else if (seq == 1 && a == 'h2AA && d == 16'h0055) seq = 2;
      else if (seq == 2 && a == 'h555 && d == 16'h00A0) seq = 3;
      else if (seq == 2 && a == 'h555 && d == 16'h0080) seq = 30;
      else if (seq == 30 && a == 'h555 && d == 16'h00AA) seq = 31;
      else if (seq == 31 && a == 'h2AA && d == 16'h0055) seq = 5;
      else seq = 0;
    end
  end
endmodule
