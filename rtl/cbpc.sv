// Control Board Programmable Controller (CBPC).
//
// The CBPC is an SRAM FPGA loaded by the CBIC; it holds the features that
// may need changes later. This module is its FLASH side: a Control Bus
// slave, the FLASH memory controller (flash_writer) for block writes into
// the Control Board FLASH, and the background checker that keeps reading
// the stored images and raises the CCU25 alarm when it finds a corrupted
// word. The logic is held in reset while the CBIC has not activated it
// (active low), as an unconfigured FPGA would be. The multibyte I2C
// controller of the CBPC is not part of this module.
//
// Registers, Control Bus word address BASE + offset (the slave answers
// 0000h-7FFFh when BASE is 0; CBIC registers 0000h-00FFh never reach it):
//   100h..103h  flash_writer registers (GROUP_LO, GROUP_HI, DATA, CMD)
//   110h STATUS r {corrupt, fatal, chk_en, wr_busy, wr_error, 11'b0}
//   111h CTRL   w bit0 clear corrupt/fatal, bit1 checker enable (1 at start)
//   112h SCANS  r completed checker passes
// The FLASH belongs to the writer while it is busy and to the checker
// otherwise. The register map is this design's.
module cbpc #(
  parameter logic [15:0]  BASE            = 16'h0000,
  parameter int unsigned  N_IMG           = 4,
  parameter int unsigned  CFG_BYTES       = 234456,
  parameter int unsigned  FLASH_AW        = 21,
  parameter int unsigned  IMG_STRIDE_LOG2 = 17,
  parameter int unsigned  RD_CYC          = 6,
  parameter int unsigned  BUF_GROUPS      = 16,
  parameter int unsigned  WR_TIMEOUT      = 1 << 22
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                active,
  // Control Bus slave
  input  logic [15:0]         cb_addr,
  input  logic [15:0]         cb_wdata,
  input  logic                cb_wr_n,
  input  logic                cb_rd_n,
  output logic [15:0]         cb_rdata,
  // Control Board FLASH
  output logic [FLASH_AW-1:0] f_addr,
  output logic                f_oe,
  output logic                f_we_n,
  output logic [31:0]         f_wdata,
  input  logic [31:0]         f_din,
  input  logic                f_rdy,
  output logic                alarm
);
  logic        rl;
  logic        reg_we, reg_re;
  logic [15:0] reg_addr, reg_wdata, reg_rdata, wr_rdata;
  logic        wr_busy, wr_err, wr_sel;
  logic        chk_en, chk_clear, corrupt, fatal, chk_idle, chk_oe;
  logic [15:0] scans;
  logic [FLASH_AW-1:0] wr_addr, chk_addr;

  assign rl = rst || !active;

  cbus_slave #(.BASE(BASE), .MASK(16'h8000)) u_sl (
    .clk(clk), .rst(rl), .cb_addr(cb_addr), .cb_wdata(cb_wdata), .cb_wr_n(cb_wr_n),
    .cb_rd_n(cb_rd_n), .cb_rdata(cb_rdata), .reg_we(reg_we), .reg_re(reg_re),
    .reg_addr(reg_addr), .reg_wdata(reg_wdata), .reg_rdata(reg_rdata)
  );

  assign wr_sel = (reg_addr[11:2] == 10'h040);

  flash_writer #(.AW(FLASH_AW), .BUF_GROUPS(BUF_GROUPS), .TIMEOUT(WR_TIMEOUT)) u_wr (
    .clk(clk), .rst(rl), .reg_we(reg_we && wr_sel), .reg_addr(reg_addr[1:0]),
    .reg_wdata(reg_wdata), .reg_rdata(wr_rdata), .busy(wr_busy), .error(wr_err),
    .f_addr(wr_addr), .f_we_n(f_we_n), .f_wdata(f_wdata), .f_rdy(f_rdy)
  );

  bg_checker #(
    .AW(FLASH_AW), .N_IMG(N_IMG), .IMG_STRIDE_LOG2(IMG_STRIDE_LOG2),
    .N_GROUPS((CFG_BYTES + 9) / 10), .RD_CYC(RD_CYC)
  ) u_chk (
    .clk(clk), .rst(rl), .enable(chk_en), .pause(wr_busy), .clear(chk_clear),
    .corrupt(corrupt), .fatal(fatal), .scans(scans), .idle(chk_idle),
    .f_addr(chk_addr), .f_oe(chk_oe), .f_din(f_din)
  );

  assign f_addr = wr_busy ? wr_addr : chk_addr;
  assign f_oe   = chk_oe && !wr_busy;
  assign alarm  = corrupt || fatal;

  always_comb begin
    reg_rdata = 16'h0000;
    if (wr_sel) reg_rdata = wr_rdata;
    else if (reg_addr[11:0] == 12'h110)
      reg_rdata = {corrupt, fatal, chk_en, wr_busy, wr_err, 11'b0};
    else if (reg_addr[11:0] == 12'h112)
      reg_rdata = scans;
  end

  always_ff @(posedge clk) begin
    if (rl) begin
      chk_en    <= 1'b1;
      chk_clear <= 1'b0;
    end else begin
      chk_clear <= 1'b0;
      if (reg_we && reg_addr[11:0] == 12'h111) begin
        chk_clear <= reg_wdata[0];
        chk_en    <= reg_wdata[1];
      end
    end
  end
endmodule
