// Link Board Controller (LBC) with its FPGA configurator.
//
// The LBC is an SRAM FPGA on each Link Board, loaded and activated by the
// CBIC. Once active it loads the N_FPGA data processing FPGAs of its board
// from the Link Board FLASH (image t at logical word t*2^IMG_STRIDE_LOG2),
// and loads them again on a TTCrx reconfiguration request (ttc_reconf) or
// a CTRL command. A failed load sets the interrupt line, which raises the
// CCU25 alarm, and the LBC then waits for the FLASH to be refreshed over
// the Control Bus (flash_writer) and for a new load command. In normal
// operation the background checker keeps reading the images and also sets
// the interrupt when it finds a corrupted word. The logic is held in reset
// while active is low. This behaviour is the published one; the register
// map and the priorities below are this design's.
//
// Registers, Control Bus word address BASE + offset (BASE on a 2K-word
// boundary; the slave answers the 800h words from BASE):
//   000h STATUS r {cfg_busy (load pending or running), cfg_failed, corrupt, fatal, chk_en, wr_busy,
//                  wr_error, flash_err (last load met FLASH errors), ok_mask[7:0]}
//   001h CTRL   w bit0 load the FPGAs, bit1 clear interrupt causes,
//                 bit2 checker enable (1 at start)
//   002h SCANS  r completed checker passes
//   100h..103h  flash_writer registers (GROUP_LO, GROUP_HI, DATA, CMD)
//   400h..7FFh  Internal Interface: ii_addr = offset bits 9:0. ii_we/ii_re
//               pulse once per CBus cycle, at the start of the strobe;
//               ii_rdata must follow ii_addr combinationally and is put on
//               the bus for the rest of the strobe. The window is open only
//               when every FPGA is loaded and no load is pending (writes
//               are dropped, reads return 0 otherwise). The Internal
//               Interface is named in the published Link Board structure;
//               its signals and timing are this design's.
// FLASH priority: configurator, then writer, then checker. A writer
// command is ignored while the FPGAs are being loaded, and a load waits
// for a running write to end.
module lbc #(
  parameter logic [15:0]  BASE            = 16'h8000,
  parameter int unsigned  N_FPGA          = 2,
  parameter int unsigned  CFG_BYTES       = 234456,
  parameter int unsigned  FLASH_AW        = 21,
  parameter int unsigned  IMG_STRIDE_LOG2 = 17,
  parameter int unsigned  RD_CYC          = 6,
  parameter int unsigned  PROG_CYC        = 16,
  parameter int unsigned  TIMEOUT         = 65536,
  parameter int unsigned  BUF_GROUPS      = 16,
  parameter int unsigned  WR_TIMEOUT      = 1 << 22
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                active,
  input  logic                ttc_reconf,
  // Control Bus slave
  input  logic [15:0]         cb_addr,
  input  logic [15:0]         cb_wdata,
  input  logic                cb_wr_n,
  input  logic                cb_rd_n,
  output logic [15:0]         cb_rdata,
  // Link Board FLASH
  output logic [FLASH_AW-1:0] f_addr,
  output logic                f_oe,
  output logic                f_we_n,
  output logic [31:0]         f_wdata,
  input  logic [31:0]         f_din,
  input  logic                f_rdy,
  // Select Map to the Link Board FPGAs
  output logic [N_FPGA-1:0]   sm_prog_b,
  output logic [N_FPGA-1:0]   sm_cs_b,
  output logic                sm_write_b,
  output logic [7:0]          sm_d,
  input  logic [N_FPGA-1:0]   sm_init_b,
  input  logic [N_FPGA-1:0]   sm_done,
  // Internal Interface to the registers of the loaded Link Board FPGAs
  output logic [9:0]          ii_addr,
  output logic [15:0]         ii_wdata,
  output logic                ii_we,
  output logic                ii_re,
  input  logic [15:0]         ii_rdata,
  output logic                irq
);
  localparam int unsigned TGW = (N_FPGA > 1) ? $clog2(N_FPGA) : 1;

  logic        rl;
  logic        reg_we, reg_re;
  logic [15:0] reg_addr, reg_wdata, reg_rdata, wr_rdata;
  logic        wr_busy, wr_err, wr_sel, wr_we, ii_sel, ii_en;
  logic        chk_en, chk_clear, corrupt, fatal, chk_idle, chk_oe;
  logic [15:0] scans;
  logic        c_start, c_busy, c_done, c_ferr, c_oe, cfg_pending, cfg_failed;
  logic [N_FPGA-1:0] c_ok, c_fail, ok_q;
  logic [FLASH_AW-1:0] wr_addr, chk_addr, c_addr;

  assign rl = rst || !active;

  cbus_slave #(.BASE(BASE), .MASK(16'hF800)) u_sl (
    .clk(clk), .rst(rl), .cb_addr(cb_addr), .cb_wdata(cb_wdata), .cb_wr_n(cb_wr_n),
    .cb_rd_n(cb_rd_n), .cb_rdata(cb_rdata), .reg_we(reg_we), .reg_re(reg_re),
    .reg_addr(reg_addr), .reg_wdata(reg_wdata), .reg_rdata(reg_rdata)
  );

  assign wr_sel = (reg_addr[10:2] == 9'h040);
  assign ii_sel = reg_addr[10];
  assign ii_en  = (ok_q == '1) && !c_busy && !cfg_pending;

  // Internal Interface: offsets 400h-7FFh reach the FPGAs once all of them
  // are loaded; the address and data stay valid for the whole CBus cycle.
  assign ii_addr  = reg_addr[9:0];
  assign ii_wdata = reg_wdata;
  assign ii_we    = reg_we && ii_sel && ii_en;
  assign ii_re    = reg_re && ii_sel && ii_en;
  assign wr_we  = reg_we && wr_sel && !(c_busy && reg_addr[1:0] == 2'd3);

  flash_writer #(.AW(FLASH_AW), .BUF_GROUPS(BUF_GROUPS), .TIMEOUT(WR_TIMEOUT)) u_wr (
    .clk(clk), .rst(rl), .reg_we(wr_we), .reg_addr(reg_addr[1:0]),
    .reg_wdata(reg_wdata), .reg_rdata(wr_rdata), .busy(wr_busy), .error(wr_err),
    .f_addr(wr_addr), .f_we_n(f_we_n), .f_wdata(f_wdata), .f_rdy(f_rdy)
  );

  fpga_configurator #(
    .AW(FLASH_AW), .N_TGT(N_FPGA), .CFG_BYTES(CFG_BYTES), .IMG_STRIDE_LOG2(IMG_STRIDE_LOG2),
    .RD_CYC(RD_CYC), .PROG_CYC(PROG_CYC), .TIMEOUT(TIMEOUT)
  ) u_cfg (
    .clk(clk), .rst(rl), .start_all(c_start), .start_one(1'b0), .one_tgt(TGW'(0)),
    .ext(1'b0), .ext_valid(1'b0), .ext_data(8'h00), .ext_ready(),
    .busy(c_busy), .done(c_done), .ok_mask(c_ok), .fail_mask(c_fail), .flash_err(c_ferr),
    .f_addr(c_addr), .f_oe(c_oe), .f_din(f_din), .sm_prog_b(sm_prog_b), .sm_cs_b(sm_cs_b),
    .sm_write_b(sm_write_b), .sm_d(sm_d), .sm_init_b(sm_init_b), .sm_done(sm_done)
  );

  bg_checker #(
    .AW(FLASH_AW), .N_IMG(N_FPGA), .IMG_STRIDE_LOG2(IMG_STRIDE_LOG2),
    .N_GROUPS((CFG_BYTES + 9) / 10), .RD_CYC(RD_CYC)
  ) u_chk (
    .clk(clk), .rst(rl), .enable(chk_en), .pause(wr_busy || c_busy || cfg_pending),
    .clear(chk_clear), .corrupt(corrupt), .fatal(fatal), .scans(scans), .idle(chk_idle),
    .f_addr(chk_addr), .f_oe(chk_oe), .f_din(f_din)
  );

  always_comb begin
    if (c_busy)       f_addr = c_addr;
    else if (wr_busy) f_addr = wr_addr;
    else              f_addr = chk_addr;
  end
  assign f_oe = c_busy ? c_oe : (chk_oe && !wr_busy);
  assign irq  = cfg_failed || corrupt || fatal;

  always_comb begin
    reg_rdata = 16'h0000;
    if (ii_sel) reg_rdata = ii_en ? ii_rdata : 16'h0000;
    else if (wr_sel) reg_rdata = wr_rdata;
    else if (reg_addr[10:0] == 11'h000)
      reg_rdata = {c_busy || cfg_pending, cfg_failed, corrupt, fatal, chk_en, wr_busy, wr_err, c_ferr, 8'(ok_q)};
    else if (reg_addr[10:0] == 11'h002)
      reg_rdata = scans;
  end

  assign c_start = cfg_pending && !c_busy && !wr_busy && chk_idle;

  always_ff @(posedge clk) begin
    if (rl) begin
      chk_en      <= 1'b1;
      chk_clear   <= 1'b0;
      cfg_pending <= 1'b1;        // load the FPGAs once activated
      cfg_failed  <= 1'b0;
      ok_q        <= '0;
    end else begin
      chk_clear <= 1'b0;
      if (c_start) cfg_pending <= 1'b0;
      if (ttc_reconf) cfg_pending <= 1'b1;
      if (reg_we && reg_addr[10:0] == 11'h001) begin
        if (reg_wdata[0]) cfg_pending <= 1'b1;
        if (reg_wdata[1]) begin
          chk_clear  <= 1'b1;
          cfg_failed <= 1'b0;
        end
        chk_en <= reg_wdata[2];
      end
      if (c_done) begin
        ok_q <= c_ok;
        if (c_fail != '0) cfg_failed <= 1'b1;
      end
    end
  end
endmodule
