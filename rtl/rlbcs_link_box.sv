// RPC Link Box Control System - Link Box part.
//
// One Control Board and N_LB Link Boards share a 16-bit asynchronous
// Control Bus (CBus). The Control Board logic is the CBIC (start-up and
// emergency loader, CCU25 bus converters and CBus master) and the CBPC
// (FLASH controller and background checker of the Control Board FLASH).
// Each Link Board has an LBC that loads its two FPGAs from its own FLASH,
// checks that FLASH in the background and raises an interrupt; it also
// bridges a window of Control Bus addresses to the Internal Interface of
// its loaded FPGAs. The CBIC emergency state and the CBPC corruption flag
// drive one CCU25 alarm input; the OR of the Link Board interrupts drives
// a second one.
//
// The CBIC and the CBPC share the Control Board FLASH: the CBIC reads it
// until it activates the CBPC, the CBPC owns it afterwards. The CBus slaves'
// read data are ORed, each slave driving zero unless it is selected and
// read, in place of the tri-state bus of the boards. CBus map: 0000h-00FFh
// CBIC (not placed on the bus), 0100h-7FFFh CBPC, 8000h+800h*k Link Board k
// (2K words each, room for the 16 Link Boards of a full Link Box).
//
// The CCU25, TTCrx, FLASH chips and the FPGAs being loaded are outside
// this module; their pins are ports. All logic runs on clk, the ~40 MHz
// TTC clock. The CCU25 alarm and these board-level connections follow the
// published Link Box structure; the address map and bus modelling are this
// design's.
module rlbcs_link_box #(
  parameter int unsigned N_LB            = 3,
  parameter int unsigned CFG_BYTES       = 234456,
  parameter int unsigned FLASH_AW        = 21,
  parameter int unsigned IMG_STRIDE_LOG2 = 17,
  parameter int unsigned RD_CYC          = 6,
  parameter int unsigned PROG_CYC        = 16,
  parameter int unsigned TIMEOUT         = 65536,
  parameter int unsigned BUF_GROUPS      = 16,
  parameter int unsigned WR_TIMEOUT      = 1 << 22,
  localparam int unsigned N_FPGA         = 2,
  localparam int unsigned N_CB_TGT       = N_LB + 1
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic                             ttc_reconf,      // global request to the CBIC
  input  logic                             ttc_lb_reconf,   // Link Board FPGA reload
  // CCU25 memory bus, parallel-port line and alarm
  input  logic [16:0]                      ccu_addr,
  input  logic [7:0]                       ccu_wdata,
  input  logic                             ccu_wr_n,
  input  logic                             ccu_rd_n,
  output logic [7:0]                       ccu_rdata,
  input  logic                             ccu_force_emerg,
  output logic                             ccu_alarm,       // Control Board alarm
  output logic                             ccu_lb_alarm,    // Link Board interrupts
  // Control Board FLASH
  output logic [FLASH_AW-1:0]              cbf_addr,
  output logic                             cbf_oe,
  output logic                             cbf_we_n,
  output logic [31:0]                      cbf_wdata,
  input  logic [31:0]                      cbf_din,
  input  logic                             cbf_rdy,
  // Select Map of the CBPC (0) and the LBC FPGAs (1..N_LB)
  output logic [N_CB_TGT-1:0]              cb_sm_prog_b,
  output logic [N_CB_TGT-1:0]              cb_sm_cs_b,
  output logic                             cb_sm_write_b,
  output logic [7:0]                       cb_sm_d,
  input  logic [N_CB_TGT-1:0]              cb_sm_init_b,
  input  logic [N_CB_TGT-1:0]              cb_sm_done,
  // Link Board FLASHes
  output logic [N_LB-1:0][FLASH_AW-1:0]    lbf_addr,
  output logic [N_LB-1:0]                  lbf_oe,
  output logic [N_LB-1:0]                  lbf_we_n,
  output logic [N_LB-1:0][31:0]            lbf_wdata,
  input  logic [N_LB-1:0][31:0]            lbf_din,
  input  logic [N_LB-1:0]                  lbf_rdy,
  // Select Map of the Link Board FPGAs
  output logic [N_LB-1:0][N_FPGA-1:0]      lb_sm_prog_b,
  output logic [N_LB-1:0][N_FPGA-1:0]      lb_sm_cs_b,
  output logic [N_LB-1:0]                  lb_sm_write_b,
  output logic [N_LB-1:0][7:0]             lb_sm_d,
  input  logic [N_LB-1:0][N_FPGA-1:0]      lb_sm_init_b,
  input  logic [N_LB-1:0][N_FPGA-1:0]      lb_sm_done,
  // Internal Interface of each Link Board to its loaded FPGAs
  output logic [N_LB-1:0][9:0]             lb_ii_addr,
  output logic [N_LB-1:0][15:0]            lb_ii_wdata,
  output logic [N_LB-1:0]                  lb_ii_we,
  output logic [N_LB-1:0]                  lb_ii_re,
  input  logic [N_LB-1:0][15:0]            lb_ii_rdata,
  // status
  output logic [1:0]                       cbic_state,
  output logic                             cbpc_active,
  output logic [N_LB-1:0]                  lb_irq
);
  // Control Bus
  logic [15:0]           cb_addr, cb_wdata, cb_rdata, cbpc_rdata;
  logic [N_LB-1:0][15:0] lb_rdata;
  logic                  cb_oe, cb_wr_n, cb_rd_n;

  logic                  cbic_alarm, cbpc_alarm, lbc_active;
  logic [FLASH_AW-1:0]   ic_faddr, pc_faddr;
  logic                  ic_foe, pc_foe;

  cbic #(
    .N_LB(N_LB), .CFG_BYTES(CFG_BYTES), .FLASH_AW(FLASH_AW), .IMG_STRIDE_LOG2(IMG_STRIDE_LOG2),
    .RD_CYC(RD_CYC), .PROG_CYC(PROG_CYC), .TIMEOUT(TIMEOUT), .CCU_AW(17)
  ) u_cbic (
    .clk(clk), .rst(rst), .ttc_reconf(ttc_reconf), .force_emerg(ccu_force_emerg),
    .ccu_addr(ccu_addr), .ccu_wdata(ccu_wdata), .ccu_wr_n(ccu_wr_n), .ccu_rd_n(ccu_rd_n),
    .ccu_rdata(ccu_rdata), .alarm(cbic_alarm),
    .cb_addr(cb_addr), .cb_wdata(cb_wdata), .cb_oe(cb_oe), .cb_wr_n(cb_wr_n),
    .cb_rd_n(cb_rd_n), .cb_rdata(cb_rdata),
    .f_addr(ic_faddr), .f_oe(ic_foe), .f_din(cbf_din),
    .sm_prog_b(cb_sm_prog_b), .sm_cs_b(cb_sm_cs_b), .sm_write_b(cb_sm_write_b),
    .sm_d(cb_sm_d), .sm_init_b(cb_sm_init_b), .sm_done(cb_sm_done),
    .cbpc_active(cbpc_active), .lbc_active(lbc_active), .state(cbic_state)
  );

  cbpc #(
    .BASE(16'h0000), .N_IMG(N_CB_TGT), .CFG_BYTES(CFG_BYTES), .FLASH_AW(FLASH_AW),
    .IMG_STRIDE_LOG2(IMG_STRIDE_LOG2), .RD_CYC(RD_CYC), .BUF_GROUPS(BUF_GROUPS),
    .WR_TIMEOUT(WR_TIMEOUT)
  ) u_cbpc (
    .clk(clk), .rst(rst), .active(cbpc_active),
    .cb_addr(cb_addr), .cb_wdata(cb_wdata), .cb_wr_n(cb_wr_n), .cb_rd_n(cb_rd_n),
    .cb_rdata(cbpc_rdata),
    .f_addr(pc_faddr), .f_oe(pc_foe), .f_we_n(cbf_we_n), .f_wdata(cbf_wdata),
    .f_din(cbf_din), .f_rdy(cbf_rdy), .alarm(cbpc_alarm)
  );

  assign cbf_addr = cbpc_active ? pc_faddr : ic_faddr;
  assign cbf_oe   = cbpc_active ? pc_foe   : ic_foe;

  for (genvar k = 0; k < N_LB; k++) begin : g_lb
    lbc #(
      .BASE(16'h8000 | 16'(k << 11)), .N_FPGA(N_FPGA), .CFG_BYTES(CFG_BYTES), .FLASH_AW(FLASH_AW),
      .IMG_STRIDE_LOG2(IMG_STRIDE_LOG2), .RD_CYC(RD_CYC), .PROG_CYC(PROG_CYC),
      .TIMEOUT(TIMEOUT), .BUF_GROUPS(BUF_GROUPS), .WR_TIMEOUT(WR_TIMEOUT)
    ) u_lbc (
      .clk(clk), .rst(rst), .active(lbc_active), .ttc_reconf(ttc_lb_reconf),
      .cb_addr(cb_addr), .cb_wdata(cb_wdata), .cb_wr_n(cb_wr_n), .cb_rd_n(cb_rd_n),
      .cb_rdata(lb_rdata[k]),
      .f_addr(lbf_addr[k]), .f_oe(lbf_oe[k]), .f_we_n(lbf_we_n[k]), .f_wdata(lbf_wdata[k]),
      .f_din(lbf_din[k]), .f_rdy(lbf_rdy[k]),
      .sm_prog_b(lb_sm_prog_b[k]), .sm_cs_b(lb_sm_cs_b[k]), .sm_write_b(lb_sm_write_b[k]),
      .sm_d(lb_sm_d[k]), .sm_init_b(lb_sm_init_b[k]), .sm_done(lb_sm_done[k]),
      .ii_addr(lb_ii_addr[k]), .ii_wdata(lb_ii_wdata[k]), .ii_we(lb_ii_we[k]),
      .ii_re(lb_ii_re[k]), .ii_rdata(lb_ii_rdata[k]),
      .irq(lb_irq[k])
    );
  end

  // Wired-OR read data of the Control Bus slaves.
  always_comb begin
    cb_rdata = cbpc_rdata;
    for (int k = 0; k < N_LB; k++) cb_rdata |= lb_rdata[k];
  end

  assign ccu_alarm    = cbic_alarm || cbpc_alarm;
  assign ccu_lb_alarm = |lb_irq;

  // The master drives the data lines only for writes; a read must never
  // find them driven.
  a_bus_dir: assert property (@(posedge clk) disable iff (rst) !cb_rd_n |-> !cb_oe);
endmodule
