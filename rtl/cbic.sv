// Control Board Initialization Controller (CBIC).
//
// The CBIC is the part of the Control Board that must work before any
// SRAM FPGA is loaded, so it is meant for a radiation-tolerant one-time
// programmable chip, and its state is kept in triple redundant registers
// (tmr_reg) with three separate synchronous resets made by three reset
// synchronisers.
//
// Operation. After reset, or after a reconfiguration request (ttc_reconf
// from the TTCrx, or the CTRL register), the CBIC loads target 0 (the
// Control Board Programmable Controller, CBPC) and targets 1..N_LB (the Link
// Board Controllers, LBC) from the Control Board FLASH. If all succeed it
// activates them and sleeps until the next request. If any fails, or if
// force_emerg (a CCU25 parallel-port line) or the force bit of CTRL is set
// when loading would start, it enters emergency mode: the CCU25 alarm is
// raised and the FPGAs are loaded with bytes the CCU25 writes into the
// EM_DATA register, one target at a time, until the CCU25 writes the
// activate bit. This sequence is the published one; the register map, the
// force input and the activate command are this design's.
//
// CCU25 side. The 8-bit CCU25 memory bus enters through the block mode
// converter and the data width converter; word address A[15:8] = 0 selects
// the CBIC registers below, all other addresses run a Control Bus cycle
// through cbus_master.
//   00h STATUS    r  {ok_mask[7:0], flash_err, overrun, em_full, cfg_busy,
//                     alarm, 1'b0, state[1:0]}
//   01h CTRL      w  bit0 force emergency (kept), bit1 reconfigure,
//                    bit2 activate (ends emergency mode)
//   02h EM_TARGET w  start loading target wdata from EM_DATA (emergency only)
//   03h EM_DATA   w  two configuration bytes, low byte first; the write is
//                    acknowledged once the previous pair has been taken
//   04h EM_RESULT r  {ok_mask[7:0], fail_mask[7:0]} of the last load
module cbic #(
  parameter int unsigned N_LB            = 3,
  parameter int unsigned CFG_BYTES       = 234456,
  parameter int unsigned FLASH_AW        = 21,
  parameter int unsigned IMG_STRIDE_LOG2 = 17,
  parameter int unsigned RD_CYC          = 6,
  parameter int unsigned PROG_CYC        = 16,
  parameter int unsigned TIMEOUT         = 65536,
  parameter int unsigned CCU_AW          = 17,
  localparam int unsigned N_TGT          = N_LB + 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ttc_reconf,
  input  logic                force_emerg,
  // CCU25 memory bus
  input  logic [CCU_AW-1:0]   ccu_addr,
  input  logic [7:0]          ccu_wdata,
  input  logic                ccu_wr_n,
  input  logic                ccu_rd_n,
  output logic [7:0]          ccu_rdata,
  output logic                alarm,
  // Control Bus master
  output logic [15:0]         cb_addr,
  output logic [15:0]         cb_wdata,
  output logic                cb_oe,
  output logic                cb_wr_n,
  output logic                cb_rd_n,
  input  logic [15:0]         cb_rdata,
  // Control Board FLASH (read only)
  output logic [FLASH_AW-1:0] f_addr,
  output logic                f_oe,
  input  logic [31:0]         f_din,
  // Select Map to the CBPC (target 0) and the LBCs
  output logic [N_TGT-1:0]    sm_prog_b,
  output logic [N_TGT-1:0]    sm_cs_b,
  output logic                sm_write_b,
  output logic [7:0]          sm_d,
  input  logic [N_TGT-1:0]    sm_init_b,
  input  logic [N_TGT-1:0]    sm_done,
  // activation of the loaded controllers
  output logic                cbpc_active,
  output logic                lbc_active,
  output logic [1:0]          state
);
  localparam int unsigned TGW = $clog2(N_TGT);

  typedef enum logic [1:0] {S_BOOT, S_CFG, S_SLEEP, S_EMERG} cbic_state_t;

  // ---- three separate synchronous resets
  logic [2:0][1:0] rsync;
  logic [2:0]      r3;
  logic            rl;
  for (genvar i = 0; i < 3; i++) begin : g_rst
    always_ff @(posedge clk) rsync[i] <= {rsync[i][0], rst};
    assign r3[i] = rsync[i][1];
  end
  assign rl = r3[0];

  // ---- triple redundant state: {force, state}
  cbic_state_t st, st_n;
  logic        force_q, force_n;
  logic [2:0]  tmr_q;

  tmr_reg #(.W(3), .RESET_VAL(3'b000)) u_state (
    .clk(clk), .r(r3), .en(1'b1), .d({force_n, st_n}), .q(tmr_q)
  );
  assign force_q = tmr_q[2];
  assign st      = cbic_state_t'(tmr_q[1:0]);

  assign alarm       = (st == S_EMERG);
  assign cbpc_active = (st == S_SLEEP);
  assign lbc_active  = (st == S_SLEEP);
  assign state       = st;

  // ---- CCU25 bus converters and the Control Bus master
  logic              b_req, b_we, b_ack, ovr;
  logic [CCU_AW-1:0] b_addr;
  logic [7:0]        b_wdata, b_rdata;
  logic              w_req, w_we, w_ack;
  logic [15:0]       w_addr, w_wdata, w_rdata;
  logic              local_sel, m_ack, l_ack;
  logic [15:0]       m_rdata, l_rdata;

  ccu_block_conv #(.AW(CCU_AW)) u_blk (
    .clk(clk), .rst(rl), .ccu_addr(ccu_addr), .ccu_wdata(ccu_wdata), .ccu_wr_n(ccu_wr_n),
    .ccu_rd_n(ccu_rd_n), .ccu_rdata(ccu_rdata), .d_req(b_req), .d_we(b_we), .d_addr(b_addr),
    .d_wdata(b_wdata), .d_ack(b_ack), .d_rdata(b_rdata), .overrun(ovr)
  );

  ccu_width_conv #(.AW(CCU_AW)) u_wid (
    .clk(clk), .rst(rl), .u_req(b_req), .u_we(b_we), .u_addr(b_addr), .u_wdata(b_wdata),
    .u_ack(b_ack), .u_rdata(b_rdata), .w_req(w_req), .w_we(w_we), .w_addr(w_addr),
    .w_wdata(w_wdata), .w_ack(w_ack), .w_rdata(w_rdata)
  );

  assign local_sel = (w_addr[15:8] == 8'h00);
  assign w_ack     = m_ack | l_ack;
  assign w_rdata   = l_ack ? l_rdata : m_rdata;

  cbus_master u_cbm (
    .clk(clk), .rst(rl), .req(w_req && !local_sel), .we(w_we), .addr(w_addr),
    .wdata(w_wdata), .ack(m_ack), .rdata(m_rdata), .cb_addr(cb_addr), .cb_wdata(cb_wdata),
    .cb_oe(cb_oe), .cb_wr_n(cb_wr_n), .cb_rd_n(cb_rd_n), .cb_rdata(cb_rdata)
  );

  // ---- configurator
  logic             c_start_all, c_start_one, c_busy, c_done, c_ferr;
  logic [TGW-1:0]   c_tgt;
  logic [N_TGT-1:0] c_ok, c_fail;
  logic             e_valid, e_ready;
  logic [15:0]      em_buf;
  logic [1:0]       em_cnt;

  assign e_valid = (em_cnt != 2'd0);

  fpga_configurator #(
    .AW(FLASH_AW), .N_TGT(N_TGT), .CFG_BYTES(CFG_BYTES), .IMG_STRIDE_LOG2(IMG_STRIDE_LOG2),
    .RD_CYC(RD_CYC), .PROG_CYC(PROG_CYC), .TIMEOUT(TIMEOUT)
  ) u_cfg (
    .clk(clk), .rst(rl), .start_all(c_start_all), .start_one(c_start_one), .one_tgt(c_tgt),
    .ext(1'b1), .ext_valid(e_valid), .ext_data(em_buf[7:0]), .ext_ready(e_ready),
    .busy(c_busy), .done(c_done), .ok_mask(c_ok), .fail_mask(c_fail), .flash_err(c_ferr),
    .f_addr(f_addr), .f_oe(f_oe), .f_din(f_din), .sm_prog_b(sm_prog_b), .sm_cs_b(sm_cs_b),
    .sm_write_b(sm_write_b), .sm_d(sm_d), .sm_init_b(sm_init_b), .sm_done(sm_done)
  );

  // ---- local registers
  logic l_hit, reconf_req, activate_req;
  assign l_hit = w_req && local_sel && !l_ack;

  always_ff @(posedge clk) begin
    if (rl) begin
      l_ack       <= 1'b0;
      l_rdata     <= '0;
      em_buf      <= '0;
      em_cnt      <= '0;
      c_start_one <= 1'b0;
      c_tgt       <= '0;
    end else begin
      l_ack       <= 1'b0;
      c_start_one <= 1'b0;
      if (e_valid && e_ready) begin
        em_buf <= {8'h00, em_buf[15:8]};
        em_cnt <= em_cnt - 2'd1;
      end
      if (l_hit) begin
        if (w_we) begin
          unique case (w_addr[7:0])
            8'h02: begin
              if (st == S_EMERG && !c_busy) begin
                c_tgt       <= TGW'(w_wdata);
                c_start_one <= 1'b1;
              end
              l_ack <= 1'b1;
            end
            8'h03: if (em_cnt == 2'd0) begin
              em_buf <= w_wdata;
              em_cnt <= 2'd2;
              l_ack  <= 1'b1;
            end
            default: l_ack <= 1'b1;
          endcase
        end else begin
          l_ack <= 1'b1;
          unique case (w_addr[7:0])
            8'h00:   l_rdata <= {8'(c_ok), c_ferr, ovr, (em_cnt != 2'd0), c_busy, alarm, 1'b0, state};
            8'h04:   l_rdata <= {8'(c_ok), 8'(c_fail)};
            default: l_rdata <= 16'h0000;
          endcase
        end
      end
    end
  end

  assign reconf_req   = ttc_reconf || (l_hit && w_we && w_addr[7:0] == 8'h01 && w_wdata[1]);
  assign activate_req = l_hit && w_we && w_addr[7:0] == 8'h01 && w_wdata[2];

  // ---- next state (triple redundant)
  always_comb begin
    st_n        = st;
    force_n     = force_q;
    c_start_all = 1'b0;
    if (l_hit && w_we && w_addr[7:0] == 8'h01) force_n = w_wdata[0];
    unique case (st)
      S_BOOT: begin
        if (force_emerg || force_q) begin
          st_n = S_EMERG;
        end else if (!c_busy) begin
          c_start_all = 1'b1;
          st_n        = S_CFG;
        end
      end
      S_CFG:   if (c_done) st_n = (c_fail == '0) ? S_SLEEP : S_EMERG;
      S_SLEEP: if (reconf_req) st_n = S_BOOT;
      S_EMERG: begin
        if (reconf_req)                   st_n = S_BOOT;
        else if (activate_req && !c_busy) st_n = S_SLEEP;
      end
      default: st_n = S_BOOT;
    endcase
  end
endmodule
