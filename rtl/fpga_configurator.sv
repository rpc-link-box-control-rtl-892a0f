// FPGA configurator: loads a set of SRAM FPGAs through Select Map.
//
// start_all configures targets 0..N_TGT-1 in turn, each from its own FLASH
// image (logical word t*2^IMG_STRIDE_LOG2, CFG_BYTES bytes, i.e.
// ceil(CFG_BYTES/10) protected groups) read and corrected by flash_reader.
// start_one configures only target one_tgt, from the FLASH or, with ext
// set, from the external byte stream (used when the FLASH is not valid).
// A target fails when its image holds an uncorrectable group, when INIT_B
// reports an error or when DONE does not rise; the other targets are still
// tried. At the end done pulses and ok_mask/fail_mask hold the results of
// the targets just handled. Loading FPGAs from the local FLASH, and from
// data sent over the CCU25 link in emergency, is the published behaviour;
// the image layout is this design's.
//
// With the consumer never stalling, one group needs 4*RD_CYC+1 clocks, so a
// FLASH image of CFG_BYTES bytes loads in about CFG_BYTES/10*(4*RD_CYC+1)
// clocks; an external stream can load one byte per clock.
module fpga_configurator #(
  parameter int unsigned AW              = 21,
  parameter int unsigned N_TGT           = 2,
  parameter int unsigned CFG_BYTES       = 234456,
  parameter int unsigned IMG_STRIDE_LOG2 = 17,
  parameter int unsigned RD_CYC          = 6,
  parameter int unsigned PROG_CYC        = 16,
  parameter int unsigned TIMEOUT         = 65536,
  localparam int unsigned TGW            = (N_TGT > 1) ? $clog2(N_TGT) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start_all,
  input  logic             start_one,
  input  logic [TGW-1:0]   one_tgt,
  input  logic             ext,
  input  logic             ext_valid,
  input  logic [7:0]       ext_data,
  output logic             ext_ready,
  output logic             busy,
  output logic             done,
  output logic [N_TGT-1:0] ok_mask,
  output logic [N_TGT-1:0] fail_mask,
  output logic             flash_err,
  // FLASH read port
  output logic [AW-1:0]    f_addr,
  output logic             f_oe,
  input  logic [31:0]      f_din,
  // Select Map
  output logic [N_TGT-1:0] sm_prog_b,
  output logic [N_TGT-1:0] sm_cs_b,
  output logic             sm_write_b,
  output logic [7:0]       sm_d,
  input  logic [N_TGT-1:0] sm_init_b,
  input  logic [N_TGT-1:0] sm_done
);
  localparam int unsigned N_GROUPS = (CFG_BYTES + 9) / 10;

  typedef enum logic [1:0] {C_IDLE, C_START, C_RUN} cstate_t;
  cstate_t        st;
  logic [TGW-1:0] tgt;
  logic           all, use_ext;
  logic           r_start, r_stop, r_busy, r_done, r_err, r_fatal;
  logic           s_start, s_busy, s_finish, s_ok;
  logic           rb_valid, rb_ready, sb_valid, sb_ready;
  logic [7:0]     rb_data, sb_data;
  logic [AW-1:0]  base;

  assign busy = (st != C_IDLE);
  assign base = AW'(tgt) << IMG_STRIDE_LOG2;

  // Byte source: FLASH or external stream.
  assign sb_valid  = use_ext ? ext_valid : rb_valid;
  assign sb_data   = use_ext ? ext_data  : rb_data;
  assign rb_ready  = !use_ext && sb_ready;
  assign ext_ready = use_ext && sb_ready;

  flash_reader #(.AW(AW), .RD_CYC(RD_CYC)) u_rd (
    .clk(clk), .rst(rst), .start(r_start), .stop(r_stop), .base(base),
    .n_groups(AW'(N_GROUPS)), .busy(r_busy), .done(r_done), .err_seen(r_err),
    .fatal_seen(r_fatal), .ob_valid(rb_valid), .ob_data(rb_data), .ob_ready(rb_ready),
    .f_addr(f_addr), .f_oe(f_oe), .f_din(f_din)
  );

  selectmap_cfg #(.N_TGT(N_TGT), .PROG_CYC(PROG_CYC), .TIMEOUT(TIMEOUT)) u_sm (
    .clk(clk), .rst(rst), .start(s_start), .target(tgt), .n_bytes(32'(CFG_BYTES)),
    .ib_valid(sb_valid), .ib_data(sb_data), .ib_ready(sb_ready), .busy(s_busy),
    .finish(s_finish), .ok(s_ok), .sm_prog_b(sm_prog_b), .sm_cs_b(sm_cs_b),
    .sm_write_b(sm_write_b), .sm_d(sm_d), .sm_init_b(sm_init_b), .sm_done(sm_done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= C_IDLE;
      tgt       <= '0;
      all       <= 1'b0;
      use_ext   <= 1'b0;
      r_start   <= 1'b0;
      r_stop    <= 1'b0;
      s_start   <= 1'b0;
      done      <= 1'b0;
      ok_mask   <= '0;
      fail_mask <= '0;
      flash_err <= 1'b0;
    end else begin
      r_start <= 1'b0;
      r_stop  <= 1'b0;
      s_start <= 1'b0;
      done    <= 1'b0;
      unique case (st)
        C_IDLE: begin
          if (start_all) begin
            all       <= 1'b1;
            use_ext   <= 1'b0;
            tgt       <= '0;
            ok_mask   <= '0;
            fail_mask <= '0;
            flash_err <= 1'b0;
            st        <= C_START;
          end else if (start_one) begin
            all       <= 1'b0;
            use_ext   <= ext;
            tgt       <= one_tgt;
            ok_mask   <= '0;
            fail_mask <= '0;
            flash_err <= 1'b0;
            st        <= C_START;
          end
        end
        C_START: begin
          s_start <= 1'b1;
          r_start <= !use_ext;
          st      <= C_RUN;
        end
        C_RUN: begin
          if (!use_ext && r_err) flash_err <= 1'b1;
          if (s_finish) begin
            r_stop <= 1'b1;
            if (s_ok && !(!use_ext && r_fatal)) ok_mask[tgt] <= 1'b1;
            else                                fail_mask[tgt] <= 1'b1;
            if (all && tgt != TGW'(N_TGT - 1)) begin
              tgt <= tgt + 1'b1;
              st  <= C_START;
            end else begin
              done <= 1'b1;
              st   <= C_IDLE;
            end
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
