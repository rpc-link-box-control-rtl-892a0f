// Background checker of the stored FLASH images.
//
// While enabled, reads the N_IMG images (image i starts at logical word
// i*2^IMG_STRIDE_LOG2 and holds N_GROUPS groups) over and over through a
// flash_reader whose byte output is discarded. Any word that fails its
// zero-count checksum sets the sticky corrupt flag, even when the parity
// word could still correct it, so that the FLASH is refreshed before the
// damage becomes uncorrectable; fatal is set when a group could not be
// corrected. clear resets both flags. pause (the FLASH is wanted by another
// user) abandons the current image; it is read again from its start when
// pause falls. scans counts completed passes over all images. The
// background check is the published behaviour; scan order and pausing are
// this design's.
//
// FLASH port as in flash_reader; idle is high while the checker does not
// use the port.
module bg_checker #(
  parameter int unsigned AW              = 21,
  parameter int unsigned N_IMG           = 1,
  parameter int unsigned IMG_STRIDE_LOG2 = 17,
  parameter int unsigned N_GROUPS        = 23446,
  parameter int unsigned RD_CYC          = 6
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  input  logic          pause,
  input  logic          clear,
  output logic          corrupt,
  output logic          fatal,
  output logic [15:0]   scans,
  output logic          idle,
  output logic [AW-1:0] f_addr,
  output logic          f_oe,
  input  logic [31:0]   f_din
);
  localparam int unsigned IW = (N_IMG > 1) ? $clog2(N_IMG) : 1;

  logic          run, start, stop, r_busy, r_done, r_err, r_fatal;
  logic [IW-1:0] img;
  logic          ob_valid;
  logic [7:0]    ob_data;
  logic [AW-1:0] base;

  assign base = AW'(img) << IMG_STRIDE_LOG2;
  assign idle = !r_busy;
  assign stop = r_busy && (pause || !enable);

  flash_reader #(.AW(AW), .RD_CYC(RD_CYC)) u_rd (
    .clk(clk), .rst(rst), .start(start), .stop(stop), .base(base),
    .n_groups(AW'(N_GROUPS)), .busy(r_busy), .done(r_done), .err_seen(r_err),
    .fatal_seen(r_fatal), .ob_valid(ob_valid), .ob_data(ob_data), .ob_ready(1'b1),
    .f_addr(f_addr), .f_oe(f_oe), .f_din(f_din)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      run     <= 1'b0;
      start   <= 1'b0;
      img     <= '0;
      corrupt <= 1'b0;
      fatal   <= 1'b0;
      scans   <= '0;
    end else begin
      start <= 1'b0;
      if (clear) begin
        corrupt <= 1'b0;
        fatal   <= 1'b0;
      end
      if (r_busy && r_err)   corrupt <= 1'b1;
      if (r_busy && r_fatal) fatal   <= 1'b1;
      if (r_done) begin
        if (r_err)   corrupt <= 1'b1;
        if (r_fatal) fatal   <= 1'b1;
        run <= 1'b0;
        if (img == IW'(N_IMG - 1)) begin
          img   <= '0;
          scans <= scans + 16'd1;
        end else begin
          img <= img + 1'b1;
        end
      end else if (stop) begin
        run <= 1'b0;
      end else if (enable && !pause && !run && !r_busy && !start) begin
        run   <= 1'b1;
        start <= 1'b1;
      end
    end
  end
endmodule
