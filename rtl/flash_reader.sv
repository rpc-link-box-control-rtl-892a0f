// FLASH image reader: fetches protected groups, decodes them and streams
// the recovered bytes.
//
// start loads the logical base word address and the number of groups and
// begins reading; stop abandons the transfer. Each group is four FLASH
// reads at scattered physical addresses (scatter_addr), RD_CYC clocks
// each; the words go through flash_decoder and the 10 data bytes of each
// group leave on the byte stream (ob_valid/ob_ready), low byte first. Two
// group buffers let the next group be read while the current one is sent,
// so the FLASH runs back to back whenever the consumer keeps up: about
// 4*RD_CYC+1 clocks per 10 bytes. err_seen is set when any word failed its
// checksum (corrected or not) and fatal_seen when a group was
// uncorrectable; both are cleared by start. Reading the configuration from
// the on-board FLASH through the protection code is the published scheme;
// the buffering, read timing and stream handshake are this design's.
//
// FLASH port: f_oe high with f_addr stable for RD_CYC clocks; f_din is
// sampled in the last of them.
module flash_reader
  import rlbcs_pkg::*;
#(
  parameter int unsigned AW     = 21,
  parameter int unsigned RD_CYC = 6
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          stop,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] n_groups,
  output logic          busy,
  output logic          done,
  output logic          err_seen,
  output logic          fatal_seen,
  output logic          ob_valid,
  output logic [7:0]    ob_data,
  input  logic          ob_ready,
  output logic [AW-1:0] f_addr,
  output logic          f_oe,
  input  logic [31:0]   f_din
);
  localparam int unsigned CCW = $clog2(RD_CYC + 1);

  logic          fetching;
  logic [1:0]    widx;
  logic [CCW-1:0] cyc;
  logic [AW-1:0] laddr;
  logic [AW-1:0] grp_left;
  logic [1:0]    resv;          // groups fetched or in flight, not yet sent

  logic          sample;
  logic          dec_valid, dec_err, dec_fatal;
  group_t        dec_group;

  logic          hold_full, emit_full;
  logic [79:0]   hold_data, emit_data;
  logic [3:0]    bidx;
  logic          emit_last;

  assign sample    = fetching && (cyc == CCW'(RD_CYC - 1));
  assign f_oe      = fetching;
  assign ob_valid  = emit_full;
  assign ob_data   = emit_data[8*bidx +: 8];
  assign emit_last = emit_full && ob_ready && (bidx == 4'(GROUP_BYTES - 1));

  assign f_addr = AW'(scatter_addr(32'(laddr)));

  flash_decoder u_dec (
    .clk(clk), .rst(rst), .sync(start || stop), .in_valid(sample),
    .in_word(flash_word_t'(f_din)), .out_valid(dec_valid), .out_group(dec_group),
    .out_err(dec_err), .out_fatal(dec_fatal)
  );

  always_ff @(posedge clk) begin
    if (rst || stop) begin
      fetching  <= 1'b0;
      widx      <= '0;
      cyc       <= '0;
      grp_left  <= '0;
      resv      <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      hold_full <= 1'b0;
      emit_full <= 1'b0;
      bidx      <= '0;
      if (rst) begin
        laddr      <= '0;
        err_seen   <= 1'b0;
        fatal_seen <= 1'b0;
        hold_data  <= '0;
        emit_data  <= '0;
      end
    end else if (start) begin
      fetching   <= 1'b0;
      widx       <= '0;
      cyc        <= '0;
      laddr      <= base;
      grp_left   <= n_groups;
      resv       <= '0;
      busy       <= 1'b1;
      done       <= 1'b0;
      hold_full  <= 1'b0;
      emit_full  <= 1'b0;
      bidx       <= '0;
      err_seen   <= 1'b0;
      fatal_seen <= 1'b0;
    end else begin : b_run
      logic [1:0] resv_n;
      done <= 1'b0;
      resv_n = resv;

      // FLASH read sequencing
      if (!fetching) begin
        if (busy && grp_left != '0 && resv < 2'd2) begin
          fetching <= 1'b1;
          cyc      <= '0;
          widx     <= '0;
          grp_left <= grp_left - 1'b1;
          resv_n   = resv_n + 2'd1;
        end
      end else if (sample) begin
        cyc   <= '0;
        laddr <= laddr + 1'b1;
        widx  <= widx + 2'd1;
        if (widx == 2'd3) fetching <= 1'b0;
      end else begin
        cyc <= cyc + 1'b1;
      end

      // Byte output
      if (emit_full && ob_ready) begin
        bidx <= bidx + 4'd1;
        if (emit_last) begin
          bidx      <= '0;
          emit_full <= 1'b0;
          resv_n    = resv_n - 2'd1;
        end
      end

      // Decoded groups into the two buffers
      if (dec_valid) begin
        if (dec_err)   err_seen   <= 1'b1;
        if (dec_fatal) fatal_seen <= 1'b1;
      end
      if (!emit_full || emit_last) begin
        if (hold_full) begin
          emit_data <= hold_data;
          emit_full <= 1'b1;
          hold_full <= dec_valid;
          if (dec_valid) hold_data <= dec_group.data;
        end else if (dec_valid) begin
          emit_data <= dec_group.data;
          emit_full <= 1'b1;
        end
      end else if (dec_valid) begin
        hold_data <= dec_group.data;
        hold_full <= 1'b1;
      end

      resv <= resv_n;
      if (busy && grp_left == '0 && !fetching && resv_n == '0) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
