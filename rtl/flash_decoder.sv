// Pipelined FLASH group decoder with single-word correction.
//
// The four words of a group enter one per in_valid, in the order 0,1,2,3
// (sync restarts the count at word 0). Each word's zero count is computed
// by zero_count_pipe and compared with the stored checksum. When word 3 has
// been checked, the group is output: if exactly one of the data words 0..2
// failed, its payload is rebuilt as the XOR of the other two payloads and
// the parity payload; a failing parity word alone leaves the data as read;
// two or more failing words make the group uncorrectable. err flags any
// checksum failure, so a caller can report corruption that was corrected.
// Checking by zero count follows the published code; the correction rule is
// this design's reading of "the parity word allows error correction".
//
// Timing: out_valid comes 3 clocks after word 3 is accepted; one word may be
// accepted every clock.
module flash_decoder
  import rlbcs_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sync,
  input  logic        in_valid,
  input  flash_word_t in_word,
  output logic        out_valid,
  output group_t      out_group,
  output logic        out_err,
  output logic        out_fatal
);
  localparam int unsigned TW = 2 + FLASH_DW;

  logic [1:0]      idx;
  logic            zc_valid;
  csum_t           zc_count;
  logic [TW-1:0]   zc_tag;
  flash_word_t     zc_word;
  logic [1:0]      zc_idx;

  always_ff @(posedge clk) begin
    if (rst || sync)   idx <= '0;
    else if (in_valid) idx <= idx + 2'd1;
  end

  zero_count_pipe #(.W(PAYLOAD_W), .CW(CSUM_W), .TW(TW)) u_zc (
    .clk(clk), .rst(rst || sync), .valid_i(in_valid), .d(in_word.payload),
    .tag_i({idx, in_word}), .valid_o(zc_valid), .count(zc_count), .tag_o(zc_tag)
  );

  assign {zc_idx, zc_word} = zc_tag;

  // Collected payloads and check results of the group being assembled.
  payload_t [2:0] pay;
  logic     [2:0] ok;

  payload_t       fix0, fix1, fix2;
  logic           bad_cnt_gt1;
  logic     [3:0] okv;

  always_comb begin
    okv  = {zc_count == zc_word.csum, ok};
    fix0 = pay[0];
    fix1 = pay[1];
    fix2 = pay[2];
    bad_cnt_gt1 = (4'(!okv[0]) + 4'(!okv[1]) + 4'(!okv[2]) + 4'(!okv[3])) > 4'd1;
    if (!bad_cnt_gt1) begin
      if (!okv[0]) fix0 = pay[1] ^ pay[2] ^ zc_word.payload;
      if (!okv[1]) fix1 = pay[0] ^ pay[2] ^ zc_word.payload;
      if (!okv[2]) fix2 = pay[0] ^ pay[1] ^ zc_word.payload;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || sync) begin
      out_valid <= 1'b0;
      out_err   <= 1'b0;
      out_fatal <= 1'b0;
      ok        <= '0;
      pay       <= '0;
      out_group <= '0;
    end else begin
      out_valid <= 1'b0;
      if (zc_valid) begin
        if (zc_idx != 2'd3) begin
          pay[zc_idx] <= zc_word.payload;
          ok[zc_idx]  <= (zc_count == zc_word.csum);
        end else begin
          out_valid <= 1'b1;
          out_group <= group_t'({fix2, fix1, fix0});
          out_err   <= !(&okv);
          out_fatal <= bad_cnt_gt1;
        end
      end
    end
  end
endmodule
