// FLASH memory controller for block writes and sector erase.
//
// Software writes 16-bit data words into a block buffer and then gives one
// command; the controller does the slow, word-by-word work with the FLASH
// chip's own command interface, so the Control Bus carries only the data.
// Every five buffered words are encoded (flash_encoder) into one protected
// group of four 32-bit FLASH words, which are programmed at scattered
// addresses (scatter_addr) starting at logical word 4*group. The
// group index advances after each group, so long images are written block
// after block. Having such a controller is the published design; the
// buffer size, registers and FLASH command set are this design's.
//
// Registers (reg_addr bits 1:0, one-clock reg_we/reg_re pulses):
//   0  GROUP_LO  r/w  group index bits 15:0
//   1  GROUP_HI  r/w  group index bits AW-3:16
//   2  DATA      w    append a word to the buffer (ignored when full)
//                r    number of buffered words
//   3  CMD       w    1: program the buffered whole groups, 2: erase the
//                     sector holding the current group, 3: clear buffer
//                r    status {busy, error, 14'b0}
// FLASH commands are the common NOR set on both 16-bit halves: program is
// 555h/AA, 2AAh/55, 555h/A0, then address/data; sector erase is 555h/AA,
// 2AAh/55, 555h/80, 555h/AA, 2AAh/55, sector/30. After the last cycle the
// controller waits for the ready line f_rdy; error is set if it stays low
// for TIMEOUT clocks. A write cycle holds f_we_n low for WE_CYC clocks.
module flash_writer
  import rlbcs_pkg::*;
#(
  parameter int unsigned AW         = 21,
  parameter int unsigned BUF_GROUPS = 16,
  parameter int unsigned WE_CYC     = 3,
  parameter int unsigned TIMEOUT    = 1 << 22
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          reg_we,
  input  logic [1:0]    reg_addr,
  input  logic [15:0]   reg_wdata,
  output logic [15:0]   reg_rdata,
  output logic          busy,
  output logic          error,
  // FLASH write port
  output logic [AW-1:0] f_addr,
  output logic          f_we_n,
  output logic [31:0]   f_wdata,
  input  logic          f_rdy
);
  localparam int unsigned NW  = BUF_GROUPS * 5;
  localparam int unsigned BW  = $clog2(NW + 1);

  typedef enum logic [2:0] {W_IDLE, W_LOAD, W_CMD, W_WAIT, W_NEXT} wstate_t;

  wstate_t          st;
  logic [15:0]      buf_mem [NW];
  logic [BW-1:0]    fill, rd_ptr;
  logic [AW-3:0]    group;
  logic [2:0]       lcnt;
  logic [79:0]      gdata;
  flash_word_t [3:0] enc;
  logic [1:0]       widx;        // word of the group being programmed
  logic [2:0]       step;        // command cycle number
  logic             erase;
  logic [7:0]       wcnt;
  logic [31:0]      tmo;
  logic [AW-1:0]    logical, physical;

  flash_encoder u_enc (.data(gdata), .aux(1'b0), .words(enc));
  assign logical = {group, widx};
  assign physical = AW'(scatter_addr(32'(logical)));

  assign busy = (st != W_IDLE);

  always_comb begin
    unique case (reg_addr)
      2'd0:    reg_rdata = group[15:0];
      2'd1:    reg_rdata = 16'(group >> 16);
      2'd2:    reg_rdata = 16'(fill);
      default: reg_rdata = {busy, error, 14'b0};
    endcase
  end

  // Address and data of command cycle `s`; the last cycle carries the
  // payload (program) or the sector address (erase).
  function automatic logic [AW+31:0] cmd_cycle(logic er, logic [2:0] s,
                                              logic [AW-1:0] a, logic [31:0] d);
    logic [AW-1:0] ca;
    logic [15:0]   cd;
    unique case (s)
      3'd0, 3'd3: begin ca = AW'(12'h555); cd = 16'h00AA; end
      3'd1, 3'd4: begin ca = AW'(12'h2AA); cd = 16'h0055; end
      default:    begin ca = AW'(12'h555); cd = er ? 16'h0080 : 16'h00A0; end
    endcase
    if (!er && s == 3'd3) return {a, d};
    if (er && s == 3'd5)  return {a, 32'h0030_0030};
    return {ca, cd, cd};
  endfunction

  logic [2:0] last_step;
  assign last_step = erase ? 3'd5 : 3'd3;

  always_ff @(posedge clk) begin
    if (reg_we && reg_addr == 2'd2 && st == W_IDLE && fill != BW'(NW))
      buf_mem[fill[BW-1:0]] <= reg_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st      <= W_IDLE;
      fill    <= '0;
      rd_ptr  <= '0;
      group   <= '0;
      lcnt    <= '0;
      gdata   <= '0;
      widx    <= '0;
      step    <= '0;
      erase   <= 1'b0;
      wcnt    <= '0;
      tmo     <= '0;
      error   <= 1'b0;
      f_addr  <= '0;
      f_we_n  <= 1'b1;
      f_wdata <= '0;
    end else begin
      unique case (st)
        W_IDLE: if (reg_we) begin
          unique case (reg_addr)
            2'd0: group[15:0] <= reg_wdata;
            2'd1: group       <= {(AW-2-16)'(reg_wdata), group[15:0]};
            2'd2: if (fill != BW'(NW)) fill <= fill + 1'b1;
            default: begin
              if (reg_wdata[1:0] == 2'd1 && fill >= BW'(5)) begin
                error  <= 1'b0;
                erase  <= 1'b0;
                rd_ptr <= '0;
                lcnt   <= '0;
                st     <= W_LOAD;
              end else if (reg_wdata[1:0] == 2'd2) begin
                error <= 1'b0;
                erase <= 1'b1;
                widx  <= '0;
                step  <= '0;
                wcnt  <= '0;
                st    <= W_CMD;
              end else if (reg_wdata[1:0] == 2'd3) begin
                fill <= '0;
              end
            end
          endcase
        end
        // Read five buffered words into the group register.
        W_LOAD: begin
          gdata  <= {buf_mem[rd_ptr], gdata[79:16]};
          rd_ptr <= rd_ptr + 1'b1;
          lcnt   <= lcnt + 3'd1;
          if (lcnt == 3'd4) begin
            widx <= '0;
            step <= '0;
            wcnt <= '0;
            st   <= W_CMD;
          end
        end
        // One FLASH write cycle: WE_CYC clocks low, one clock high.
        W_CMD: begin
          {f_addr, f_wdata} <= cmd_cycle(erase, step, physical, enc[widx]);
          wcnt <= wcnt + 8'd1;
          if (wcnt == 8'd0) f_we_n <= 1'b0;
          if (wcnt == 8'(WE_CYC)) f_we_n <= 1'b1;
          if (wcnt == 8'(WE_CYC + 1)) begin
            wcnt <= '0;
            if (step == last_step) begin
              tmo <= '0;
              st  <= W_WAIT;
            end else begin
              step <= step + 3'd1;
            end
          end
        end
        // Wait for the FLASH to finish (ready line low while busy).
        W_WAIT: begin
          tmo <= tmo + 1;
          if (tmo > 32'd4 && f_rdy) begin
            st <= W_NEXT;
          end else if (tmo == 32'(TIMEOUT)) begin
            error <= 1'b1;
            fill  <= '0;
            st    <= W_IDLE;
          end
        end
        W_NEXT: begin
          step <= '0;
          if (erase) begin
            st <= W_IDLE;
          end else if (widx != 2'd3) begin
            widx <= widx + 2'd1;
            st   <= W_CMD;
          end else begin
            group <= group + 1'b1;
            if (rd_ptr + BW'(5) <= fill) begin
              lcnt <= '0;
              st   <= W_LOAD;
            end else begin
              fill <= '0;
              st   <= W_IDLE;
            end
          end
        end
        default: st <= W_IDLE;
      endcase
    end
  end
endmodule
