// Control Bus slave interface of a board controller.
//
// The asynchronous strobes are synchronised with two flip-flops. A board is
// selected when (cb_addr & MASK) == BASE. On the falling edge of a selected
// write strobe a one-clock reg_we pulse carries the address and data; on a selected read strobe a reg_re pulse
// is given and reg_rdata is driven on cb_rdata for as long as the strobe
// stays low. cb_rdata is zero otherwise, so the read data of several
// slaves can be ORed into one bus. The Control Bus is named in the
// published design; its address decoding is this design's choice.
//
// Timing: reg_we/reg_re come 3 clocks after the strobe falls; read data
// reaches cb_rdata 2 clocks after the strobe falls (the register value is
// selected by the address, which is stable from the setup time on).
// reg_addr carries the whole bus address; users decode the offset bits.
module cbus_slave #(
  parameter logic [15:0] BASE = 16'h1000,
  parameter logic [15:0] MASK = 16'hF000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] cb_addr,
  input  logic [15:0] cb_wdata,
  input  logic        cb_wr_n,
  input  logic        cb_rd_n,
  output logic [15:0] cb_rdata,
  output logic        reg_we,
  output logic        reg_re,
  output logic [15:0] reg_addr,
  output logic [15:0] reg_wdata,
  input  logic [15:0] reg_rdata
);
  logic [2:0] wr_s, rd_s;
  logic       sel, rd_act;

  assign sel      = (reg_addr & MASK) == BASE;
  assign rd_act   = !rd_s[1];
  assign cb_rdata = (rd_act && sel) ? reg_rdata : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_s      <= '1;
      rd_s      <= '1;
      reg_addr  <= '0;
      reg_wdata <= '0;
      reg_we    <= 1'b0;
      reg_re    <= 1'b0;
    end else begin
      wr_s      <= {wr_s[1:0], cb_wr_n};
      rd_s      <= {rd_s[1:0], cb_rd_n};
      reg_addr  <= cb_addr;
      reg_wdata <= cb_wdata;
      reg_we    <= sel && !wr_s[1] && wr_s[2];
      reg_re    <= sel && !rd_s[1] && rd_s[2];
    end
  end
endmodule
