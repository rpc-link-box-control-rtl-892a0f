// Block mode access converter for the CCU25 8-bit memory bus.
//
// In block mode the CCU25 read and write strobes last only 50 ns (two
// 40 MHz clocks) inside a 250 ns access cycle, too short for the Control
// Bus. The strobes are synchronised and their falling edges detected; the
// address and data seen while the strobe was low are captured.
//  * Write: address and data are stored and handed downstream as a posted
//    request, which then runs a full-length Control Bus cycle.
//  * Read: the byte bus always shows the result of the previous read, so
//    the data is there at once; the captured address starts a slow read
//    downstream whose result is kept for the next read. In a block
//    transfer the data therefore arrive one read late and the first read
//    returns a dummy byte (0 after reset). In single mode the strobe is long
//    enough for the new byte to arrive before it ends.
// The behaviour is the published converter; synchronisation, the
// downstream handshake and the overrun flag are this design's.
//
// Downstream handshake: d_req and the d_* fields are held until d_ack is
// seen; d_ack is a one-clock pulse, with d_rdata valid for reads. A strobe
// that arrives while a request is still pending sets the sticky overrun
// flag and is dropped.
module ccu_block_conv #(
  parameter int unsigned AW = 17
) (
  input  logic          clk,
  input  logic          rst,
  // CCU25 memory bus (asynchronous, active-low strobes)
  input  logic [AW-1:0] ccu_addr,
  input  logic [7:0]    ccu_wdata,
  input  logic          ccu_wr_n,
  input  logic          ccu_rd_n,
  output logic [7:0]    ccu_rdata,
  // downstream byte request
  output logic          d_req,
  output logic          d_we,
  output logic [AW-1:0] d_addr,
  output logic [7:0]    d_wdata,
  input  logic          d_ack,
  input  logic [7:0]    d_rdata,
  output logic          overrun
);
  logic [2:0]    wr_s, rd_s;
  logic [AW-1:0] a1, a2;
  logic [7:0]    w1, w2;
  logic          wr_ev, rd_ev;
  logic [7:0]    rd_hold;

  assign wr_ev     = !wr_s[1] && wr_s[2];
  assign rd_ev     = !rd_s[1] && rd_s[2];
  assign ccu_rdata = rd_hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_s    <= '1;
      rd_s    <= '1;
      a1      <= '0;
      a2      <= '0;
      w1      <= '0;
      w2      <= '0;
      d_req   <= 1'b0;
      d_we    <= 1'b0;
      d_addr  <= '0;
      d_wdata <= '0;
      rd_hold <= '0;
      overrun <= 1'b0;
    end else begin
      wr_s <= {wr_s[1:0], ccu_wr_n};
      rd_s <= {rd_s[1:0], ccu_rd_n};
      a1   <= ccu_addr;
      w1   <= ccu_wdata;
      a2   <= a1;
      w2   <= w1;
      if (d_req && d_ack) begin
        d_req <= 1'b0;
        if (!d_we) rd_hold <= d_rdata;
      end
      if (wr_ev || rd_ev) begin
        if (d_req && !d_ack) begin
          overrun <= 1'b1;
        end else begin
          d_req   <= 1'b1;
          d_we    <= wr_ev;
          d_addr  <= a2;
          d_wdata <= w2;
        end
      end
    end
  end

  // The two strobes of the CCU25 bus are never active together.
  a_one_strobe: assert property (@(posedge clk) disable iff (rst) !(wr_ev && rd_ev));
endmodule
