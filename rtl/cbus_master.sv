// Control Bus master.
//
// Runs one asynchronous 16-bit Control Bus cycle per word request: the
// address (and, for a write, the data) is driven SETUP_CYC clocks before
// the active-low strobe, the strobe lasts STROBE_CYC clocks, and address
// and data are held HOLD_CYC clocks after it. Read data is sampled in the
// last strobe clock and acknowledged at once, while the hold time runs;
// this keeps a whole read, from a CCU25 block-mode strobe to the data
// being ready for the next strobe, inside one 250 ns CCU25 access cycle.
// The strobe (100 ns) is twice the CCU25 block-mode strobe; the exact
// cycle timing is this design's choice.
//
// Request side: req and its fields held until ack (one-clock pulse, rdata
// valid with it); the requester drops req on the clock edge at which it
// sees ack. The ack comes SETUP_CYC+STROBE_CYC+1 clocks after req is
// taken; the next request is taken HOLD_CYC+1 clocks after the ack.
module cbus_master #(
  parameter int unsigned SETUP_CYC  = 1,
  parameter int unsigned STROBE_CYC = 4,
  parameter int unsigned HOLD_CYC   = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  logic        we,
  input  logic [15:0] addr,
  input  logic [15:0] wdata,
  output logic        ack,
  output logic [15:0] rdata,
  // Control Bus
  output logic [15:0] cb_addr,
  output logic [15:0] cb_wdata,
  output logic        cb_oe,
  output logic        cb_wr_n,
  output logic        cb_rd_n,
  input  logic [15:0] cb_rdata
);
  typedef enum logic [1:0] {M_IDLE, M_SETUP, M_STROBE, M_HOLD} mstate_t;
  mstate_t    st;
  logic [7:0] cnt;
  logic       is_wr;

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= M_IDLE;
      cnt      <= '0;
      is_wr    <= 1'b0;
      ack      <= 1'b0;
      rdata    <= '0;
      cb_addr  <= '0;
      cb_wdata <= '0;
      cb_oe    <= 1'b0;
      cb_wr_n  <= 1'b1;
      cb_rd_n  <= 1'b1;
    end else begin
      ack <= 1'b0;
      cnt <= cnt + 8'd1;
      unique case (st)
        M_IDLE: if (req) begin
          cb_addr  <= addr;
          cb_wdata <= wdata;
          cb_oe    <= we;
          is_wr    <= we;
          cnt      <= 8'd1;
          st       <= M_SETUP;
        end
        M_SETUP: if (cnt >= 8'(SETUP_CYC)) begin
          cb_wr_n <= !is_wr;
          cb_rd_n <= is_wr;
          cnt     <= 8'd1;
          st      <= M_STROBE;
        end
        M_STROBE: if (cnt >= 8'(STROBE_CYC)) begin
          if (!is_wr) rdata <= cb_rdata;
          ack     <= 1'b1;
          cb_wr_n <= 1'b1;
          cb_rd_n <= 1'b1;
          cnt     <= 8'd1;
          st      <= M_HOLD;
        end
        M_HOLD: if (cnt >= 8'(HOLD_CYC)) begin
          cb_oe <= 1'b0;
          st    <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
