// Data bus width converter: two 8-bit CCU25 accesses make one 16-bit
// Control Bus access.
//
// Bit 0 of the byte address selects the byte; the low byte (even address)
// comes first. A low-byte write is only stored; the high-byte write issues
// the 16-bit write of {high, low} at word address addr>>1. A low-byte read
// issues the 16-bit read, returns its low byte and keeps its high byte; the
// following high-byte read returns the kept byte without a bus access.
// Combining byte pairs is the published converter; the byte order is this
// design's choice.
//
// Both sides use the same handshake: the requester holds req and its
// fields until ack (a one-clock pulse, read data valid with it) is seen,
// and drops req on that clock edge. A word access is acknowledged on the
// byte side in the same clock as its w_ack; an access without a word
// cycle is acknowledged one clock after the request.
module ccu_width_conv #(
  parameter int unsigned AW = 17
) (
  input  logic          clk,
  input  logic          rst,
  // byte side
  input  logic          u_req,
  input  logic          u_we,
  input  logic [AW-1:0] u_addr,
  input  logic [7:0]    u_wdata,
  output logic          u_ack,
  output logic [7:0]    u_rdata,
  // word side
  output logic          w_req,
  output logic          w_we,
  output logic [AW-2:0] w_addr,
  output logic [15:0]   w_wdata,
  input  logic          w_ack,
  input  logic [15:0]   w_rdata
);
  logic [7:0] lo_w, hi_r, rdata_r;
  logic       ack_r, w_done;

  // A finished word access is acknowledged in the same clock, so that a
  // read result reaches the block converter without an extra register.
  assign w_done  = w_req && w_ack;
  assign u_ack   = ack_r || w_done;
  assign u_rdata = w_done ? w_rdata[7:0] : rdata_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_r   <= 1'b0;
      rdata_r <= '0;
      w_req   <= 1'b0;
      w_we    <= 1'b0;
      w_addr  <= '0;
      w_wdata <= '0;
      lo_w    <= '0;
      hi_r    <= '0;
    end else begin
      ack_r <= 1'b0;
      if (w_req) begin
        if (w_ack) begin
          w_req <= 1'b0;
          if (!w_we) hi_r <= w_rdata[15:8];
        end
      end else if (u_req && !ack_r) begin
        unique case ({u_we, u_addr[0]})
          2'b10: begin                       // low byte write: store
            lo_w  <= u_wdata;
            ack_r <= 1'b1;
          end
          2'b11: begin                       // high byte write: 16-bit write
            w_req   <= 1'b1;
            w_we    <= 1'b1;
            w_addr  <= u_addr[AW-1:1];
            w_wdata <= {u_wdata, lo_w};
          end
          2'b00: begin                       // low byte read: 16-bit read
            w_req  <= 1'b1;
            w_we   <= 1'b0;
            w_addr <= u_addr[AW-1:1];
          end
          default: begin                     // high byte read: kept byte
            rdata_r <= hi_r;
            ack_r   <= 1'b1;
          end
        endcase
      end
    end
  end
endmodule
