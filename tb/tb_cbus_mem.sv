// Behavioural Control Bus slave for the testbenches: a 16-bit memory that
// answers every address whose bits 15:12 equal SEL. Reads drive the data
// while RD_N is low; writes are taken when WR_N rises.
// A stand-in for a Control Bus slave; its behaviour is this design's.
module tb_cbus_mem #(
  parameter logic [3:0] SEL = 4'h2
) (
  input  logic [15:0] cb_addr,
  input  logic [15:0] cb_wdata,
  input  logic        cb_wr_n,
  input  logic        cb_rd_n,
  output logic [15:0] cb_rdata
);
  logic [15:0] mem [int];
  int writes = 0, reads = 0;

  assign cb_rdata = (!cb_rd_n && cb_addr[15:12] == SEL)
                  ? (mem.exists(int'(cb_addr)) ? mem[int'(cb_addr)] : 16'hA5A5) : 16'h0000;

  always @(posedge cb_wr_n) if (cb_addr[15:12] == SEL) begin
    mem[int'(cb_addr)] = cb_wdata;
    writes++;
  end
  always @(negedge cb_rd_n) if (cb_addr[15:12] == SEL) reads++;
endmodule
