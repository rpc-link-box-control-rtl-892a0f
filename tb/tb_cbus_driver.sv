// Behavioural Control Bus master for the testbenches: one clock of address
// setup, a four-clock strobe, one clock of hold; read data is taken in the
// last strobe clock.
// The Control Bus timing modelled here is this design's choice; the
// published bus is only described as asynchronous with 16-bit address and data.
module tb_cbus_driver (
  input  logic        clk,
  output logic [15:0] cb_addr,
  output logic [15:0] cb_wdata,
  output logic        cb_wr_n,
  output logic        cb_rd_n,
  input  logic [15:0] cb_rdata
);
  initial begin
    cb_addr  = '0;
    cb_wdata = '0;
    cb_wr_n  = 1'b1;
    cb_rd_n  = 1'b1;
  end

  task automatic write(logic [15:0] a, logic [15:0] d);
    @(posedge clk); #1 cb_addr = a; cb_wdata = d;
    @(posedge clk); #1 cb_wr_n = 1'b0;
    repeat (4) @(posedge clk);
    #1 cb_wr_n = 1'b1;
    repeat (2) @(posedge clk);
  endtask

  task automatic read(logic [15:0] a, output logic [15:0] d);
    @(posedge clk); #1 cb_addr = a;
    @(posedge clk); #1 cb_rd_n = 1'b0;
    repeat (4) @(posedge clk);
    d = cb_rdata;
    #1 cb_rd_n = 1'b1;
    repeat (2) @(posedge clk);
  endtask
endmodule
