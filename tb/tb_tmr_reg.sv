// Testbench of tmr_reg: load and hold, tolerance of one lost copy, and the
// repair of a lost copy on the next clock (a second copy lost later must
// then still be outvoted).
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_tmr_reg;
  logic clk = 0, en = 0;
  logic [2:0] r = 3'b111;
  logic [7:0] d = 0, q;
  int checks = 0, failures = 0;

  tmr_reg #(.W(8), .RESET_VAL(8'h00)) dut (.clk(clk), .r(r), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic chk(logic [7:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    logic [7:0] v;
    repeat (2) @(posedge clk);
    #1 r = 3'b000;
    chk(8'h00, "reset");
    for (int i = 0; i < 20; i++) begin
      v = 8'($urandom) | 8'h01;
      d = v; en = 1; @(posedge clk); #1;
      en = 0; d = ~v; @(posedge clk); #1;
      chk(v, "hold");
      // lose copy 0, then copy 1 a clock later, then copy 2
      r = 3'b001; @(posedge clk); #1; r = 3'b000;
      chk(v, "copy 0 lost");
      @(posedge clk); #1;
      r = 3'b010; @(posedge clk); #1; r = 3'b000;
      chk(v, "copy 1 lost after repair of copy 0");
      @(posedge clk); #1;
      r = 3'b100; @(posedge clk); #1; r = 3'b000;
      chk(v, "copy 2 lost after repair of copy 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
