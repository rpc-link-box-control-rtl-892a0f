// Testbench of tmr_ff: the output follows D one clock later, survives the
// loss of any single copy (forced here through that copy's own reset) and
// follows the majority when two copies are lost.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_tmr_ff;
  logic clk = 0, d = 0, q;
  logic [2:0] r = 3'b111;
  int checks = 0, failures = 0;

  tmr_ff dut (.clk(clk), .r(r), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic chk(logic exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 r = 3'b000;
    #1 chk(1'b0, "after reset");
    for (int i = 0; i < 40; i++) begin
      logic v;
      v = 1'($urandom);
      d = v;
      @(posedge clk); #1;
      chk(v, "follow d");
    end
    for (int k = 0; k < 3; k++) begin
      // all copies 1, then copy k lost: q stays 1
      d = 1; @(posedge clk); #1;
      r = 3'b001 << k; @(posedge clk); #1;
      chk(1'b1, "one copy reset");
      // two copies lost: majority is 0
      r = 3'b111 ^ (3'b001 << k); @(posedge clk); #1;
      chk(1'b0, "two copies reset");
      r = 3'b000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
