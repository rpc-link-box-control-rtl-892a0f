// Testbench of zero_count_pipe: zero counts of random and corner-case
// 27-bit words, with the tag, checked exactly two clocks after input.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_zero_count_pipe;
  logic clk = 0, rst = 1, vi = 0, vo;
  logic [26:0] d = 0;
  logic [4:0]  cnt;
  logic [7:0]  ti = 0, to;
  int checks = 0, failures = 0;
  logic [26:0] hist [$];

  zero_count_pipe #(.W(27), .CW(5), .TW(8)) dut (
    .clk(clk), .rst(rst), .valid_i(vi), .d(d), .tag_i(ti), .valid_o(vo), .count(cnt), .tag_o(to)
  );

  always #5 clk = ~clk;

  int sent = 0, got = 0;
  longint cyc = 0;
  longint t_in [$];
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst && vo) begin
    logic [26:0] w;
    longint t;
    w = hist.pop_front();
    t = t_in.pop_front();
    checks++;
    if (cnt != 5'(27 - $countones(w)) || to != 8'(got) || cyc - t != 2) begin
      failures++;
      $display("FAIL word %h count %0d tag %0d latency %0d", w, cnt, to, cyc - t);
    end
    got++;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 200; i++) begin
      logic [26:0] w;
      case (i)
        0: w = '0;
        1: w = '1;
        2: w = 27'h1;
        default: w = 27'($urandom);
      endcase
      vi = ($urandom % 4) != 0;
      d = w; ti = 8'(sent);
      if (vi) begin hist.push_back(w); t_in.push_back(cyc); sent++; end
      @(posedge clk); #1;
    end
    vi = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != sent) begin failures++; $display("FAIL got %0d of %0d", got, sent); end
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
