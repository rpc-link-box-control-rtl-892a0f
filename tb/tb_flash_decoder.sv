// Testbench of flash_decoder: random groups are encoded by the reference
// model, 0->1 flips are injected into none, one data word, the parity word
// or two words, and the data, err and fatal outputs and the 3-clock
// latency are checked. Groups are sent back to back and with gaps.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_flash_decoder;
  import rlbcs_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, sync = 0, iv = 0, ov, oerr, ofat;
  flash_word_t iw = '0;
  group_t og;
  int checks = 0, failures = 0;
  int cnt_clean = 0, cnt_fixed = 0, cnt_par = 0, cnt_fatal = 0;

  flash_decoder dut (.clk(clk), .rst(rst), .sync(sync), .in_valid(iv), .in_word(iw),
                     .out_valid(ov), .out_group(og), .out_err(oerr), .out_fatal(ofat));

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [80:0] bits; int kind; longint t; } exp_t;
  exp_t q [$];

  always @(posedge clk) if (!rst && ov) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (cyc - e.t != 3) begin failures++; $display("FAIL latency %0d", cyc - e.t); end
    checks++;
    case (e.kind)
      0: if (oerr || ofat || og.data != e.bits[79:0]) begin failures++; $display("FAIL clean"); end
      1: if (!oerr || ofat || og.data != e.bits[79:0]) begin failures++; $display("FAIL one data word"); end
      2: if (!oerr || ofat || og.data != e.bits[79:0]) begin failures++; $display("FAIL parity word"); end
      default: if (!oerr || !ofat) begin failures++; $display("FAIL two words"); end
    endcase
    checks++;
    if (e.kind < 3 && og.aux != e.bits[80]) begin failures++; $display("FAIL aux"); end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int g = 0; g < 400; g++) begin
      logic [80:0]  bits;
      logic [127:0] enc;
      logic [31:0]  m;
      int kind, w1, w2;
      for (int k = 0; k < 3; k++) bits[27*k +: 27] = 27'($urandom);
      enc  = ref_encode(bits);
      kind = $urandom % 4;
      w1   = $urandom % 3;
      w2   = 3;
      if (kind == 1) begin
        // flip 0 bits of data word w1 to 1 (payload or checksum)
        m = ~enc[32*w1 +: 32] & (32'h1 << ($urandom % 32));
        if (m == 0) m = ~enc[32*w1 +: 32] & ~(enc[32*w1 +: 32] - 1) & ~enc[32*w1 +: 32];
        if (m == 0) kind = 0;
        enc[32*w1 +: 32] |= m;
        if (m != 0) cnt_fixed++;
      end else if (kind == 2) begin
        m = ~enc[127:96] & (32'h20 << ($urandom % 27));
        if (m == 0) kind = 0; else cnt_par++;
        enc[127:96] |= m;
      end else if (kind == 3) begin
        w2 = (w1 + 1 + $urandom % 3) % 4;
        m = ~enc[32*w1 +: 32] & (32'h20 << ($urandom % 27));
        if (m == 0 || (~enc[32*w2 +: 32] & 32'h0000_001F) == 0) kind = 0;
        else begin
          enc[32*w1 +: 32] |= m;
          // make word w2 fail by raising a zero bit of its checksum
          for (int b = 0; b < 5; b++)
            if (!enc[32*w2 + b]) begin enc[32*w2 + b] = 1'b1; break; end
          cnt_fatal++;
        end
      end
      if (kind == 0) cnt_clean++;
      for (int k = 0; k < 4; k++) begin
        while (($urandom % 3) == 0) begin iv = 0; @(posedge clk); #1; end
        iv = 1; iw = flash_word_t'(enc[32*k +: 32]);
        if (k == 3) q.push_back('{bits, kind, cyc});
        @(posedge clk); #1;
      end
      iv = 0;
    end
    repeat (6) @(posedge clk);
    checks++;
    if (q.size() != 0 || cnt_clean == 0 || cnt_fixed == 0 || cnt_par == 0 || cnt_fatal == 0) begin
      failures++;
      $display("FAIL left %0d cases %0d %0d %0d %0d", q.size(), cnt_clean, cnt_fixed, cnt_par, cnt_fatal);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
