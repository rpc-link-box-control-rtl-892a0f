// Testbench of the FLASH address scattering function scatter_addr of the
// shared package: low four bits reversed, upper bits kept, the map is a
// permutation of each block of 16 words and its own inverse.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_flash_addr_scatter;
  import tb_ref_pkg::*;
  import rlbcs_pkg::*;
  logic [20:0] la, pa;
  int checks = 0, failures = 0;

  assign pa = 21'(scatter_addr(32'(la)));

  initial begin
    bit seen [16];
    for (int i = 0; i < 16; i++) begin
      la = 21'(i); #1;
      checks++;
      if (int'(pa) != ref_scatter(i)) begin failures++; $display("FAIL %0d -> %0d", i, pa); end
      seen[pa[3:0]] = 1;
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (!seen[i]) begin failures++; $display("FAIL %0d never reached", i); end
    end
    for (int i = 0; i < 200; i++) begin
      la = 21'($urandom); #1;
      checks++;
      if (int'(pa) != ref_scatter(int'(la)) || pa[20:4] != la[20:4] ||
          21'(scatter_addr(32'(pa))) != la) begin
        failures++; $display("FAIL %h -> %h", la, pa);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
