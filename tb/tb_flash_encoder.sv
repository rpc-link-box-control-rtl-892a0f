// Testbench of flash_encoder against the reference encoding of random and
// corner-case groups.
// The behaviour checked is the one described in the module's header, the
// published part and this design's choices alike; the stimulus and the
// reference values are this testbench's own, computed independently of
// the RTL.
module tb_flash_encoder;
  import rlbcs_pkg::*;
  import tb_ref_pkg::*;
  logic [79:0] data;
  logic        aux;
  flash_word_t [3:0] words;
  int checks = 0, failures = 0;

  flash_encoder dut (.data(data), .aux(aux), .words(words));

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [127:0] exp;
      case (i)
        0: {aux, data} = '0;
        1: {aux, data} = '1;
        default: begin
          for (int k = 0; k < 5; k++) data[16*k +: 16] = 16'($urandom);
          aux = 1'($urandom);
        end
      endcase
      #1;
      exp = ref_encode({aux, data});
      checks++;
      if (128'(words) != exp) begin
        failures++;
        $display("FAIL %h: %h expected %h", data, 128'(words), exp);
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
