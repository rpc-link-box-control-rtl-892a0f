// Behavioural model of a Spartan-IIE FPGA being loaded in Select Map mode.
//
// PROG_B low clears it; INIT_B rises INIT_DLY clocks after PROG_B rises.
// Each rising clock edge with CS_B and WRITE_B low takes one byte, which is
// compared with the expected test image (seed SEED, NBYTES bytes). After
// the last byte DONE rises if every byte matched; otherwise INIT_B falls,
// as a real device reports a CRC error. first/last record the clock
// numbers of the first and last byte for rate checks.
// The Select Map pin behaviour follows the Spartan-IIE device family; the
// pseudo-random test images and the bookkeeping are this design's.
module tb_fpga_model
  import tb_ref_pkg::*;
#(
  parameter int SEED     = 1,
  parameter int NBYTES   = 100,
  parameter int INIT_DLY = 6
) (
  input  logic       clk,
  input  logic       prog_b,
  input  logic       cs_b,
  input  logic       write_b,
  input  logic [7:0] d,
  output logic       init_b,
  output logic       done
);
  int   cnt = 0;
  int   idly = 0;
  bit   bad = 0;
  bit   cleared = 0;
  int   loads = 0;       // successful loads
  longint cyc = 0, first = 0, last = 0;

  initial begin
    init_b = 1'b1;
    done   = 1'b0;
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!prog_b) begin
      cnt     <= 0;
      bad     <= 0;
      init_b  <= 1'b0;
      done    <= 1'b0;
      cleared <= 1;
      idly    <= 0;
    end else if (cleared && !init_b && cnt == 0 && !bad) begin
      idly <= idly + 1;
      if (idly == INIT_DLY) init_b <= 1'b1;
    end else if (!cs_b && !write_b && !done) begin
      if (cnt == 0) first <= cyc;
      last <= cyc;
      if (cnt < NBYTES && d != img_byte(SEED, cnt)) bad <= 1;
      cnt <= cnt + 1;
    end
    if (init_b && cnt == NBYTES && !done && !(!cs_b && !write_b)) begin
      if (bad) init_b <= 1'b0;
      else begin
        done  <= 1'b1;
        loads <= loads + 1;
      end
    end
  end
endmodule
