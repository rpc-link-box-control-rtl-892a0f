// Select Map (passive parallel) configuration master for Xilinx Spartan-IIE
// FPGAs.
//
// start configures target `target` with n_bytes bytes taken from the byte
// stream: PROG_B of that target is pulled low for PROG_CYC clocks, the
// master waits for INIT_B to rise, then writes one byte per clock (CS_B and
// WRITE_B low) as long as the stream has data, and finally waits for DONE.
// finish pulses at the end with ok high on success; a timeout waiting for
// INIT_B or DONE, or INIT_B falling during the load (CRC error), ends with
// ok low. The pin sequence follows the FPGA vendor's Select Map protocol;
// using Select Map at one byte per 40 MHz clock is the published choice.
//
// CCLK of the targets is the system clock, forwarded; the registered D,
// CS_B and WRITE_B change after a rising edge and are taken by the FPGA at
// the next one. The targets share D and WRITE_B.
module selectmap_cfg #(
  parameter int unsigned N_TGT    = 4,
  parameter int unsigned PROG_CYC = 16,
  parameter int unsigned TIMEOUT  = 65536,
  localparam int unsigned TGW     = (N_TGT > 1) ? $clog2(N_TGT) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [TGW-1:0]   target,
  input  logic [31:0]      n_bytes,
  input  logic             ib_valid,
  input  logic [7:0]       ib_data,
  output logic             ib_ready,
  output logic             busy,
  output logic             finish,
  output logic             ok,
  output logic [N_TGT-1:0] sm_prog_b,
  output logic [N_TGT-1:0] sm_cs_b,
  output logic             sm_write_b,
  output logic [7:0]       sm_d,
  input  logic [N_TGT-1:0] sm_init_b,
  input  logic [N_TGT-1:0] sm_done
);
  typedef enum logic [2:0] {S_IDLE, S_PROG, S_WINIT, S_LOAD, S_WDONE} state_t;
  state_t        st;
  logic [TGW-1:0] tg;
  logic [31:0]   cnt, nb;
  logic [31:0]   tmo;

  assign ib_ready = (st == S_LOAD) && (cnt != nb);
  assign busy     = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_IDLE;
      tg         <= '0;
      cnt        <= '0;
      nb         <= '0;
      tmo        <= '0;
      finish     <= 1'b0;
      ok         <= 1'b0;
      sm_prog_b  <= '1;
      sm_cs_b    <= '1;
      sm_write_b <= 1'b1;
      sm_d       <= '0;
    end else begin
      finish     <= 1'b0;
      sm_cs_b    <= '1;
      sm_write_b <= 1'b1;
      tmo        <= tmo + 1;
      unique case (st)
        S_IDLE: if (start) begin
          tg  <= target;
          nb  <= n_bytes;
          cnt <= '0;
          tmo <= '0;
          ok  <= 1'b0;
          sm_prog_b[target] <= 1'b0;
          st  <= S_PROG;
        end
        S_PROG: if (tmo == 32'(PROG_CYC - 1)) begin
          sm_prog_b[tg] <= 1'b1;
          tmo <= '0;
          st  <= S_WINIT;
        end
        S_WINIT: begin
          // INIT_B stays low while the FPGA clears its memory.
          if (tmo > 32'd2 && sm_init_b[tg]) begin
            tmo <= '0;
            st  <= S_LOAD;
          end else if (tmo == 32'(TIMEOUT)) begin
            finish <= 1'b1;
            st     <= S_IDLE;
          end
        end
        S_LOAD: begin
          if (!sm_init_b[tg]) begin
            finish <= 1'b1;
            st     <= S_IDLE;
          end else if (cnt == nb) begin
            tmo <= '0;
            st  <= S_WDONE;
          end else if (ib_valid) begin
            sm_d        <= ib_data;
            sm_cs_b[tg] <= 1'b0;
            sm_write_b  <= 1'b0;
            cnt         <= cnt + 1;
          end
        end
        S_WDONE: begin
          if (sm_done[tg]) begin
            ok     <= 1'b1;
            finish <= 1'b1;
            st     <= S_IDLE;
          end else if (tmo == 32'(TIMEOUT) || !sm_init_b[tg]) begin
            finish <= 1'b1;
            st     <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
