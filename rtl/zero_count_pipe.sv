// Pipelined zero counter for one FLASH payload.
//
// Counting the zeros of a 27-bit word does not fit one 25 ns clock in the
// target FPGAs, so the count is split in two stages: stage 1 registers
// three partial counts of 9 bits each, stage 2 adds them. Splitting the
// count into a pipeline follows the published decoder; the 9-bit split is
// this design's choice. Any side data (tag) travels along with the count.
//
// Timing: count/tag_o/valid_o appear 2 clocks after valid_i/d/tag_i.
module zero_count_pipe #(
  parameter int unsigned W  = 27,
  parameter int unsigned CW = 5,
  parameter int unsigned TW = 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid_i,
  input  logic [W-1:0]  d,
  input  logic [TW-1:0] tag_i,
  output logic          valid_o,
  output logic [CW-1:0] count,
  output logic [TW-1:0] tag_o
);
  localparam int unsigned NP = 3;
  localparam int unsigned PW = (W + NP - 1) / NP;

  logic [NP-1:0][CW-1:0] part;
  logic [TW-1:0]         tag_s1;
  logic                  v_s1;

  always_ff @(posedge clk) begin
    if (rst) begin
      v_s1    <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      v_s1    <= valid_i;
      valid_o <= v_s1;
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      logic [CW-1:0] n;
      n = '0;
      for (int i = 0; i < PW; i++)
        if (p * PW + i < W) n += CW'(!d[p*PW+i]);
      part[p] <= n;
    end
    tag_s1 <= tag_i;
    count  <= part[0] + part[1] + part[2];
    tag_o  <= tag_s1;
  end
endmodule
