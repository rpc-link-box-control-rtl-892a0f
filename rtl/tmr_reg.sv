// Triple redundant register of W bits built from tmr_ff cells.
//
// When en is low the voted output is fed back into all three copies, so a
// single upset copy is repaired on the next clock edge. r carries the three
// separate synchronous resets (one per copy of every bit). The enable and
// the width are this design's additions around the published flip-flop.
//
// Timing: q takes d one clock after en is high.
module tmr_reg #(
  parameter int unsigned W         = 8,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic [2:0]   r,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] nxt;
  assign nxt = en ? d : q;

  for (genvar b = 0; b < W; b++) begin : g_bit
    tmr_ff #(.RESET_VAL(RESET_VAL[b])) u_ff (
      .clk(clk), .r(r), .d(nxt[b]), .q(q[b])
    );
  end
endmodule
