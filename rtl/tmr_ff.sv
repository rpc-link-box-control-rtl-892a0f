// Triple redundant flip-flop.
//
// Three D flip-flops share D and the clock; each has its own synchronous
// reset (r[0], r[1], r[2]) so that synthesis cannot merge the copies. The
// output is the 2-of-3 majority of the three copies, so an upset in any one
// copy never reaches q, and the next clock edge rewrites the upset copy from
// d. This is the published flip-flop structure; the reset value is a
// parameter of this design.
//
// Timing: q follows d one clock later; r[i] resets copy i at the clock edge.
module tmr_ff #(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic       clk,
  input  logic [2:0] r,
  input  logic       d,
  output logic       q
);
  logic [2:0] copy;

  for (genvar i = 0; i < 3; i++) begin : g_copy
    always_ff @(posedge clk) begin
      if (r[i]) copy[i] <= RESET_VAL;
      else      copy[i] <= d;
    end
  end

  assign q = (copy[0] & copy[1]) | (copy[1] & copy[2]) | (copy[0] & copy[2]);
endmodule
