// pipe_delay: fixed-length register delay line.
//
// Used to balance the paths of the wide adder: the forwarded segment words
// wait here while the prefix network resolves the carries, and the prefix
// network uses it for the registers it places between its logic levels.
// DEPTH = 0 gives a plain wire. The registers have no reset: they carry
// data only, which is qualified by a separate valid pipeline in the top.
// The delay itself is part of the published design; a plain shift register
// without enable is this design's choice.
// Interface: d enters, q = d delayed by DEPTH rising clock edges.
module pipe_delay #(
  parameter int unsigned WIDTH = 19,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int unsigned k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
    end
    assign q = stage[DEPTH-1];
  end
endmodule
