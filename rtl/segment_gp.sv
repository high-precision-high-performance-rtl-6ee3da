// segment_gp: generate/propagate pair and forwarded word for one segment.
//
// A segment is one carry-chain group of the FPGA less one bit (19 operand
// bits for a 20-bit chain), so that the carry out of the chain lands in the
// routing like an ordinary sum bit. G is the carry out of a + b, P the carry
// out of a + b + 1. The ARCH parameter selects one of six ways to form them:
//   1: G and P from two input adders; both operands go on to the output.
//   2: G adder's W-bit sum goes on to the output, P from a second adder
//      a + b + 1 (the main configuration: smallest of the six).
//   3: like 2, but P is the carry out of (sum + 1), one cycle after G.
//   4: like 3, but P is the AND of all sum bits, one cycle after G.
//   5: G adder sum and P adder sum both go on; the output stage selects.
//   6: P adder a + b + 1 first; G and the sum come from subtracting 1 from
//      it one cycle later.
// In 3 and 4, P is "exclusive" (only when the sum is all ones); G and P
// never both hold, and the prefix rule G | P & c gives the same carries.
// Timing: all outputs appear input_stages(ARCH) cycles after a, b (1 for
// architectures 1, 2, 5; 2 for 3, 4, 6). The inputs are not registered
// here. Data registers have no reset.
// The six ways of forming G/P follow the published architectures; where
// the second register of architectures 4 and 6 sits is this design's choice.
module segment_gp
  import wide_adder_pkg::*;
#(
  parameter int unsigned W    = 19,
  parameter arch_t       ARCH = 2,
  localparam int unsigned FW  = fwd_width(ARCH, W)
) (
  input  logic          clk,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic          g,
  output logic          p,
  output logic [FW-1:0] fwd
);
  if (ARCH == 1 || ARCH == 2 || ARCH == 5) begin : g_one_stage
    logic [W:0] sum_g, sum_p;
    always_comb begin
      sum_g = {1'b0, a} + {1'b0, b};
      sum_p = {1'b0, a} + {1'b0, b} + (W+1)'(1);
    end
    always_ff @(posedge clk) begin
      g <= sum_g[W];
      p <= sum_p[W];
      if (ARCH == 1)      fwd <= FW'({a, b});
      else if (ARCH == 5) fwd <= FW'({sum_p[W-1:0], sum_g[W-1:0]});
      else                fwd <= FW'(sum_g[W-1:0]);
    end
  end else if (ARCH == 3 || ARCH == 4) begin : g_p_after_g
    logic [W:0]   sum_g;
    logic         g_r;
    logic [W-1:0] s_r;
    logic [W:0]   inc;
    always_comb begin
      sum_g = {1'b0, a} + {1'b0, b};
      // a segment with a carry out can never have an all-ones sum, so the
      // propagate taken from the sum below is exclusive of G
      assert (!(sum_g[W] && (&sum_g[W-1:0])));
    end
    always_ff @(posedge clk) begin
      g_r <= sum_g[W];
      s_r <= sum_g[W-1:0];
    end
    // P from the registered sum: incrementer carry (3) or AND tree (4)
    always_comb inc = {1'b0, s_r} + (W+1)'(1);
    always_ff @(posedge clk) begin
      g   <= g_r;
      p   <= (ARCH == 3) ? inc[W] : &s_r;
      fwd <= FW'(s_r);
    end
  end else begin : g_g_after_p
    // architecture 6
    logic [W:0] sum_p, dec;
    logic [W:0] sp_r;
    always_comb sum_p = {1'b0, a} + {1'b0, b} + (W+1)'(1);
    always_ff @(posedge clk) sp_r <= sum_p;
    always_comb dec = sp_r - (W+1)'(1);
    always_ff @(posedge clk) begin
      p   <= sp_r[W];
      g   <= dec[W];
      fwd <= FW'(dec[W-1:0]);
    end
  end

  initial assert (ARCH >= 1 && ARCH <= 6)
    else $error("segment_gp: ARCH must be 1..6");
endmodule
