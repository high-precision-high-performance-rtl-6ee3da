// prefix_network: pipelined parallel-prefix carry network.
//
// Takes one (G,P) pair per segment and returns, for every node i, the group
// generate of nodes 0..i, which is the carry into segment i+1 (the adder has
// no carry in). Each node at each logic level either passes its pair on or
// combines it with a lower node j:  G = G_i | P_i & G_j,  P = P_i & P_j.
// The topology is chosen with KIND: Brent-Kung (2*ceil(log2 N)-1 levels,
// fewest cells), Han-Carlson (ceil(log2 N)+1 levels, Kogge-Stone on the odd
// nodes plus one fix-up level), Kogge-Stone and Sklansky (ceil(log2 N)
// levels). Which node combines with which is computed by
// wide_adder_pkg::prefix_partner.
// STAGES pipeline registers are spread evenly over the logic levels by
// depth: level k is followed by floor((k+1)S/D) - floor(kS/D) registers, so
// each register bank has about the same number of levels in front of it.
// The four topologies are the published options; the even spread of the
// registers by depth is this design's reading of depth-based retiming.
// Timing: g_out/p_out appear STAGES clocks after g_in/p_in (STAGES >= 1
// in the adder; 0 gives a combinational network). No reset.
module prefix_network
  import wide_adder_pkg::*;
#(
  parameter int unsigned N      = 107,
  parameter prefix_e     KIND   = PFX_BRENT_KUNG,
  parameter int unsigned STAGES = 4
) (
  input  logic         clk,
  input  logic [N-1:0] g_in,
  input  logic [N-1:0] p_in,
  output logic [N-1:0] g_out,
  output logic [N-1:0] p_out
);
  localparam int unsigned D = prefix_levels(KIND, N);

  if (D == 0) begin : g_trivial
    pipe_delay #(.WIDTH(2 * N), .DEPTH(STAGES)) u_dly (
      .clk, .d({g_in, p_in}), .q({g_out, p_out}));
  end else begin : g_tree
    // lg/lp[k] is the input of level k; lg/lp[D] the network output
    logic [N-1:0] lg [D+1];
    logic [N-1:0] lp [D+1];
    assign lg[0] = g_in;
    assign lp[0] = p_in;

    for (genvar k = 0; k < D; k++) begin : g_level
      logic [N-1:0] cg, cp;
      for (genvar i = 0; i < N; i++) begin : g_node
        localparam int J = prefix_partner(KIND, N, k, i);
        if (J >= 0) begin : g_cell
          assign cg[i] = lg[k][i] | (lp[k][i] & lg[k][J]);
          assign cp[i] = lp[k][i] & lp[k][J];
        end else begin : g_pass
          assign cg[i] = lg[k][i];
          assign cp[i] = lp[k][i];
        end
      end
      pipe_delay #(.WIDTH(2 * N), .DEPTH(regs_after_level(D, STAGES, k))) u_dly (
        .clk, .d({cg, cp}), .q({lg[k+1], lp[k+1]}));
    end

    assign g_out = lg[D];
    assign p_out = lp[D];
  end
endmodule
