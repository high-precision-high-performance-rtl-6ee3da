// wide_adder: pipelined adder for operands of thousands of bits.
//
// The operands are cut into segments one bit shorter than the FPGA's
// carry-chain group (CHAIN = 20 gives 19-bit segments, 108 segments for
// 2048 bits). Each segment's G/P pair is formed by short carry chains
// (segment_gp), the segment carries are resolved by a pipelined
// parallel-prefix network over the first NSEG-1 pairs (prefix_network), the
// forwarded segment words wait in delay lines (pipe_delay) and the output
// stage adds each carry back in (segment_output). No carry chain is longer
// than one segment; only the prefix network spans the width.
// Pipeline: input_stages(ARCH) registers in the segment stage, LATENCY -
// input_stages - 1 in the prefix network (at least one) and one in the
// output stage, so sum appears LATENCY clocks after a and b. A new addition
// may start every clock. in_valid is carried alongside as out_valid (the
// only reset flop chain); the sum is modulo 2^WIDTH, with no carry in or
// carry out. Defaults are the main configuration: 2048 bits, architecture
// two, Brent-Kung, 6 cycles. The valid tag and the modular result are
// choices of this implementation.
module wide_adder
  import wide_adder_pkg::*;
#(
  parameter int unsigned WIDTH   = 2048,
  parameter int unsigned CHAIN   = 20,
  parameter int unsigned LATENCY = 6,
  parameter arch_t       ARCH    = 2,
  parameter prefix_e     PREFIX  = PFX_BRENT_KUNG
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             out_valid,
  output logic [WIDTH-1:0] sum
);
  localparam int unsigned SEG    = CHAIN - 1;
  localparam int unsigned NSEG   = (WIDTH + SEG - 1) / SEG;
  localparam int unsigned LAST_W = WIDTH - (NSEG - 1) * SEG;
  localparam int unsigned IN_ST  = input_stages(ARCH);
  localparam int unsigned PRE_ST = LATENCY - IN_ST - 1;

  if (NSEG < 2 || LATENCY < IN_ST + 2) begin : g_bad_cfg
    $error("wide_adder: need WIDTH > CHAIN-1 and LATENCY >= input stages + 2");
  end

  logic [NSEG-2:0] seg_g, seg_p, grp_g;

  for (genvar k = 0; k < NSEG; k++) begin : g_seg
    localparam int unsigned W  = (k == NSEG - 1) ? LAST_W : SEG;
    localparam int unsigned FW = fwd_width(ARCH, W);
    logic          g, p, c;
    logic [FW-1:0] fwd, fwd_d;

    segment_gp #(.W(W), .ARCH(ARCH)) u_gp (
      .clk, .a(a[k*SEG +: W]), .b(b[k*SEG +: W]), .g, .p, .fwd);

    pipe_delay #(.WIDTH(FW), .DEPTH(PRE_ST)) u_fwd_dly (
      .clk, .d(fwd), .q(fwd_d));

    // the last segment's pair does not feed the prefix network, and P of
    // the first segment is redundant (there is no carry in to propagate)
    if (k == 0) begin : g_to_prefix0
      assign seg_g[k] = g;
      assign seg_p[k] = 1'b0;
    end else if (k < NSEG - 1) begin : g_to_prefix
      assign seg_g[k] = g;
      assign seg_p[k] = p;
    end

    // the first segment has no carry in
    if (k == 0) begin : g_c0
      assign c = 1'b0;
    end else begin : g_ck
      assign c = grp_g[k-1];
    end

    segment_output #(.W(W), .ARCH(ARCH)) u_out (
      .clk, .fwd(fwd_d), .c, .s(sum[k*SEG +: W]));
  end

  prefix_network #(.N(NSEG - 1), .KIND(PREFIX), .STAGES(PRE_ST)) u_prefix (
    .clk, .g_in(seg_g), .p_in(seg_p), .g_out(grp_g), .p_out());

  // valid tag, LATENCY cycles deep
  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];
endmodule
