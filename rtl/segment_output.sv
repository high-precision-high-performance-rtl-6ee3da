// segment_output: registered output stage of one segment.
//
// Combines the word forwarded from the segment stage with the carry into the
// segment produced by the prefix network:
//   ARCH 1:          s = a + b + c   (both operands were forwarded)
//   ARCH 5:          s = c ? (a+b+1) : (a+b), a pure multiplexer
//   ARCH 2, 3, 4, 6: s = sum + c     (the G adder's sum was forwarded)
// Every architecture registers the output stage, so s appears one clock
// after fwd and c. No reset. The three output forms follow the published
// architectures.
module segment_output
  import wide_adder_pkg::*;
#(
  parameter int unsigned W    = 19,
  parameter arch_t       ARCH = 2,
  localparam int unsigned FW  = fwd_width(ARCH, W)
) (
  input  logic          clk,
  input  logic [FW-1:0] fwd,
  input  logic          c,
  output logic [W-1:0]  s
);
  logic [W-1:0] s_next;

  if (ARCH == 1) begin : g_add3
    always_comb s_next = fwd[FW-1 -: W] + fwd[W-1:0] + W'(c);
  end else if (ARCH == 5) begin : g_mux
    always_comb s_next = c ? fwd[FW-1 -: W] : fwd[W-1:0];
  end else begin : g_inc
    always_comb s_next = fwd[W-1:0] + W'(c);
  end

  always_ff @(posedge clk) s <= s_next;
endmodule
