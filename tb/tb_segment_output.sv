// tb_segment_output: the registered segment output stage, all architectures.
//
// Random forwarded words and carries are applied every clock; one clock
// later the segment sum must be a + b + c (architecture 1), the carry-
// selected candidate (architecture 5) or sum + c (the others), wrapped to
// the 19-bit segment.
module tb_segment_output;
  import wide_adder_pkg::*;

  localparam int unsigned NCYC = 3000;

  logic clk = 1'b0;
  logic [37:0] fwd, fwd_q;
  logic        c, c_q;
  int cyc = 0, started = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin fwd_q <= fwd; c_q <= c; end

  function automatic logic [18:0] expect_s(input int unsigned arch,
                                           input logic [37:0] f, input logic cin);
    case (arch)
      1:       return f[37:19] + f[18:0] + 19'(cin);
      5:       return cin ? f[37:19] : f[18:0];
      default: return f[18:0] + 19'(cin);
    endcase
  endfunction

  for (genvar ar = 1; ar <= 6; ar++) begin : g_arch
    localparam int unsigned FW = fwd_width(ar, 19);
    logic [18:0] s;
    segment_output #(.W(19), .ARCH(ar)) dut (.clk, .fwd(fwd[FW-1:0]), .c, .s);
    always @(posedge clk) begin
      if (started == 1) begin
        checks++;
        if (s !== expect_s(ar, 38'(fwd_q[FW-1:0]), c_q)) begin
          failures++;
          if (failures < 10) $display("FAIL: arch %0d cycle %0d", ar, cyc);
        end
      end
    end
  end

  initial begin
    fwd = '0; c = 1'b0;
    @(negedge clk);
    for (int n = 0; n < NCYC; n++) begin
      fwd = {6'($urandom), $urandom};
      if ($urandom_range(3) == 0) fwd[18:0] = '1;   // sum + c wraps
      c = 1'($urandom);
      @(negedge clk);
      started = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
