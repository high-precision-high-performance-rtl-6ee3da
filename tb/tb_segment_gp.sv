// tb_segment_gp: the segment G/P stage for all six architectures.
//
// Each architecture is instantiated at the 19-bit segment width and at 5
// bits. The 5-bit instances see every operand pair; the 19-bit ones see
// random pairs with many sums near all ones. After input_stages(ARCH)
// clocks the testbench checks G (carry of a+b), P (carry of a+b+1, or the
// all-ones test of the sum for architectures 3 and 4) and the forwarded
// word (operands, sum, or both candidate sums).
module tb_segment_gp;
  import wide_adder_pkg::*;

  localparam int unsigned HIST = 8;
  localparam int unsigned NCYC = 4096;

  logic clk = 1'b0;
  logic [18:0] a, b;
  logic [18:0] a_hist [HIST];
  logic [18:0] b_hist [HIST];
  int cyc = 0, started = -1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input int unsigned arch, input int unsigned w,
                       input logic g, input logic p, input logic [37:0] fwd);
    logic [18:0] x, y, m;
    logic [19:0] sg, sp;
    logic        eg, ep;
    logic [37:0] ef;
    int unsigned lat = input_stages(arch);
    m  = 19'((20'd1 << w) - 20'd1);
    x  = a_hist[(cyc - int'(lat)) % HIST] & m;
    y  = b_hist[(cyc - int'(lat)) % HIST] & m;
    sg = 20'(x) + 20'(y);
    sp = sg + 20'd1;
    eg = sg[w];
    if (arch == 3 || arch == 4) ep = ((sg[18:0] & m) == m);
    else                        ep = sp[w];
    case (arch)
      1:       ef = (38'(x) << w) | 38'(y);
      5:       ef = (38'(sp[18:0] & m) << w) | 38'(sg[18:0] & m);
      default: ef = 38'(sg[18:0] & m);
    endcase
    checks++;
    if (g !== eg || p !== ep || fwd !== ef) begin
      failures++;
      if (failures < 10) $display("FAIL: arch %0d w %0d: %h+%h g=%b p=%b", arch, w, x, y, g, p);
    end
  endtask

  for (genvar ar = 1; ar <= 6; ar++) begin : g_arch
    localparam int unsigned LAT = input_stages(ar);
    logic g19, p19, g5, p5;
    logic [fwd_width(ar, 19)-1:0] f19;
    logic [fwd_width(ar, 5)-1:0]  f5;
    segment_gp #(.W(19), .ARCH(ar)) u19 (.clk, .a, .b, .g(g19), .p(p19), .fwd(f19));
    segment_gp #(.W(5),  .ARCH(ar)) u5  (.clk, .a(a[4:0]), .b(b[4:0]), .g(g5), .p(p5), .fwd(f5));
    always @(posedge clk) begin
      if (started >= 0 && cyc >= started + int'(LAT)) begin
        check(ar, 19, g19, p19, 38'(f19));
        check(ar, 5, g5, p5, 38'(f5));
      end
    end
  end

  int n_g = 0, n_p = 0;
  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    started = cyc;
    for (int n = 0; n < NCYC; n++) begin
      a = $urandom;
      b = ($urandom_range(1) == 1) ? ~a + 19'($urandom_range(2)) : 19'($urandom);
      a[4:0] = 5'(n);          // exhaustive over the 5-bit instances
      b[4:0] = 5'(n >> 5);
      if ((20'(a) + 20'(b)) >> 19 != 0) n_g++;
      if ((a + b) == '1) n_p++;
      a_hist[cyc % HIST] = a;
      b_hist[cyc % HIST] = b;
      @(negedge clk);
    end
    // hold the last operands while the pipeline drains
    repeat (3) begin
      a_hist[cyc % HIST] = a;
      b_hist[cyc % HIST] = b;
      @(negedge clk);
    end
    checks++;
    if (n_g == 0 || n_p == 0) begin
      failures++;
      $display("FAIL: stimulus missed generate (%0d) or propagate (%0d) cases", n_g, n_p);
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
