// tb_wide_adder_configs: the wide adder across its configuration space.
//
// One shared random operand stream (a new addition every clock) feeds many
// adder instances at once: all six segment architectures with all four
// prefix topologies, pipeline depths 4, 6 and 8, and carry-chain groups of
// 20, 30 and 40 bits, at widths chosen so the prefix network sees both
// power-of-two and ragged node counts. Each instance's result is compared
// LATENCY clocks later with the sum the testbench computed itself. A
// quarter of the operand pairs are complements (plus 0 or 1) so that long
// propagate chains occur often.
module tb_wide_adder_configs;
  import wide_adder_pkg::*;

  localparam int unsigned W1    = 300;   // 16 segments of 19 bits
  localparam int unsigned W2    = 1024;
  localparam int unsigned NCYC  = 2000;
  localparam int unsigned HIST  = 16;

  logic clk = 1'b0;
  logic rst;
  logic in_valid;
  logic [W2-1:0] a, b;
  logic [W2-1:0] hist1 [HIST];  // a + b, W1 bits used by the narrow instances
  int cyc = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // checks one instance's output against the recorded sum
  task automatic check(input int unsigned lat, input logic [W2-1:0] got,
                       input int unsigned w, input string name);
    logic [W2-1:0] e, mask;
    mask = (w == W2) ? '1 : ((W2'(1) << w) - W2'(1));
    e = hist1[(cyc - int'(lat)) % HIST] & mask;
    checks++;
    if ((got & mask) !== e) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at cycle %0d", name, cyc);
    end
  endtask

  // all architectures x all prefix types, 300 bits, depth 6
  for (genvar ar = 1; ar <= 6; ar++) begin : g_arch
    for (genvar pk = 0; pk < 4; pk++) begin : g_pfx
      logic          ov;
      logic [W1-1:0] s;
      wide_adder #(.WIDTH(W1), .CHAIN(20), .LATENCY(6), .ARCH(ar),
                   .PREFIX(prefix_e'(pk))) dut (
        .clk, .rst, .in_valid, .a(a[W1-1:0]), .b(b[W1-1:0]), .out_valid(ov), .sum(s));
      always @(posedge clk) if (!rst && ov) check(6, W2'(s), W1, $sformatf("arch%0d pfx%0d", ar, pk));
    end
  end

  // pipeline depths 4 and 8, carry-chain groups 30 and 40, 1024 bits
  typedef struct packed { int unsigned chain; int unsigned lat; int unsigned arch; int unsigned pk; } cfg_t;
  localparam cfg_t CFGS [8] = '{
    '{20, 4, 2, 0}, '{20, 8, 2, 0}, '{30, 4, 2, 0}, '{40, 4, 2, 0},
    '{20, 4, 4, 2}, '{20, 8, 6, 1}, '{40, 8, 5, 3}, '{30, 6, 1, 1}};
  for (genvar c = 0; c < 8; c++) begin : g_cfg
    logic          ov;
    logic [W2-1:0] s;
    wide_adder #(.WIDTH(W2), .CHAIN(CFGS[c].chain), .LATENCY(CFGS[c].lat),
                 .ARCH(CFGS[c].arch), .PREFIX(prefix_e'(CFGS[c].pk))) dut (
      .clk, .rst, .in_valid, .a, .b, .out_valid(ov), .sum(s));
    always @(posedge clk) if (!rst && ov) check(CFGS[c].lat, s, W2, $sformatf("cfg%0d", c));
  end

  int unsigned nvalid_seen = 0;
  always @(posedge clk) if (!rst && g_arch[2].g_pfx[0].ov) nvalid_seen++;

  initial begin
    rst = 1'b1; in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < NCYC; n++) begin
      for (int i = 0; i < W2 / 32; i++) a[i*32 +: 32] = $urandom;
      for (int i = 0; i < W2 / 32; i++) b[i*32 +: 32] = $urandom;
      if ($urandom_range(3) == 0) b = ~a + W2'($urandom_range(1));
      in_valid = 1'b1;
      hist1[cyc % HIST] = a + b;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (nvalid_seen != NCYC) begin
      failures++;
      $display("FAIL: %0d results seen, %0d expected", nvalid_seen, NCYC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
