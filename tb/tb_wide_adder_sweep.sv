// tb_wide_adder_sweep: the evaluated adder configurations, simulated.
//
// Runs the adder sizes of the published width and segment sweeps,
// architecture two with a Brent-Kung prefix network:
//   * 1024, 4096 and 8192 bits, each at pipeline depths 4, 6 and 8;
//   * 2048 bits at depth 4 with carry-chain groups of 30 and 40 bits.
// (2048 bits at the default depth 6 is covered by tb_wide_adder; every
// architecture and prefix combination by tb_wide_adder_configs.)
// One random operand stream (a new addition every clock, a quarter of them
// complements that make carries ripple through every segment) feeds all
// instances; each result is checked exactly LATENCY clocks after issue and
// every instance must deliver every result.
module tb_wide_adder_sweep;
  import wide_adder_pkg::*;

  localparam int unsigned WMAX = 8192;
  localparam int unsigned NCYC = 300;
  localparam int unsigned HIST = 16;
  localparam int unsigned NCFG = 11;

  typedef struct packed {
    int unsigned width; int unsigned chain; int unsigned lat;
    int unsigned arch;  int unsigned pk;
  } cfg_t;
  localparam cfg_t CFGS [NCFG] = '{
    '{1024, 20, 4, 2, 0},
    '{1024, 20, 6, 2, 0},
    '{1024, 20, 8, 2, 0},
    '{4096, 20, 4, 2, 0},
    '{4096, 20, 6, 2, 0},
    '{4096, 20, 8, 2, 0},
    '{8192, 20, 4, 2, 0},
    '{8192, 20, 6, 2, 0},
    '{8192, 20, 8, 2, 0},
    '{2048, 30, 4, 2, 0},
    '{2048, 40, 4, 2, 0}};

  logic clk = 1'b0;
  logic rst;
  logic in_valid;
  logic [WMAX-1:0] a, b;
  logic [WMAX-1:0] hist [HIST];
  int cyc = 0;
  int checks = 0, failures = 0;
  int seen [NCFG];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input int idx, input logic [WMAX-1:0] got);
    logic [WMAX-1:0] mask, e;
    int unsigned w = CFGS[idx].width;
    mask = (w == WMAX) ? '1 : ((WMAX'(1) << w) - WMAX'(1));
    e = hist[(cyc - int'(CFGS[idx].lat)) % HIST] & mask;
    checks++;
    seen[idx]++;
    if ((got & mask) !== e) begin
      failures++;
      if (failures < 10) $display("FAIL: config %0d (width %0d arch %0d prefix %0d depth %0d) at cycle %0d",
                                  idx, w, CFGS[idx].arch, CFGS[idx].pk, CFGS[idx].lat, cyc);
    end
  endtask

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned W = CFGS[c].width;
    logic         ov;
    logic [W-1:0] s;
    wide_adder #(.WIDTH(W), .CHAIN(CFGS[c].chain), .LATENCY(CFGS[c].lat),
                 .ARCH(CFGS[c].arch), .PREFIX(prefix_e'(CFGS[c].pk))) dut (
      .clk, .rst, .in_valid, .a(a[W-1:0]), .b(b[W-1:0]), .out_valid(ov), .sum(s));
    always @(posedge clk) if (!rst && ov) check(c, WMAX'(s));
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    rst = 1'b1; in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < NCYC; n++) begin
      for (int i = 0; i < WMAX / 32; i++) a[i*32 +: 32] = $urandom;
      for (int i = 0; i < WMAX / 32; i++) b[i*32 +: 32] = $urandom;
      if ($urandom_range(3) == 0) b = ~a + WMAX'(1);
      in_valid = 1'b1;
      hist[cyc % HIST] = a + b;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (12) @(posedge clk);
    foreach (seen[i]) begin
      checks++;
      if (seen[i] != NCYC) begin
        failures++;
        $display("FAIL: config %0d delivered %0d of %0d results", i, seen[i], NCYC);
      end
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
