// tb_prefix_network: exhaustive-configuration test of the prefix network.
//
// Instantiates all four topologies for node counts from 1 to 107 (the
// 2048-bit adder's count), with 4 pipeline registers (and 13 for the
// deepest case, more registers than logic levels). Random (G,P) vectors
// enter every clock; after STAGES clocks each output bit must equal the
// group generate / group propagate of nodes 0..i, which the testbench
// computes with a plain serial scan.
module tb_prefix_network;
  import wide_adder_pkg::*;

  localparam int unsigned NMAX = 107;
  localparam int unsigned HIST = 16;
  localparam int unsigned NCYC = 1500;
  localparam int unsigned NS [10] = '{1, 2, 3, 5, 8, 13, 16, 31, 64, 107};

  logic clk = 1'b0;
  logic [NMAX-1:0] gi, pi;
  logic [NMAX-1:0] g_hist [HIST];
  logic [NMAX-1:0] p_hist [HIST];
  int cyc = 0, started = -1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input int unsigned n, input int unsigned stages,
                       input logic [NMAX-1:0] go, input logic [NMAX-1:0] po,
                       input string name);
    logic [NMAX-1:0] g, p, eg, ep;
    logic cg, cp;
    g = g_hist[(cyc - int'(stages)) % HIST];
    p = p_hist[(cyc - int'(stages)) % HIST];
    cg = 1'b0; cp = 1'b1;
    eg = '0; ep = '0;
    for (int unsigned i = 0; i < n; i++) begin
      cg = g[i] | (p[i] & cg);
      cp = p[i] & cp;
      eg[i] = cg;
      ep[i] = cp;
    end
    checks++;
    if (go != eg || po != ep) begin
      failures++;
      if (failures < 10) $display("FAIL: %s cycle %0d", name, cyc);
    end
  endtask

  for (genvar pk = 0; pk < 4; pk++) begin : g_kind
    for (genvar ni = 0; ni < 10; ni++) begin : g_n
      localparam int unsigned N = NS[ni];
      localparam int unsigned S = (N == NMAX && pk == 0) ? 13 : 4;
      logic [N-1:0] go, po;
      prefix_network #(.N(N), .KIND(prefix_e'(pk)), .STAGES(S)) dut (
        .clk, .g_in(gi[N-1:0]), .p_in(pi[N-1:0]), .g_out(go), .p_out(po));
      always @(posedge clk)
        if (started >= 0 && cyc >= started + int'(S))
          check(N, S, NMAX'(go), NMAX'(po), $sformatf("kind%0d n%0d", pk, N));
    end
  end

  initial begin
    gi = '0; pi = '0;
    repeat (2) @(negedge clk);
    started = cyc;
    for (int n = 0; n < NCYC; n++) begin
      for (int i = 0; i < NMAX; i++) begin
        // mostly propagates, so long carry runs are common
        pi[i] = ($urandom_range(7) != 0);
        gi[i] = ($urandom_range(3) == 0);
      end
      g_hist[cyc % HIST] = gi;
      p_hist[cyc % HIST] = pi;
      @(negedge clk);
    end
    checks++;
    if (checks < 40 * (NCYC - 20)) begin
      failures++;
      $display("FAIL: too few comparisons (%0d)", checks);
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
