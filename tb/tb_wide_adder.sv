// tb_wide_adder: end-to-end test of the wide adder at its default size
// (2048 bits, 19-bit segments, architecture two, Brent-Kung, 6 cycles).
//
// Drives operands on the falling clock edge: a stream of additions, mostly back to back with occasional idle
// cycles, and checks every result against the simulator's own 2048-bit
// addition and its arrival exactly LATENCY clocks after issue. Operands mix
// random words with patterns that exercise each carry mechanism: a segment
// generating a carry, carries crossing propagating segments, and a carry
// rippling through every segment (all ones + 1). The testbench works out
// from the operands which mechanisms each addition uses and fails if any
// never occurred. A watchdog ends the run if results stop arriving.
module tb_wide_adder;
  localparam int unsigned WIDTH   = 2048;
  localparam int unsigned SEG     = 19;
  localparam int unsigned NSEG    = (WIDTH + SEG - 1) / SEG;
  localparam int unsigned LATENCY = 6;
  localparam int unsigned NOPS    = 3000;

  logic             clk = 1'b0;
  logic             rst;
  logic             in_valid, out_valid;
  logic [WIDTH-1:0] a, b, sum;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_gen = 0, n_prop = 0, n_chain_long = 0, n_full_chain = 0;
  int n_back_to_back = 0, n_bubble = 0;

  wide_adder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // expected results and their issue cycles
  logic [WIDTH-1:0] exp_q [$];
  int               cyc_q [$];

  function automatic logic [WIDTH-1:0] rand_word();
    logic [WIDTH-1:0] w;
    for (int i = 0; i < WIDTH / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  // classify which carry mechanisms an addition uses
  function automatic void classify(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y);
    logic c = 1'b0;
    int   run = 0, longest = 0;
    bit   any_g = 0, any_p = 0;
    for (int unsigned k = 0; k < NSEG - 1; k++) begin
      logic [SEG:0] s = {1'b0, x[k*SEG +: SEG]} + {1'b0, y[k*SEG +: SEG]};
      logic g = s[SEG];
      logic p = &s[SEG-1:0];
      if (g) begin any_g = 1; run = 1; end
      else if (p && c) begin any_p = 1; run++; end
      else run = 0;
      if (run > longest) longest = run;
      c = g | (p & c);
    end
    if (any_g) n_gen++;
    if (any_p) n_prop++;
    if (longest >= 8) n_chain_long++;
    if (longest == NSEG - 1) n_full_chain++;
  endfunction

  function automatic void issue(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y);
    in_valid = 1'b1;
    a = x;
    b = y;
    classify(x, y);
    exp_q.push_back(x + y);
    cyc_q.push_back(cyc);
  endfunction

  // result checker
  logic prev_out_valid = 1'b0;
  always @(posedge clk) begin
    if (!rst) begin
      if (out_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL: unexpected out_valid at cycle %0d", cyc);
        end else begin
          logic [WIDTH-1:0] e;
          int               t;
          e = exp_q.pop_front();
          t = cyc_q.pop_front();
          if (sum !== e) begin
            failures++;
            if (failures < 10) $display("FAIL: sum mismatch, issued at cycle %0d", t);
          end
          checks++;
          if (cyc - t != LATENCY) begin
            failures++;
            if (failures < 10) $display("FAIL: latency %0d, expected %0d", cyc - t, LATENCY);
          end
        end
        if (prev_out_valid) n_back_to_back++;
      end
      prev_out_valid <= out_valid;
    end
  end

  initial begin
    logic [WIDTH-1:0] x, y;
    rst = 1'b1; in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // directed: full ripple through every segment, both directions of use
    @(negedge clk);
    issue('1, WIDTH'(1));
    @(negedge clk);
    issue(WIDTH'(1), '1);
    @(negedge clk);
    issue('1, '1);
    @(negedge clk);
    issue('0, '0);
    // carry crossing a run of propagating segments in the middle
    x = '0; y = '0;
    x[40*SEG +: 30*SEG] = '1;
    y[39*SEG +: SEG]    = '1;
    @(negedge clk);
    issue(x, y);
    for (int n = 0; n < NOPS; n++) begin
      case ($urandom_range(3))
        0: begin x = rand_word(); y = rand_word(); end
        1: begin x = rand_word(); y = ~x + WIDTH'($urandom_range(1)); end
        2: begin  // long propagate run from a random start
             int unsigned lo;
             lo = $urandom_range(WIDTH - 1);
             x = rand_word(); y = ~x;
             y[lo] = 1'b1; x[lo] = 1'b1;
           end
        default: begin x = rand_word(); y = '0; y[$urandom_range(WIDTH-1)] = 1'b1; end
      endcase
      @(negedge clk);
      issue(x, y);
      if ($urandom_range(15) == 0) begin
        n_bubble++;
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never arrived", exp_q.size());
    end
    $display("mechanisms: segment_generate=%0d propagate_crossing=%0d long_chain=%0d full_chain=%0d back_to_back=%0d bubbles=%0d",
             n_gen, n_prop, n_chain_long, n_full_chain, n_back_to_back, n_bubble);
    checks += 6;
    if (n_gen == 0)          failures++;
    if (n_prop == 0)         failures++;
    if (n_chain_long == 0)   failures++;
    if (n_full_chain == 0)   failures++;
    if (n_back_to_back == 0) failures++;
    if (n_bubble == 0)       failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (NOPS * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
