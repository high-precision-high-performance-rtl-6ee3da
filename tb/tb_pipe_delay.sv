// tb_pipe_delay: delay lines of depth 0, 1, 4 and 7.
//
// A counter-derived pattern enters every clock; each line's output must
// equal the input from exactly DEPTH clocks earlier (depth 0 the same
// cycle's input).
module tb_pipe_delay;
  localparam int unsigned NCYC = 500;
  localparam int unsigned DEPTHS [4] = '{0, 1, 4, 7};

  logic clk = 1'b0;
  logic [18:0] d;
  logic [18:0] hist [16];
  int cyc = 0, started = -1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar i = 0; i < 4; i++) begin : g_d
    localparam int unsigned DEP = DEPTHS[i];
    logic [18:0] q;
    pipe_delay #(.WIDTH(19), .DEPTH(DEP)) dut (.clk, .d, .q);
    always @(posedge clk) begin
      if (started >= 0 && cyc >= started + int'(DEP)) begin
        checks++;
        if (q !== hist[(cyc - int'(DEP)) % 16]) begin
          failures++;
          if (failures < 10) $display("FAIL: depth %0d cycle %0d", DEP, cyc);
        end
      end
    end
  end

  initial begin
    d = '0;
    @(negedge clk);
    started = cyc;
    for (int n = 0; n < NCYC; n++) begin
      d = 19'($urandom);
      hist[cyc % 16] = d;
      @(negedge clk);
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
