// tb_qca_clock_zones: checks the clock-zone register chain.
//
// Resets the chain and checks that it outputs zeros, sends a single one
// through and checks that it appears exactly ZONES cycles later and for one
// cycle only, then streams random words and compares each output with the
// word entered ZONES cycles before (a model queue). A mid-stream reset must
// clear the chain. A watchdog ends the run with a failure after 2000 cycles.
module tb_qca_clock_zones;
  localparam int unsigned ZONES = 4;
  localparam int unsigned WIDTH = 5;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [WIDTH-1:0] d, q;
  int checks = 0, failures = 0;
  int cycle = 0;

  qca_clock_zones #(.ZONES(ZONES), .WIDTH(WIDTH)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [WIDTH-1:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: q=%h expected %h", what, cycle, q, exp);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] hist [$];
    int start, seen_at;
    rst_n = 1'b0;
    d = '1;
    repeat (ZONES + 1) @(posedge clk);
    #1 check('0, "after reset");
    rst_n = 1'b1;
    d = '0;
    repeat (ZONES + 2) @(posedge clk);
    // Single pulse: measure the latency.
    #1 d = WIDTH'(1);
    start = cycle;
    @(posedge clk);
    #1 d = '0;
    seen_at = -1;
    for (int n = 0; n < 3 * ZONES; n++) begin
      if (q == WIDTH'(1) && seen_at < 0) seen_at = cycle;
      @(posedge clk);
      #1;
    end
    checks++;
    if (seen_at - start != ZONES) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", seen_at - start, ZONES);
    end
    // Random stream against a delay-line model.
    hist.delete();
    for (int n = 0; n < ZONES; n++) hist.push_back('0);
    for (int n = 0; n < 200; n++) begin
      d = WIDTH'($urandom);
      hist.push_back(d);
      @(posedge clk);
      #1;
      void'(hist.pop_front());
      check(hist[0], "stream");
    end
    // Reset in the middle of a stream clears every zone.
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    d = '0;
    for (int n = 0; n < ZONES; n++) begin
      check('0, "after mid-stream reset");
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
