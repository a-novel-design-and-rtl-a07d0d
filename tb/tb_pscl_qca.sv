// tb_pscl_qca: end-to-end test of the clocked PSCL gate at its default size.
//
// The top is instantiated without parameter overrides (four clock zones).
// A scoreboard keeps every vector entered with in_valid and, when out_valid
// rises, compares pqrs with P = A, Q = A xor B, R = AB xor C,
// S = A(B+C) xor D worked out here, and checks that exactly four zone cycles
// (one QCA clock) have passed. The stimulus runs through four phases:
//   1. a slow sweep of all sixteen inputs, each held for one QCA clock, in
//      counting order (D changes fastest, A slowest);
//   2. the same sixteen vectors back to back, one per zone cycle;
//   3. random vectors with random gaps in in_valid;
//   4. a reset in the middle of a stream, which must drop everything in
//      flight.
// Each mechanism is counted (full-clock latency, back-to-back issue, gaps,
// reset flush, every output seen at 0 and at 1, the two S cases 0000 -> 0
// and 0001 -> 1); one that never happens counts as a failure. A watchdog
// ends the run with a failure after 5000 cycles.
module tb_pscl_qca;
  import pscl_pkg::*;

  localparam int unsigned LATENCY = 4;   // zone cycles in one QCA clock

  logic      clk = 1'b0;
  logic      rst_n;
  logic      in_valid;
  pscl_in_t  abcd;
  logic      out_valid;
  pscl_out_t pqrs;

  int checks = 0, failures = 0;
  int cycle = 0;

  // Mechanism counters.
  int n_latency_ok = 0, n_back_to_back = 0, n_gaps = 0, n_flush = 0;
  int n_s_0000 = 0, n_s_0001 = 0;
  int n_seen0 [4] = '{0, 0, 0, 0};
  int n_seen1 [4] = '{0, 0, 0, 0};

  pscl_qca dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .abcd(abcd),
    .out_valid(out_valid), .pqrs(pqrs)
  );

  always #5 clk = ~clk;

  typedef struct {
    logic [3:0] v;
    int         issued;
  } entry_t;
  entry_t sb [$];

  function automatic logic [3:0] expected(logic [3:0] v);
    logic a = v[3], b = v[2], c = v[1], d = v[0];
    return {a, a ^ b, (a & b) ^ c, (a & (b | c)) ^ d};
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // Scoreboard: sample just after each rising edge. Latency is counted from
  // the zone cycle in which a vector is applied to the one in which its
  // result is first visible.
  always begin
    @(posedge clk);
    #1;
    if (rst_n && out_valid) begin
      entry_t e;
      logic [3:0] exp;
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL cycle %0d: output %b with nothing in flight", cycle, pqrs);
      end else begin
        e = sb.pop_front();
        exp = expected(e.v);
        if (pqrs !== exp) begin
          failures++;
          $display("FAIL cycle %0d: abcd=%b pqrs=%b expected %b", cycle, e.v, pqrs, exp);
        end
        checks++;
        if (cycle - e.issued != LATENCY) begin
          failures++;
          $display("FAIL abcd=%b came out after %0d cycles, expected %0d", e.v, cycle - e.issued, LATENCY);
        end else n_latency_ok++;
        if (e.v == 4'b0000 && pqrs.s == 1'b0) n_s_0000++;
        if (e.v == 4'b0001 && pqrs.s == 1'b1) n_s_0001++;
        for (int k = 0; k < 4; k++) begin
          if (pqrs[3-k]) n_seen1[k]++; else n_seen0[k]++;
        end
      end
    end
  end

  // Drive one vector for one zone cycle (inputs change just after an edge).
  task automatic issue(logic [3:0] v, logic valid);
    int applied = cycle;
    abcd     = pscl_in_t'(v);
    in_valid = valid;
    if (valid) sb.push_back('{v: v, issued: applied});
    @(posedge clk);
    #2;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    abcd = '0;
    repeat (LATENCY + 2) @(posedge clk);
    #2 rst_n = 1'b1;
    checks++;
    if (out_valid !== 1'b0 || pqrs !== '0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end

    // 1. Slow sweep: each vector held for one QCA clock, valid in the first zone.
    for (int v = 0; v < 16; v++) begin
      issue(4'(v), 1'b1);
      for (int z = 1; z < LATENCY; z++) begin
        issue(4'(v), 1'b0);
        n_gaps++;
      end
    end

    // 2. Back to back: a new vector every zone cycle.
    for (int v = 0; v < 16; v++) begin
      issue(4'(v), 1'b1);
      if (v > 0) n_back_to_back++;
    end

    // 3. Random vectors with random gaps.
    for (int n = 0; n < 300; n++) begin
      automatic logic valid = ($urandom_range(3) != 0);
      issue(4'($urandom), valid);
      if (!valid) n_gaps++;
    end
    repeat (LATENCY + 1) issue(4'(0), 1'b0);

    // 4. Reset in the middle of a stream drops everything in flight.
    for (int n = 0; n < LATENCY - 1; n++) issue(4'($urandom), 1'b1);
    rst_n = 1'b0;
    issue(4'(0), 1'b0);
    sb.delete();
    rst_n = 1'b1;
    for (int n = 0; n < LATENCY + 2; n++) begin
      checks++;
      if (out_valid !== 1'b0) begin
        failures++;
        $display("FAIL out_valid high after reset flush");
      end
      issue(4'(0), 1'b0);
    end
    n_flush++;

    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("FAIL %0d vectors never came out", sb.size());
    end

    // Every mechanism must have happened at least once.
    begin
      int counts [9];
      string names [9];
      counts = '{n_latency_ok, n_back_to_back, n_gaps, n_flush, n_s_0000, n_s_0001,
                 n_seen1[0] + n_seen1[1] + n_seen1[2] + n_seen1[3] > 0 ? 1 : 0,
                 (n_seen0[0] > 0 && n_seen0[1] > 0 && n_seen0[2] > 0 && n_seen0[3] > 0) ? 1 : 0,
                 (n_seen1[0] > 0 && n_seen1[1] > 0 && n_seen1[2] > 0 && n_seen1[3] > 0) ? 1 : 0};
      names = '{"one-QCA-clock latency", "back-to-back issue", "input gaps", "reset flush",
                "S=0 for 0000", "S=1 for 0001", "any output high", "every output low",
                "every output high"};
      for (int k = 0; k < 9; k++) begin
        $display("mechanism %-22s %0d", names[k], counts[k]);
        checks++;
        if (counts[k] == 0) begin
          failures++;
          $display("FAIL mechanism never exercised: %s", names[k]);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
