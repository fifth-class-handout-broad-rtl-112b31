// tb_gasp_brmr_fifo: end-to-end test of the branch/merge GasP FIFO.
//
// Two FIFOs are simulated: the balanced default (branches of 2 and 2
// modules) and a strongly unbalanced one (1 and 4). For each the test checks,
// against numbers worked out from the stage latencies (forward F = 6,
// reverse R = 4 gate delays):
//   * first-element latency from the linear module before the branch to the
//     linear module after the merge: (longer branch + 3) * F;
//   * steady-state period at the sink: the larger of F + R and
//     ((l + 1) * F + (s + 1) * R) / (s + 1) for branch lengths s <= l
//     (the slowest loop: forward along the long branch, back along the
//     short one, which holds s + 1 bubbles);
//   * data order: the k-th element at the sink is {k, k}, with no loss.
module tb_gasp_brmr_fifo;
  localparam int F = 6, R = 4, W = 8;
  localparam int NMEAS = 40;   // intervals measured for the period
  localparam int NWARM = 20;   // elements skipped before measuring
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // ---- FIFO A: balanced 2 / 2 (module defaults) -------------------------
  localparam int NFA = 10;
  logic [NFA-1:0] fire_a;
  logic [2*W-1:0] sdata_a;
  logic [31:0]    scount_a;
  logic [3:0]     late_a;
  gasp_brmr_fifo dut_a (
    .clk, .rst_n, .fire(fire_a), .sink_data(sdata_a), .sink_count(scount_a),
    .br_late_a(late_a[3]), .br_late_b(late_a[2]),
    .mr_late_a(late_a[1]), .mr_late_b(late_a[0]));

  // ---- FIFO B: unbalanced 1 / 4 ------------------------------------------
  localparam int NFB = 11;
  logic [NFB-1:0] fire_b;
  logic [2*W-1:0] sdata_b;
  logic [31:0]    scount_b;
  logic [3:0]     late_b;
  gasp_brmr_fifo #(.N_UP(1), .N_LO(4), .W(W)) dut_b (
    .clk, .rst_n, .fire(fire_b), .sink_data(sdata_b), .sink_count(scount_b),
    .br_late_a(late_b[3]), .br_late_b(late_b[2]),
    .mr_late_a(late_b[1]), .mr_late_b(late_b[0]));

  // Per-FIFO observation: first fire times and sink fire times.
  int a_first_in = -1, a_first_out = -1, a_nsink = 0;
  int b_first_in = -1, b_first_out = -1, b_nsink = 0;
  int a_t0 = 0, a_t1 = 0, b_t0 = 0, b_t1 = 0;
  int a_mr_late = 0, b_mr_late_b = 0, b_br_late_a = 0;

  function automatic void expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (fire_a[1] && a_first_in < 0)      a_first_in  = cyc;
    if (fire_a[NFA-2] && a_first_out < 0) a_first_out = cyc;
    if (fire_b[1] && b_first_in < 0)      b_first_in  = cyc;
    if (fire_b[NFB-2] && b_first_out < 0) b_first_out = cyc;
    if (late_a[1] || late_a[0]) a_mr_late++;
    if (late_b[0]) b_mr_late_b++;
    if (late_b[3]) b_br_late_a++;
    if (fire_a[NFA-1]) begin
      if (a_nsink == NWARM)         a_t0 = cyc;
      if (a_nsink == NWARM + NMEAS) a_t1 = cyc;
      a_nsink++;
    end
    if (fire_b[NFB-1]) begin
      if (b_nsink == NWARM)         b_t0 = cyc;
      if (b_nsink == NWARM + NMEAS) b_t1 = cyc;
      b_nsink++;
    end
  end

  // data delivered by the sinks: element k is {k, k}
  int a_seen = 0, b_seen = 0;
  logic [31:0] a_prev = 0, b_prev = 0;
  always @(negedge clk) if (rst_n) begin
    if (scount_a != a_prev) begin
      expect_eq(int'(sdata_a), int'({W'(a_seen), W'(a_seen)}), "balanced sink data");
      a_seen++; a_prev = scount_a;
    end
    if (scount_b != b_prev) begin
      expect_eq(int'(sdata_b), int'({W'(b_seen), W'(b_seen)}), "unbalanced sink data");
      b_seen++; b_prev = scount_b;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (a_nsink > NWARM + NMEAS && b_nsink > NWARM + NMEAS);
    @(posedge clk);
    // latency: linear-in, branch, l modules, merge, linear-out = l + 3 hops
    expect_eq(a_first_out - a_first_in, (2 + 3) * F, "balanced first latency");
    expect_eq(b_first_out - b_first_in, (4 + 3) * F, "unbalanced first latency");
    // periods: balanced F+R = 10; unbalanced ((4+1)F + (1+1)R)/(1+1) = 19
    expect_eq(a_t1 - a_t0, NMEAS * (F + R), "balanced period x40");
    expect_eq(b_t1 - b_t0, NMEAS * ((5 * F + 2 * R) / 2), "unbalanced period x40");
    $display("periods: balanced %0d/%0d, unbalanced %0d/%0d cycles per element",
             a_t1 - a_t0, NMEAS, b_t1 - b_t0, NMEAS);
    // the unbalanced FIFO must show its merge waiting for the long branch
    // and its branch waiting for the short one; the balanced one neither
    checks++;
    if (b_mr_late_b == 0 || b_br_late_a == 0) begin
      failures++; $display("FAIL unbalanced FIFO never waited at merge/branch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
