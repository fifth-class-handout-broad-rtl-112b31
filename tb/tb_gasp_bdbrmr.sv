// tb_gasp_bdbrmr: end-to-end test of the three branch/merge GasP FIFOs at
// their default sizes.
//
// Numbering follows the fire outputs: in each FIFO fire[0] is the source,
// fire[1] the linear module before the broad branch, fire[2] the branch,
// then the upper and lower branch modules, the broad merge, the linear
// module after it (the throughput probe) and the sink. Expected values are
// worked out from the per-stage latencies F = 6 (forward) and R = 4
// (reverse) gate delays, one cycle per gate delay:
//   * top (2/2): first element from fire[1] to the probe in 5 * F = 30;
//     period F + R = 10; on average (30 / 10 =) 3 elements in that stretch;
//   * middle (2/3): average period ((3+1)F + (2+1)R) / (2+1) = 36/3 = 12;
//   * bottom (3/6): first element from the branch to the merge over the long
//     branch, 7 * F = 42; average period ((6+1)F + (3+1)R) / (3+1) = 58/4
//     = 14.5;
//   * in an unbalanced FIFO the probe fires in bursts: s+1 elements (the
//     bubbles of the short branch) at the full rate F + R, then one longer
//     gap that makes each burst last (l+1)F + (s+1)R: gaps 10,10,16 in the
//     middle FIFO and 10,10,10,28 in the bottom one;
//   * bottom: the merge fires for the second time (F + R) + F + 7F = 58
//     after the first fire[22] pulse;
//   * every sink receives {k, k} as its k-th element.
// It also counts how often each mechanism occurred: broad branch fire,
// broad merge fire, merge waiting on its long (lower) branch, branch waiting
// on its short (upper) branch, full-speed and reduced-speed operation. A
// mechanism that never occurs counts as a failure.
module tb_gasp_bdbrmr;
  localparam int F = 6, R = 4, W = 8;
  localparam int NWARM = 20, NMEAS = 60;  // 60: whole bursts of 3 and of 4
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic [9:0]     top_fire;
  logic [10:0]    mid_fire;
  logic [14:0]    bot_fire;
  logic [2*W-1:0] top_sd, mid_sd, bot_sd;
  logic [31:0]    top_sc, mid_sc, bot_sc;
  logic [3:0]     top_late, mid_late, bot_late;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  gasp_bdbrmr dut (
    .clk, .rst_n,
    .top_fire, .top_sink_data(top_sd), .top_sink_count(top_sc), .top_late,
    .mid_fire, .mid_sink_data(mid_sd), .mid_sink_count(mid_sc), .mid_late,
    .bot_fire, .bot_sink_data(bot_sd), .bot_sink_count(bot_sc), .bot_late);

  function automatic void expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endfunction

  // ---- probe fire times --------------------------------------------------
  int top_first_in = -1, top_first_out = -1;
  int bot_first_br = -1, bot_first_mr = -1, bot_first_in = -1, bot_second_mr = -1;
  int bot_mr_n = 0;
  int top_n = 0, mid_n = 0, bot_n = 0;            // probe fires
  int top_t0, top_t1, mid_t0, mid_t1, bot_t0, bot_t1;
  int mid_last = 0, bot_last = 0;
  int mid_gap10 = 0, mid_gap16 = 0, mid_gap_bad = 0;
  int bot_gap10 = 0, bot_gap28 = 0, bot_gap_bad = 0;
  int top_occ_sum = 0; int top_occ_n = 0; int top_in_n = 0;
  // mechanism counters
  int n_br_fire = 0, n_mr_fire = 0, n_mr_wait_long = 0, n_br_wait_short = 0;
  int n_full_speed = 0, n_slowed = 0;

  always @(negedge clk) if (rst_n) begin
    if (top_fire[1]) begin
      if (top_first_in < 0) top_first_in = cyc;
      top_in_n++;
    end
    if (top_fire[8]) begin
      if (top_first_out < 0) top_first_out = cyc;
      if (top_n == NWARM) top_t0 = cyc;
      if (top_n == NWARM + NMEAS) top_t1 = cyc;
      top_n++;
    end
    if (top_n > NWARM && top_n <= NWARM + NMEAS) begin
      top_occ_sum += top_in_n - top_n;
      top_occ_n++;
    end
    if (bot_fire[2]  && bot_first_br < 0) bot_first_br = cyc;
    if (bot_fire[1]  && bot_first_in < 0) bot_first_in = cyc;
    if (bot_fire[12]) begin
      if (bot_mr_n == 0) bot_first_mr = cyc;
      if (bot_mr_n == 1) bot_second_mr = cyc;
      bot_mr_n++;
    end
    if (mid_fire[9]) begin
      if (mid_n == NWARM) mid_t0 = cyc;
      if (mid_n == NWARM + NMEAS) mid_t1 = cyc;
      if (mid_n > NWARM && mid_n <= NWARM + NMEAS) begin
        if (cyc - mid_last == F + R)      mid_gap10++;
        else if (cyc - mid_last == 16)    mid_gap16++;
        else                              mid_gap_bad++;
      end
      mid_last = cyc;
      mid_n++;
    end
    if (bot_fire[13]) begin
      if (bot_n == NWARM) bot_t0 = cyc;
      if (bot_n == NWARM + NMEAS) bot_t1 = cyc;
      if (bot_n > NWARM && bot_n <= NWARM + NMEAS) begin
        if (cyc - bot_last == F + R)   bot_gap10++;
        else if (cyc - bot_last == 28) bot_gap28++;
        else                           bot_gap_bad++;
      end
      bot_last = cyc;
      bot_n++;
    end
    // mechanisms
    n_br_fire += int'(top_fire[2]) + int'(mid_fire[2]) + int'(bot_fire[2]);
    n_mr_fire += int'(top_fire[7]) + int'(mid_fire[8]) + int'(bot_fire[12]);
    n_mr_wait_long  += int'(mid_late[0]) + int'(bot_late[0]);
    n_br_wait_short += int'(mid_late[3]) + int'(bot_late[3]);
  end

  // ---- sink data ---------------------------------------------------------
  int ts = 0, ms = 0, bs = 0;
  logic [31:0] tp = 0, mp = 0, bp = 0;
  always @(negedge clk) if (rst_n) begin
    if (top_sc != tp) begin expect_eq(int'(top_sd), int'({W'(ts), W'(ts)}), "top sink data"); ts++; tp = top_sc; end
    if (mid_sc != mp) begin expect_eq(int'(mid_sd), int'({W'(ms), W'(ms)}), "middle sink data"); ms++; mp = mid_sc; end
    if (bot_sc != bp) begin expect_eq(int'(bot_sd), int'({W'(bs), W'(bs)}), "bottom sink data"); bs++; bp = bot_sc; end
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
    wait (top_n > NWARM + NMEAS && mid_n > NWARM + NMEAS && bot_n > NWARM + NMEAS);
    @(posedge clk);
    expect_eq(top_first_out - top_first_in, 5 * F, "top: first fire[2] to fire[9]");
    expect_eq(bot_first_mr - bot_first_br, 7 * F, "bottom: first fire[23] to fire[27]");
    // second element: fire[22] refires one full cycle (F + R) after its
    // first pulse, then F to the branch and 7F along the long branch
    expect_eq(bot_second_mr - bot_first_in, (F + R) + F + 7 * F, "bottom: first fire[22] to next fire[27]");
    expect_eq(top_t1 - top_t0, NMEAS * (F + R), "top period over NMEAS");
    expect_eq(mid_t1 - mid_t0, NMEAS * (4 * F + 3 * R) / 3, "middle period over NMEAS");
    expect_eq(bot_t1 - bot_t0, NMEAS * (7 * F + 4 * R) / 4, "bottom period over NMEAS");
    // bursts of s+1 elements at the full rate, then one long gap
    expect_eq(mid_gap10, NMEAS * 2 / 3, "middle gaps of 10");
    expect_eq(mid_gap16, NMEAS / 3, "middle gaps of 36-2*10=16");
    expect_eq(mid_gap_bad, 0, "middle other gaps");
    expect_eq(bot_gap10, NMEAS * 3 / 4, "bottom gaps of 10");
    expect_eq(bot_gap28, NMEAS / 4, "bottom gaps of 58-3*10=28");
    expect_eq(bot_gap_bad, 0, "bottom other gaps");
    // average elements between fire[2] and fire[9] in the top FIFO, x10
    expect_eq(int'((top_occ_sum * 10 + top_occ_n / 2) / top_occ_n), 30, "top occupancy x10");
    $display("top period %0d, middle %0d, bottom %0d cycles per %0d elements",
             top_t1 - top_t0, mid_t1 - mid_t0, bot_t1 - bot_t0, NMEAS);
    n_full_speed = (top_t1 - top_t0 == NMEAS * (F + R)) ? 1 : 0;
    n_slowed     = int'(mid_t1 - mid_t0 > NMEAS * (F + R)) + int'(bot_t1 - bot_t0 > NMEAS * (F + R));
    $display("mechanisms: branch fires %0d, merge fires %0d, merge waits on long branch %0d, branch waits on short branch %0d, full speed %0d, slowed %0d",
             n_br_fire, n_mr_fire, n_mr_wait_long, n_br_wait_short, n_full_speed, n_slowed);
    checks++; if (n_br_fire == 0)       begin failures++; $display("FAIL no broad branch fire"); end
    checks++; if (n_mr_fire == 0)       begin failures++; $display("FAIL no broad merge fire"); end
    checks++; if (n_mr_wait_long == 0)  begin failures++; $display("FAIL merge never waited"); end
    checks++; if (n_br_wait_short == 0) begin failures++; $display("FAIL branch never waited"); end
    checks++; if (n_full_speed == 0)    begin failures++; $display("FAIL no full-speed FIFO"); end
    checks++; if (n_slowed != 2)        begin failures++; $display("FAIL unbalanced FIFOs not slowed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
