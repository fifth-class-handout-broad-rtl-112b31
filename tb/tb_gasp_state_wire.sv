// tb_gasp_state_wire: checks the delays across one GasP state wire.
//
// Fills and drains the wire at chosen cycles and checks, cycle by cycle, that
// the successor sees FULL exactly FWD_GD cycles after a fill, the predecessor
// sees EMPTY exactly REV_GD cycles after a drain, and each side loses the old
// state the cycle after the change. A second wire starts FULL. Inputs change
// just after a rising edge; outputs are sampled just before the next one.
module tb_gasp_state_wire;
  localparam int F = 6, R = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fill = 1'b0, drain = 1'b0;
  logic full_seen, empty_seen;
  logic fill2 = 1'b0, drain2 = 1'b0;
  logic full_seen2, empty_seen2;
  int   checks = 0, failures = 0;
  int   cyc = 0;

  always #5 clk = ~clk;

  gasp_state_wire #(.FWD_GD(F), .REV_GD(R)) dut (
    .clk, .rst_n, .fill, .drain, .full_seen, .empty_seen);
  gasp_state_wire #(.FWD_GD(F), .REV_GD(R), .INIT_FULL(1'b1)) dut2 (
    .clk, .rst_n, .fill(fill2), .drain(drain2),
    .full_seen(full_seen2), .empty_seen(empty_seen2));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d: %s = %0b, expected %0b", cyc, what, got, exp);
    end
  endtask

  // One cycle: apply inputs, wait until just before the next edge, check.
  task automatic step(input logic f, input logic d,
                      input logic exp_full, input logic exp_empty);
    fill = f; drain = d;
    #8;
    check(full_seen, exp_full, "full_seen");
    check(empty_seen, exp_empty, "empty_seen");
    @(posedge clk); #1;
    cyc++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // idle: EMPTY, visible to both sides
    step(0, 0, 0, 1);
    step(0, 0, 0, 1);
    // fill at cycle 0 of the sequence; full visible at +F, empty gone at +1
    step(1, 0, 0, 1);
    for (int k = 1; k < F; k++) step(0, 0, 0, 0);
    step(0, 0, 1, 0);                  // cycle +F
    step(0, 0, 1, 0);
    // drain now; full gone at +1, empty visible at +R
    step(0, 1, 1, 0);
    for (int k = 1; k < R; k++) step(0, 0, 0, 0);
    step(0, 0, 0, 1);                  // cycle +R
    // fastest cycle: fill, drain as soon as seen, refill as soon as seen
    for (int rep = 0; rep < 3; rep++) begin
      step(1, 0, 0, 1);
      for (int k = 1; k < F; k++) step(0, 0, 0, 0);
      step(0, 1, 1, 0);
      for (int k = 1; k < R; k++) step(0, 0, 0, 0);
    end
    step(0, 0, 0, 1);
    // wire that starts FULL: successor sees it at once
    drain2 = 1'b0;
    checks++;
    if (!(full_seen2 && !empty_seen2)) begin
      failures++; $display("FAIL INIT_FULL wire not FULL after reset");
    end
    drain2 = 1'b1; @(posedge clk); #1; drain2 = 1'b0;
    for (int k = 1; k < R; k++) begin
      #8; checks++;
      if (full_seen2 || empty_seen2) begin
        failures++; $display("FAIL INIT_FULL wire early view at +%0d", k);
      end
      @(posedge clk); #1;
    end
    #8; checks++;
    if (!empty_seen2) begin failures++; $display("FAIL INIT_FULL wire not EMPTY at +R"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
