// tb_gasp_bdmr: random test of the broad merge GasP module.
//
// Each cycle drives random conditions on predA, predB and succ and random
// data, and checks: fire only when both predecessors are FULL and the
// successor is EMPTY; the data output is {A, B} as proffered at the last
// fire; late_a / late_b name the one missing predecessor.
module tb_gasp_bdmr;
  localparam int WA = 8, WB = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_full = 1'b0, b_full = 1'b0, succ_empty = 1'b0;
  logic [WA-1:0] a_data = '0;
  logic [WB-1:0] b_data = '0;
  logic fire, late_a, late_b;
  logic [WA+WB-1:0] data, ref_data = '0;
  int checks = 0, failures = 0, fires = 0;

  always #5 clk = ~clk;

  gasp_bdmr #(.WA(WA), .WB(WB)) dut (
    .clk, .rst_n, .predA_full(a_full), .predA_data(a_data),
    .predB_full(b_full), .predB_data(b_data), .succ_empty,
    .fire, .data, .late_a, .late_b);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (a=%0b b=%0b s=%0b)", what, a_full, b_full, succ_empty); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      a_full = 1'($urandom); b_full = 1'($urandom); succ_empty = 1'($urandom);
      a_data = WA'($urandom); b_data = WB'($urandom);
      #4;
      check(fire === (a_full && b_full && succ_empty), "fire rule");
      check(late_a === (succ_empty && !a_full && b_full), "late_a");
      check(late_b === (succ_empty && a_full && !b_full), "late_b");
      check(data === ref_data, "data");
      if (a_full && b_full && succ_empty) begin
        ref_data = {a_data, b_data};
        fires++;
      end
      @(posedge clk); #1;
    end
    check(fires > 30, "enough fires");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
