// tb_gasp_bdbr: random test of the broad branch GasP module.
//
// Each cycle drives random conditions on pred, succA and succB and random
// data, and checks: fire only when the predecessor is FULL and both
// successors are EMPTY; the data output (shared by both successors) is the
// value proffered at the last fire; late_a / late_b name the one successor
// that is not yet EMPTY.
module tb_gasp_bdbr;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic p_full = 1'b0, a_empty = 1'b0, b_empty = 1'b0;
  logic [W-1:0] p_data = '0;
  logic fire, late_a, late_b;
  logic [W-1:0] data, ref_data = '0;
  int checks = 0, failures = 0, fires = 0;

  always #5 clk = ~clk;

  gasp_bdbr #(.W(W)) dut (
    .clk, .rst_n, .pred_full(p_full), .pred_data(p_data),
    .succA_empty(a_empty), .succB_empty(b_empty),
    .fire, .data, .late_a, .late_b);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (p=%0b a=%0b b=%0b)", what, p_full, a_empty, b_empty); end
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
      p_full = 1'($urandom); a_empty = 1'($urandom); b_empty = 1'($urandom);
      p_data = W'($urandom);
      #4;
      check(fire === (p_full && a_empty && b_empty), "fire rule");
      check(late_a === (p_full && !a_empty && b_empty), "late_a");
      check(late_b === (p_full && a_empty && !b_empty), "late_b");
      check(data === ref_data, "data");
      if (p_full && a_empty && b_empty) begin
        ref_data = p_data;
        fires++;
      end
      @(posedge clk); #1;
    end
    check(fires > 30, "enough fires");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
