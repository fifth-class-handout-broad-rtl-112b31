// tb_gasp_linear: random test of the linear GasP module's firing rule and
// data copy.
//
// Each cycle drives random predecessor/successor conditions and data, checks
// that fire is exactly "predecessor FULL and successor EMPTY", and checks
// that the data output holds the value proffered at the last fire.
module tb_gasp_linear;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pred_full = 1'b0, succ_empty = 1'b0;
  logic [W-1:0] pred_data = '0;
  logic fire;
  logic [W-1:0] data;
  logic [W-1:0] ref_data = '0;
  int checks = 0, failures = 0, fires = 0;

  always #5 clk = ~clk;

  gasp_linear #(.W(W)) dut (.clk, .rst_n, .pred_full, .pred_data,
                            .succ_empty, .fire, .data);

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
    for (int i = 0; i < 400; i++) begin
      pred_full  = 1'($urandom);
      succ_empty = 1'($urandom);
      pred_data  = W'($urandom);
      #4;
      checks++;
      if (fire !== (pred_full & succ_empty)) begin
        failures++;
        $display("FAIL fire=%0b for pred_full=%0b succ_empty=%0b", fire, pred_full, succ_empty);
      end
      checks++;
      if (data !== ref_data) begin
        failures++;
        $display("FAIL data=%h expected %h", data, ref_data);
      end
      if (pred_full && succ_empty) begin
        ref_data = pred_data;
        fires++;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (fires < 50) begin failures++; $display("FAIL too few fires %0d", fires); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
