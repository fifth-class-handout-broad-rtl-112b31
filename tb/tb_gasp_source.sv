// tb_gasp_source: the GasP source fires whenever its successor wire is
// EMPTY and hands out the data elements 0, 1, 2, ... in order.
module tb_gasp_source;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic succ_empty = 1'b0;
  logic fire;
  logic [W-1:0] data;
  logic [W-1:0] ref_data = '0, next_val = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gasp_source #(.W(W)) dut (.clk, .rst_n, .succ_empty, .fire, .data);

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
    for (int i = 0; i < 700; i++) begin
      succ_empty = 1'($urandom);
      #4;
      checks++;
      if (fire !== succ_empty) begin failures++; $display("FAIL fire=%0b succ_empty=%0b", fire, succ_empty); end
      checks++;
      if (data !== ref_data) begin failures++; $display("FAIL data=%0d expected %0d", data, ref_data); end
      if (succ_empty) begin
        ref_data = next_val;
        next_val = next_val + 1'b1;
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
