// tb_gasp_sink: the GasP sink fires whenever its predecessor wire is FULL,
// copies the data element and counts the elements taken.
module tb_gasp_sink;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pred_full = 1'b0;
  logic [W-1:0] pred_data = '0;
  logic fire;
  logic [W-1:0] data, ref_data = '0;
  logic [31:0] count;
  int ref_count = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gasp_sink #(.W(W)) dut (.clk, .rst_n, .pred_full, .pred_data, .fire, .data, .count);

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
    for (int i = 0; i < 500; i++) begin
      pred_full = 1'($urandom);
      pred_data = W'($urandom);
      #4;
      checks++;
      if (fire !== pred_full) begin failures++; $display("FAIL fire=%0b pred_full=%0b", fire, pred_full); end
      checks++;
      if (data !== ref_data || count !== 32'(ref_count)) begin
        failures++; $display("FAIL data=%h/%h count=%0d/%0d", data, ref_data, count, ref_count);
      end
      if (pred_full) begin ref_data = pred_data; ref_count++; end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
