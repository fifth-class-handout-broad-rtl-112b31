// gasp_source: GasP source module at the head of a FIFO.
//
// A source has no predecessor: its predecessor condition is always true, so
// it fires whenever its successor state wire is EMPTY, filling that wire with
// a fresh data element. The data elements are a running count 0, 1, 2, ...
// (this design's choice, so that order and loss can be checked downstream).
//
// Interface: succ_empty from the successor wire; fire goes to that wire's
// fill input; data is valid the cycle after fire and held until the next one.
module gasp_source #(
  parameter int unsigned W = gasp_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         succ_empty,
  output logic         fire,
  output logic [W-1:0] data
);
  logic [W-1:0] seq_q;   // value of the next data element

  assign fire = succ_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_q <= '0;
      data  <= '0;
    end else if (fire) begin
      data  <= seq_q;
      seq_q <= seq_q + 1'b1;
    end
  end
endmodule
