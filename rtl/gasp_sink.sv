// gasp_sink: GasP sink module at the tail of a FIFO.
//
// A sink has no successor: its successor condition is always true, so it
// fires whenever its predecessor state wire is FULL, draining the wire and
// copying the data element. The firing rule is that of any GasP module with
// its successor condition tied true; the element counter is this design's
// addition, for observing throughput.
//
// Interface: pred_full/pred_data from the predecessor wire; fire goes to that
// wire's drain input; data and count are valid the cycle after fire.
module gasp_sink #(
  parameter int unsigned W  = gasp_pkg::DATA_W,
  parameter int unsigned CW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pred_full,
  input  logic [W-1:0]  pred_data,
  output logic          fire,
  output logic [W-1:0]  data,
  output logic [CW-1:0] count
);
  assign fire = pred_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data  <= '0;
      count <= '0;
    end else if (fire) begin
      data  <= pred_data;
      count <= count + 1'b1;
    end
  end
endmodule
