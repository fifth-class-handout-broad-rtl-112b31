// gasp_bdbr: broad branch GasP module (one predecessor, two successors).
//
// The broad branch fires only when its predecessor wire is FULL and both of
// its successor wires, succA and succB, are EMPTY: a three-input AND. The
// circuit avoids a three-input gate by spreading the AND over two stages of
// amplification, with the two successor wires on the symmetric inputs of a
// two-input gate; here that is a NOR of the two "successor FULL" levels,
// then an AND with the predecessor condition. The fire pulse drains the
// predecessor wire, fills both successor wires (two independent successor
// drivers) and copies the data once; both successors read the same copy, so
// each receives a duplicate of every data element (broadcast).
//
// Interface: pred_full/pred_data from the predecessor wire, succA_empty and
// succB_empty from the two successor wires; fire goes to the drain input of
// the predecessor wire and the fill inputs of both successor wires.
// late_a / late_b say, while the predecessor is FULL, which successor is
// still not EMPTY. Timing: fire is combinational; data is valid the cycle
// after fire.
module gasp_bdbr #(
  parameter int unsigned W = gasp_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pred_full,
  input  logic [W-1:0] pred_data,
  input  logic         succA_empty,
  input  logic         succB_empty,
  output logic         fire,
  output logic [W-1:0] data,
  output logic         late_a,
  output logic         late_b
);
  // first stage: both successors EMPTY (NOR of their FULL levels)
  logic succs_empty;
  assign succs_empty = !(!succA_empty || !succB_empty);
  // second stage: AND with the predecessor condition
  assign fire = succs_empty && pred_full;

  assign late_a = pred_full && !succA_empty && succB_empty;
  assign late_b = pred_full && succA_empty && !succB_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    data <= '0;
    else if (fire) data <= pred_data;
  end
endmodule
