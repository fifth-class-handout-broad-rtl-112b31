// gasp_bdmr: broad merge GasP module (two predecessors, one successor).
//
// The broad merge fires only when three conditions hold together: both
// predecessor state wires, predA and predB, are FULL and the successor wire
// is EMPTY. In the circuit the inverter that normally senses the predecessor
// wire is replaced by a symmetric two-input NAND of predA and predB, so the
// two inputs are treated alike. The fire pulse drains both predecessor wires
// (two independent predecessor drivers), fills the single successor wire and
// copies the data of both predecessors. This model combines the two data
// inputs by concatenation, {A, B}, one of the uses the design names (pairs of
// operands for a binary operation are the other).
//
// Interface: predA_full/predA_data, predB_full/predB_data from the two
// predecessor state wires, succ_empty from the successor wire; fire goes to
// the drain input of both predecessor wires and the fill input of the
// successor wire. late_a / late_b say, while the module waits with an EMPTY
// successor, which predecessor input is still missing.
// Timing: fire is combinational; data is valid the cycle after fire.
module gasp_bdmr #(
  parameter int unsigned WA = gasp_pkg::DATA_W,
  parameter int unsigned WB = gasp_pkg::DATA_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            predA_full,
  input  logic [WA-1:0]   predA_data,
  input  logic            predB_full,
  input  logic [WB-1:0]   predB_data,
  input  logic            succ_empty,
  output logic            fire,
  output logic [WA+WB-1:0] data,
  output logic            late_a,
  output logic            late_b
);
  // NAND of the two predecessors, then AND with the successor condition
  logic preds_nand;
  assign preds_nand = !(predA_full && predB_full);
  assign fire       = !preds_nand && succ_empty;

  assign late_a = succ_empty && !predA_full && predB_full;
  assign late_b = succ_empty && predA_full && !predB_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    data <= '0;
    else if (fire) data <= {predA_data, predB_data};
  end
endmodule
