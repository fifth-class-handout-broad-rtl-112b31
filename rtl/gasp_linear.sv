// gasp_linear: linear GasP module (one predecessor, one successor).
//
// The module fires when its predecessor state wire is FULL and its successor
// state wire is EMPTY: an AND of the two conditions. Its one-cycle fire pulse
// does three things: it copies the predecessor's data into the module's data
// latch, it drains the predecessor wire (connect fire to that wire's drain)
// and it fills the successor wire (connect fire to that wire's fill). The
// state wires themselves, with the stage's gate delays, are gasp_state_wire
// instances outside this module.
//
// Timing: fire is combinational from pred_full and succ_empty, which come
// from registers in the state wires; data is valid the cycle after fire.
// The firing rule and the three actions follow the GasP module; the latch is
// modelled as an edge-triggered register with reset value zero.
module gasp_linear #(
  parameter int unsigned W = gasp_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pred_full,
  input  logic [W-1:0] pred_data,
  input  logic         succ_empty,
  output logic         fire,
  output logic [W-1:0] data
);
  assign fire = pred_full & succ_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    data <= '0;
    else if (fire) data <= pred_data;
  end
endmodule
