// gasp_state_wire: one GasP state wire and the delays seen across it.
//
// A GasP state wire carries the FULL (HI) / EMPTY (LO) state of the link
// between two modules. The predecessor's fire pulse fills it (its successor
// driver drives it HI) and the successor's fire pulse drains it (its
// predecessor driver drives it LO). This block lumps the gate delays of both
// modules around the wire into two numbers:
//   * a fill at cycle t is seen by the successor (full_seen) from cycle
//     t+FWD_GD on: the forward latency of one stage;
//   * a drain at cycle t is seen by the predecessor (empty_seen) from cycle
//     t+REV_GD on: the reverse latency of one stage.
// The module that changed the wire stops seeing its old state at once (in the
// circuit its own driver holds the wire and ends its fire pulse), so
// full_seen drops the cycle after a drain and empty_seen the cycle after a
// fill. The two six/four figures come from the linear GasP stage; lumping them
// into the wire, and the one-cycle-per-gate-delay time base, are this
// model's own. Reset puts the wire EMPTY (or FULL with INIT_FULL), already
// visible to both sides.
//
// Ports: fill (predecessor fire), drain (successor fire), full_seen (to the
// successor's AND function), empty_seen (to the predecessor's AND function).
// Assertions check the handshake rules: fill only an EMPTY wire, drain only a
// FULL one.
module gasp_state_wire #(
  parameter int unsigned FWD_GD    = gasp_pkg::FWD_GD,
  parameter int unsigned REV_GD    = gasp_pkg::REV_GD,
  parameter bit          INIT_FULL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fill,
  input  logic drain,
  output logic full_seen,
  output logic empty_seen
);
  // fwd_q[k] is high k+1 cycles after a fill, rev_q[k] k+1 cycles after a drain
  logic [FWD_GD-2:0] fwd_q;
  logic [REV_GD-2:0] rev_q;
  logic              full_q;   // the wire's actual level

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_q      <= '0;
      rev_q      <= '0;
      full_q     <= INIT_FULL;
      full_seen  <= INIT_FULL;
      empty_seen <= !INIT_FULL;
    end else begin
      fwd_q <= (fwd_q << 1) | (FWD_GD-1)'(fill);
      rev_q <= (rev_q << 1) | (REV_GD-1)'(drain);

      if (fill)       full_q <= 1'b1;
      else if (drain) full_q <= 1'b0;

      if (drain)                    full_seen <= 1'b0;
      else if (fwd_q[FWD_GD-2])     full_seen <= 1'b1;
      if (fill)                     empty_seen <= 1'b0;
      else if (rev_q[REV_GD-2])     empty_seen <= 1'b1;
    end
  end

  initial begin
    assert (FWD_GD >= 2 && REV_GD >= 2)
      else $error("gasp_state_wire: latencies below two gate delays are not modelled");
  end

  // Handshake rules of a state wire.
  a_fill_empty: assert property (@(posedge clk) disable iff (!rst_n) fill |-> !full_q)
    else $error("gasp_state_wire: fill of a FULL wire");
  a_drain_full: assert property (@(posedge clk) disable iff (!rst_n) drain |-> full_q)
    else $error("gasp_state_wire: drain of an EMPTY wire");
  a_not_both:   assert property (@(posedge clk) disable iff (!rst_n) !(fill && drain))
    else $error("gasp_state_wire: fill and drain at once");
endmodule
