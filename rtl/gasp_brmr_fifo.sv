// gasp_brmr_fifo: a GasP FIFO that splits into two parallel branches and
// joins them again.
//
// Chain of modules, left to right:
//   source -> linear -> broad branch =>  upper branch: N_UP linear modules  => broad merge -> linear -> sink
//                                    =>  lower branch: N_LO linear modules  =>
// Every arrow is a gasp_state_wire. The broad branch hands a duplicate of each
// data element to both branches; the broad merge waits for the element on
// both branches and concatenates the two copies, {upper, lower}, so the data
// width doubles after the merge. The module chain and the branch lengths
// follow the FIFOs studied with these modules; the start state (all state
// wires EMPTY), the concatenation and the upper-branch-to-input-A wiring are
// this design's choices.
//
// With equal branches the FIFO runs at the full rate of one element per
// FWD_GD+REV_GD gate delays. When the branches differ in length the
// throughput drops: the broad merge must wait for the element on the longer
// branch (forward latency), while the shorter branch must wait for the merge
// to empty it before the broad branch can fire again (reverse latency), and
// the shorter branch holds too few bubbles to cover the difference.
//
// Outputs: fire[] holds the fire pulse of every module, numbered in the order
//   0 source, 1 linear, 2 broad branch, 3 .. 2+N_UP upper branch,
//   3+N_UP .. 2+N_UP+N_LO lower branch, then broad merge, linear, sink.
// sink_data/sink_count are the sink's last element and element count;
// mr_late_a/b and br_late_a/b are the "which input is late" signals of the
// broad merge and broad branch. Time base: one cycle per gate delay.
module gasp_brmr_fifo #(
  parameter int unsigned N_UP = 2,
  parameter int unsigned N_LO = 2,
  parameter int unsigned W    = gasp_pkg::DATA_W,
  localparam int unsigned NF  = N_UP + N_LO + 6
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic [NF-1:0]  fire,
  output logic [2*W-1:0] sink_data,
  output logic [31:0]    sink_count,
  output logic           br_late_a,
  output logic           br_late_b,
  output logic           mr_late_a,
  output logic           mr_late_b
);
  localparam int unsigned I_BR  = 2;
  localparam int unsigned I_UP  = 3;
  localparam int unsigned I_LO  = 3 + N_UP;
  localparam int unsigned I_MR  = 3 + N_UP + N_LO;

  // ---- source -> linear -> broad branch -------------------------------
  logic         src_fire, lin_in_fire, br_fire;
  logic [W-1:0] src_data, lin_in_data, br_data;
  logic         w0_full, w0_empty, w1_full, w1_empty;

  gasp_source #(.W(W)) u_src (
    .clk, .rst_n, .succ_empty(w0_empty), .fire(src_fire), .data(src_data));

  gasp_state_wire u_w0 (
    .clk, .rst_n, .fill(src_fire), .drain(lin_in_fire),
    .full_seen(w0_full), .empty_seen(w0_empty));

  gasp_linear #(.W(W)) u_lin_in (
    .clk, .rst_n, .pred_full(w0_full), .pred_data(src_data),
    .succ_empty(w1_empty), .fire(lin_in_fire), .data(lin_in_data));

  gasp_state_wire u_w1 (
    .clk, .rst_n, .fill(lin_in_fire), .drain(br_fire),
    .full_seen(w1_full), .empty_seen(w1_empty));

  logic up_first_empty, lo_first_empty;

  gasp_bdbr #(.W(W)) u_br (
    .clk, .rst_n, .pred_full(w1_full), .pred_data(lin_in_data),
    .succA_empty(up_first_empty), .succB_empty(lo_first_empty),
    .fire(br_fire), .data(br_data), .late_a(br_late_a), .late_b(br_late_b));

  // ---- the two parallel branches -------------------------------------
  logic         mr_fire;
  logic         up_last_full, lo_last_full;
  logic [W-1:0] up_last_data, lo_last_data;
  logic [N_UP-1:0] up_fire;
  logic [N_LO-1:0] lo_fire;

  gasp_branch_chain #(.N(N_UP), .W(W)) u_up (
    .clk, .rst_n, .head_fire(br_fire), .head_data(br_data),
    .head_empty(up_first_empty), .tail_fire(mr_fire),
    .tail_full(up_last_full), .tail_data(up_last_data), .fire(up_fire));

  gasp_branch_chain #(.N(N_LO), .W(W)) u_lo (
    .clk, .rst_n, .head_fire(br_fire), .head_data(br_data),
    .head_empty(lo_first_empty), .tail_fire(mr_fire),
    .tail_full(lo_last_full), .tail_data(lo_last_data), .fire(lo_fire));

  // ---- broad merge -> linear -> sink ----------------------------------
  logic [2*W-1:0] mr_data, lin_out_data;
  logic           lin_out_fire, snk_fire;
  logic           w2_full, w2_empty, w3_full, w3_empty;

  gasp_bdmr #(.WA(W), .WB(W)) u_mr (
    .clk, .rst_n, .predA_full(up_last_full), .predA_data(up_last_data),
    .predB_full(lo_last_full), .predB_data(lo_last_data),
    .succ_empty(w2_empty), .fire(mr_fire), .data(mr_data),
    .late_a(mr_late_a), .late_b(mr_late_b));

  gasp_state_wire u_w2 (
    .clk, .rst_n, .fill(mr_fire), .drain(lin_out_fire),
    .full_seen(w2_full), .empty_seen(w2_empty));

  gasp_linear #(.W(2*W)) u_lin_out (
    .clk, .rst_n, .pred_full(w2_full), .pred_data(mr_data),
    .succ_empty(w3_empty), .fire(lin_out_fire), .data(lin_out_data));

  gasp_state_wire u_w3 (
    .clk, .rst_n, .fill(lin_out_fire), .drain(snk_fire),
    .full_seen(w3_full), .empty_seen(w3_empty));

  gasp_sink #(.W(2*W)) u_snk (
    .clk, .rst_n, .pred_full(w3_full), .pred_data(lin_out_data),
    .fire(snk_fire), .data(sink_data), .count(sink_count));

  // ---- fire pulses out -------------------------------------------------
  always_comb begin
    fire            = '0;
    fire[0]         = src_fire;
    fire[1]         = lin_in_fire;
    fire[I_BR]      = br_fire;
    fire[I_UP +: N_UP] = up_fire;
    fire[I_LO +: N_LO] = lo_fire;
    fire[I_MR]      = mr_fire;
    fire[I_MR+1]    = lin_out_fire;
    fire[I_MR+2]    = snk_fire;
  end
endmodule
