// gasp_branch_chain: one parallel branch of a branch/merge FIFO, a chain of
// N linear GasP modules and the N+1 state wires around them.
//
// State wire 0 is filled by the module at the head (head_fire, with its data
// head_data) and drained by linear module 0; wire k is filled by module k-1
// and drained by module k; wire N is drained by the module at the tail
// (tail_fire). head_empty is wire 0 seen from the head, tail_full/tail_data
// are wire N seen from the tail. fire[k] is the fire pulse of module k.
// All wires start EMPTY. N must be at least 1.
module gasp_branch_chain #(
  parameter int unsigned N = 2,
  parameter int unsigned W = gasp_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         head_fire,
  input  logic [W-1:0] head_data,
  output logic         head_empty,
  input  logic         tail_fire,
  output logic         tail_full,
  output logic [W-1:0] tail_data,
  output logic [N-1:0] fire
);
  // wire k: filled by fill_w[k], drained by drain_w[k], carries data_w[k]
  logic [N:0]         fill_w, drain_w, full_w, empty_w;
  logic [N:0][W-1:0]  data_w;

  assign fill_w  = {fire, head_fire};
  assign drain_w = {tail_fire, fire};
  assign data_w[0] = head_data;

  for (genvar k = 0; k <= N; k++) begin : g_wire
    gasp_state_wire u_w (
      .clk, .rst_n, .fill(fill_w[k]), .drain(drain_w[k]),
      .full_seen(full_w[k]), .empty_seen(empty_w[k]));
  end

  for (genvar k = 0; k < N; k++) begin : g_mod
    gasp_linear #(.W(W)) u_m (
      .clk, .rst_n, .pred_full(full_w[k]), .pred_data(data_w[k]),
      .succ_empty(empty_w[k+1]), .fire(fire[k]), .data(data_w[k+1]));
  end

  assign head_empty = empty_w[0];
  assign tail_full  = full_w[N];
  assign tail_data  = data_w[N];

  initial assert (N >= 1) else $error("gasp_branch_chain: N must be at least 1");
endmodule
