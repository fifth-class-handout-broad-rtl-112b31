// gasp_bdbrmr: the three branch/merge GasP FIFOs side by side.
//
// Each FIFO runs on its own (they share only the time base and reset):
//   top    FIFO: branches of 2 and 2 linear modules (balanced, full speed)
//   middle FIFO: branches of 2 and 3 linear modules
//   bottom FIFO: branches of 3 and 6 linear modules
// The comparison shows how unequal branch lengths limit throughput. The
// fire outputs carry every module's fire pulse, numbered as in
// gasp_brmr_fifo (source first, sink last); the sink outputs show the
// elements delivered and the late_* outputs show which input of each broad
// branch and broad merge holds it back. One cycle stands for one gate delay.
module gasp_bdbrmr #(
  parameter int unsigned W = gasp_pkg::DATA_W
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic [9:0]     top_fire,
  output logic [2*W-1:0] top_sink_data,
  output logic [31:0]    top_sink_count,
  output logic [3:0]     top_late,
  output logic [10:0]    mid_fire,
  output logic [2*W-1:0] mid_sink_data,
  output logic [31:0]    mid_sink_count,
  output logic [3:0]     mid_late,
  output logic [14:0]    bot_fire,
  output logic [2*W-1:0] bot_sink_data,
  output logic [31:0]    bot_sink_count,
  output logic [3:0]     bot_late
);
  // late: {branch late A, branch late B, merge late A, merge late B}
  gasp_brmr_fifo #(.N_UP(2), .N_LO(2), .W(W)) u_top (
    .clk, .rst_n, .fire(top_fire), .sink_data(top_sink_data),
    .sink_count(top_sink_count),
    .br_late_a(top_late[3]), .br_late_b(top_late[2]),
    .mr_late_a(top_late[1]), .mr_late_b(top_late[0]));

  gasp_brmr_fifo #(.N_UP(2), .N_LO(3), .W(W)) u_mid (
    .clk, .rst_n, .fire(mid_fire), .sink_data(mid_sink_data),
    .sink_count(mid_sink_count),
    .br_late_a(mid_late[3]), .br_late_b(mid_late[2]),
    .mr_late_a(mid_late[1]), .mr_late_b(mid_late[0]));

  gasp_brmr_fifo #(.N_UP(3), .N_LO(6), .W(W)) u_bot (
    .clk, .rst_n, .fire(bot_fire), .sink_data(bot_sink_data),
    .sink_count(bot_sink_count),
    .br_late_a(bot_late[3]), .br_late_b(bot_late[2]),
    .mr_late_a(bot_late[1]), .mr_late_b(bot_late[0]));
endmodule
