// gasp_pkg: constants shared by the GasP token-flow models.
//
// The GasP modules are modelled on a discrete time base in which one clock
// cycle stands for one gate delay. A fire pulse is a one-cycle high on a
// module's fire output. The forward latency of a stage (fire of one module to
// the earliest fire of its successor) is six gate delays and the reverse
// latency (fire of one module to the earliest refire of its predecessor) is
// four gate delays, as for the linear GasP FIFO stage; a module can therefore
// fire at most once every ten gate delays. The data width is this design's
// own choice: GasP carries any bundled data along with its state wires.
package gasp_pkg;
  localparam int unsigned FWD_GD = 6;  // forward latency per stage, gate delays
  localparam int unsigned REV_GD = 4;  // reverse latency per stage, gate delays
  localparam int unsigned DATA_W = 8;  // data width at a FIFO source
endpackage
