// tb_mimo_core: end-to-end test of the MIMO detector core at its default
// size (NT = NR = 3, LANES = 1), with the core instantiated without a
// parameter list. The test itself is in mimo_e2e_body.svh, which
// mimo_e2e_bench also uses to run other sizes (see tb_mimo_workloads).
//
// Random sub-carriers are generated: a channel H with entries uniform in
// [-1,1] + j[-1,1], symbols from the chosen constellation, small noise and
// per-antenna noise variances. For each sub-carrier the core runs in one of
// its four modes (LMMSE, ZF, iterative MMSE, iterative ZF) and every result
// is compared with a double-precision detector that uses a true matrix
// inverse and true division:
//   - z/scale against the reference estimate h^H R^-1 y / h^H R^-1 h,
//   - scale against the reference up to one positive factor common to all
//     streams of the first stage (the core keeps its inverse unnormalised),
//   - the hard decision against the nearest constellation point,
//   - in iterative mode the detection order (largest scale first).
// Sub-carriers whose reference decision or ordering lies within a small
// margin of a tie are regenerated. The latency of a linear sub-carrier is
// checked against the operation count of the state machine. Output
// back-pressure is applied at random, and the transmit QAM mapper is
// exercised. Each mechanism (each mode, cancellation, re-ordering, each
// modulation, output stall, input held while busy) must occur at least once.
module tb_mimo_core;
  import difmad_pkg::*;
  import difmad_tb_pkg::*;

  localparam int NT = 3;
  localparam int NR = 3;
  localparam int LANES = 1;
  localparam int NSUB = 240;
  localparam bit STANDALONE = 1'b1;

  logic done;
  int   checks, failures;

`include "mimo_e2e_body.svh"

  mimo_core dut (.*);

endmodule
