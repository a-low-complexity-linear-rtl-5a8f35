// mimo_e2e_bench: the end-to-end detector test of tb_mimo_core
// (mimo_e2e_body.svh) at any size. It instantiates the core with the given
// NT, NR and LANES, runs NSUB random sub-carriers through all four
// detectors and all modulations against a double-precision reference,
// checks the exact linear-mode latency for its size, and reports its
// counts on its ports, raising done at the end instead of ending the
// simulation. Used by tb_mimo_workloads.
module mimo_e2e_bench
  import difmad_pkg::*;
  import difmad_tb_pkg::*;
#(
  parameter int NT = 3,
  parameter int NR = 3,
  parameter int LANES = 1,
  parameter int NSUB = 120
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam bit STANDALONE = 1'b0;

`include "mimo_e2e_body.svh"

  mimo_core #(.NT(NT), .NR(NR), .LANES(LANES)) dut (.*);

endmodule
