// tb_mimo_workloads: end-to-end tests of the detector core at the other
// configurations the architecture is evaluated in.
//
// Three instances of the end-to-end bench (mimo_e2e_bench) run side by
// side, each with its own core, random sub-carriers, double-precision
// reference and mechanism counters:
//   - 2x3 (two transmit streams, three receive antennas), the configuration
//     of the 108 Mb/s precision and error-rate study,
//   - 2x2, the configuration compared with 2x3 in the over-the-air trials,
//   - 3x3 with LANES = 3, the unfolded dot-product unit that finishes a
//     3-term dot product in one cycle (the 20 MHz variant).
// Each instance checks its exact linear-mode latency for its own size. The
// checks and failures of all three are summed; a watchdog ends the run.
module tb_mimo_workloads;

  logic done23, done22, done33;
  int   c23, c22, c33, f23, f22, f33;

  mimo_e2e_bench #(.NT(2), .NR(3), .LANES(1), .NSUB(120)) u_2x3 (
    .done(done23), .checks(c23), .failures(f23));
  mimo_e2e_bench #(.NT(2), .NR(2), .LANES(1), .NSUB(120)) u_2x2 (
    .done(done22), .checks(c22), .failures(f22));
  mimo_e2e_bench #(.NT(3), .NR(3), .LANES(3), .NSUB(120)) u_3x3_l3 (
    .done(done33), .checks(c33), .failures(f33));

  int checks, failures;

  initial begin
    #(10 * 400000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c23 + c22 + c33, f23 + f22 + f33 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done23 && done22 && done33);
    checks   = c23 + c22 + c33;
    failures = f23 + f22 + f33;
    $display("2x3: checks %0d failures %0d", c23, f23);
    $display("2x2: checks %0d failures %0d", c22, f22);
    $display("3x3 LANES=3: checks %0d failures %0d", c33, f33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
