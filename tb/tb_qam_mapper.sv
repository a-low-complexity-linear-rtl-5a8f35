// tb_qam_mapper: exhaustive test of the transmit QAM mapper.
//
// Every 6-bit input is mapped under all four modulations. The expected
// level per axis is computed from the Gray code of the axis bits (b0 the
// most significant): level = 2 * gray_to_binary(bits) - (M-1). The output
// must appear exactly one cycle after the input, and the cpf_t symbol must
// carry the same value as the integer levels.
module tb_qam_mapper;
  import difmad_pkg::*;
  import difmad_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              iv, ov;
  mod_t              m;
  logic [5:0]        bits;
  logic signed [3:0] oi, oq;
  cpf_t              sym;

  qam_mapper dut (.clk, .rst_n, .in_valid(iv), .in_mod(m), .in_bits(bits),
                  .out_valid(ov), .out_i(oi), .out_q(oq), .out_sym(sym));

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int axis(int v, int first, int nb);
    int g, b;
    g = 0;
    for (int i = 0; i < nb; i++) g = (g << 1) | ((v >> (first + i)) & 1);
    b = g;
    for (int s = 1; s < nb; s++) b = b ^ (g >> s);
    return 2 * b - ((1 << nb) - 1);
  endfunction

  initial begin
    iv = 0; m = MOD_BPSK; bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int mm = 0; mm < 4; mm++) begin
      for (int v = 0; v < 64; v++) begin
        int nb, li, lq;
        @(negedge clk);
        iv = 1'b1; m = mod_t'(mm); bits = 6'(v);
        @(negedge clk);
        iv = 1'b0;
        nb = (mm <= 1) ? 1 : (mm == 2) ? 2 : 3;
        li = axis(v, 0, nb);
        lq = (mm == 0) ? 0 : axis(v, nb, nb);
        checks++;
        if (!ov || int'(oi) != li || int'(oq) != lq ||
            from_cpf(sym).re != real'(li) || from_cpf(sym).im != real'(lq)) begin
          failures++;
          $display("FAIL mod %0d bits %0d: valid %b got %0d,%0d expected %0d,%0d", mm, v, ov, oi, oq, li, lq);
        end
        @(negedge clk);
        checks++;
        if (ov) begin
          failures++;
          $display("FAIL out_valid held for more than one cycle");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
