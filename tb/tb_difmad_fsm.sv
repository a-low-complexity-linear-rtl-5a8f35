// tb_difmad_fsm: self-checking test of the detector state machine.
//
// The state machine runs alone against a model of the dot-product bank
// that answers every operation with res_valid on the second clock edge
// after its last beat. The model also plays the ordering logic: it reports
// as "best" the highest-numbered active stream, so iterative mode must
// detect the streams in the order NT-1, ..., 0. For linear and iterative
// runs, with LANES = 1 and LANES = 3, the testbench checks
//   - how often each operation is issued (ADJ NR times, DET once; per pass
//     over m active streams: U, D, C, W, ZS m times and P m*NR times;
//     CANCEL once per stream but the last),
//   - the number of beats of every operation, ceil(terms / LANES),
//   - that update and output operations visit only active streams,
//   - the order of the emitted streams and out_last,
//   - the total cycle count of a run against the sum over its operations.
module tb_difmad_fsm;
  import difmad_pkg::*;

  localparam int NT = 3;
  localparam int NR = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #(10 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two instances: folded (LANES = 1) and unfolded (LANES = 3)
  logic          in_valid [2], in_ready [2], res_valid [2], load [2], load_p0 [2];
  logic          out_valid [2], out_ready [2], out_last [2], busy [2];
  det_t          det_mode [2];
  logic [IW-1:0] best [2], out_strm [2];
  logic [NT-1:0] active [2];
  ctrl_t         ctrl [2];

  difmad_fsm #(.NT(NT), .NR(NR), .LANES(1)) dut1 (
    .clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]), .det_mode(det_mode[0]),
    .res_valid(res_valid[0]), .best(best[0]), .active(active[0]), .ctrl(ctrl[0]), .load(load[0]),
    .load_p0(load_p0[0]), .out_valid(out_valid[0]), .out_ready(out_ready[0]),
    .out_strm(out_strm[0]), .out_last(out_last[0]), .busy(busy[0]));
  difmad_fsm #(.NT(NT), .NR(NR), .LANES(3)) dut3 (
    .clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]), .det_mode(det_mode[1]),
    .res_valid(res_valid[1]), .best(best[1]), .active(active[1]), .ctrl(ctrl[1]), .load(load[1]),
    .load_p0(load_p0[1]), .out_valid(out_valid[1]), .out_ready(out_ready[1]),
    .out_strm(out_strm[1]), .out_last(out_last[1]), .busy(busy[1]));

  // dot-product bank model and ordering model
  for (genvar u = 0; u < 2; u++) begin : g_model
    logic d1, d2;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin d1 <= 0; d2 <= 0; end
      else begin d1 <= ctrl[u].issue && ctrl[u].last; d2 <= d1; end
    assign res_valid[u] = d2;
    always_comb begin
      best[u] = '0;
      for (int i = 0; i < NT; i++) if (active[u][i]) best[u] = IW'(i);
    end
  end

  function automatic int terms(op_t op);
    return op_terms(op, NR);
  endfunction

  task automatic run(int u, int lanes, det_t d);
    int cnt [16];
    int beats, t0, t_end, expect_cycles, nout;
    op_t cur;
    int  cur_beats;
    for (int i = 0; i < 16; i++) cnt[i] = 0;
    @(negedge clk);
    det_mode[u] = d;
    in_valid[u] = 1'b1;
    @(posedge clk);
    t0 = cycle;
    #1;
    in_valid[u] = 1'b0;
    nout = 0;
    cur_beats = 0;
    expect_cycles = 1;   // accepting cycle
    while (nout < NT) begin
      @(posedge clk);
      if (ctrl[u].issue) begin
        if (ctrl[u].first) begin
          cur = ctrl[u].op;
          cur_beats = 0;
        end
        check(ctrl[u].op == cur, "op changed within an operation");
        cur_beats++;
        if (ctrl[u].last) begin
          check(cur_beats == (terms(cur) + lanes - 1) / lanes,
                $sformatf("lanes %0d op %s: %0d beats", lanes, cur.name(), cur_beats));
          cnt[int'(cur)]++;
          expect_cycles += cur_beats + 2;
          if (cur inside {OP_U, OP_D, OP_P, OP_C, OP_W, OP_ZS, OP_CANCEL})
            check(active[u][ctrl[u].strm[1:0]], "operation on an inactive stream");
        end
      end
      if (load_p0[u]) expect_cycles++;
      if (out_valid[u] && out_ready[u]) begin
        int exp_s;
        exp_s = (d == DET_LINEAR) ? nout : NT - 1 - nout;
        check(int'(out_strm[u]) == exp_s, $sformatf("lanes %0d emitted stream %0d expected %0d",
                                                    lanes, out_strm[u], exp_s));
        check(out_last[u] == (nout == NT - 1), "out_last");
        if (d == DET_ITERATIVE) expect_cycles += 2;   // PICK and EMIT
        nout++;
      end
    end
    t_end = cycle;
    if (d == DET_LINEAR) expect_cycles += NT;
    check(t_end - t0 + 1 == expect_cycles,
          $sformatf("lanes %0d mode %0d: %0d cycles, expected %0d", lanes, d, t_end - t0 + 1, expect_cycles));
    check(cnt[int'(OP_ADJ)] == NR && cnt[int'(OP_DET)] == 1, "ADJ/DET count");
    if (d == DET_LINEAR) begin
      check(cnt[int'(OP_U)] == NT && cnt[int'(OP_D)] == NT && cnt[int'(OP_C)] == NT &&
            cnt[int'(OP_P)] == NT * NR && cnt[int'(OP_W)] == NT && cnt[int'(OP_ZS)] == NT &&
            cnt[int'(OP_CANCEL)] == 0, "linear operation counts");
    end else begin
      int ntri;
      ntri = NT * (NT + 1) / 2;
      check(cnt[int'(OP_U)] == ntri && cnt[int'(OP_D)] == ntri && cnt[int'(OP_C)] == ntri &&
            cnt[int'(OP_P)] == ntri * NR && cnt[int'(OP_W)] == ntri && cnt[int'(OP_ZS)] == ntri &&
            cnt[int'(OP_CANCEL)] == NT - 1, "iterative operation counts");
    end
    @(posedge clk);
    #1;
    check(in_ready[u] && !busy[u], "idle after run");
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin
      in_valid[u] = 1'b0;
      out_ready[u] = 1'b1;
      det_mode[u] = DET_LINEAR;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run(0, 1, DET_LINEAR);
    run(0, 1, DET_ITERATIVE);
    run(1, 3, DET_LINEAR);
    run(1, 3, DET_ITERATIVE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
