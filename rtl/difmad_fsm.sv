// difmad_fsm: state machine of the division-free MIMO detector core.
//
// It sequences, for one sub-carrier, the dot-product operations that the
// datapath executes on its bank of complex dot-product units:
//
//   ADJ x NR, DET    P0 = adj(Rww) (diagonal), c0 = det(Rww)
//   P0               load P = diag(P0), c = c0
//   per active stream k (division-free matrix-inversion-lemma update):
//     U   u = P h_k
//     D   d = c + h_k^H u
//     P   P = d P - u u^H, one column per operation
//     C   c = c d
//   per active stream i:
//     W   w_i = P h_i
//     ZS  z_i = w_i^H y and scale_i = h_i^H w_i
//
// In linear mode (LMMSE, or ZF when the datapath substitutes a tiny noise
// variance) all NT streams are then emitted in order. In iterative mode the
// stream with the largest scale value among those still active is emitted,
// its hard decision is cancelled from y (CANCEL), the stream is removed
// from the active set and the recursion restarts from P0 with one stream
// fewer, until every stream has been emitted.
//
// Each operation is issued as ceil(terms / LANES) consecutive beats; the
// machine then waits for res_valid from the dot-product bank before it
// moves on, holding ctrl so the datapath can write the result back. The
// sequence of operations follows the detector's equations; its scheduling
// (one operation at a time, no overlap) is this design's choice.
//
// Interface: in_valid/in_ready accept a sub-carrier (load is the accept
// pulse), out_valid/out_ready hand out one stream result per transfer,
// out_last marks a sub-carrier's final result.
module difmad_fsm
  import difmad_pkg::*;
#(
  parameter int NT    = 3,
  parameter int NR    = 3,
  parameter int LANES = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  det_t          det_mode,     // mode of the sub-carrier being processed
  input  logic          res_valid,    // dot-product bank finished an operation
  input  logic [IW-1:0] best,         // active stream with the largest scale value
  output logic [NT-1:0] active,       // streams not yet detected
  output ctrl_t         ctrl,
  output logic          load,
  output logic          load_p0,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [IW-1:0] out_strm,
  output logic          out_last,
  output logic          busy
);

  typedef enum logic [3:0] {
    S_IDLE, S_ADJ, S_DET, S_P0, S_U, S_D, S_P, S_C, S_W, S_ZS, S_PICK, S_EMIT, S_CANCEL
  } state_t;

  state_t        state;
  logic [IW-1:0] k, q, beat;
  logic          waiting;
  op_t           op;
  int            nbeats;

  function automatic logic [IW-1:0] next_active(logic [NT-1:0] m, int from);
    next_active = IW'(NT);
    for (int j = NT - 1; j >= 0; j--)
      if (j >= from && m[j]) next_active = IW'(j);
  endfunction

  always_comb begin
    case (state)
      S_ADJ:    op = OP_ADJ;
      S_DET:    op = OP_DET;
      S_U:      op = OP_U;
      S_D:      op = OP_D;
      S_P:      op = OP_P;
      S_C:      op = OP_C;
      S_W:      op = OP_W;
      S_ZS:     op = OP_ZS;
      S_CANCEL: op = OP_CANCEL;
      default:  op = OP_NONE;
    endcase
    nbeats     = (op_terms(op, NR) + LANES - 1) / LANES;
    ctrl.op    = op;
    ctrl.issue = (op != OP_NONE) && !waiting;
    ctrl.first = ctrl.issue && (beat == 0);
    ctrl.last  = ctrl.issue && (int'(beat) == nbeats - 1);
    ctrl.strm  = k;
    ctrl.idx   = q;
    ctrl.beat  = beat;
    in_ready   = (state == S_IDLE);
    load       = in_valid && in_ready;
    load_p0    = (state == S_P0);
    out_valid  = (state == S_EMIT);
    out_strm   = k;
    out_last   = (det_mode == DET_LINEAR) ? (int'(k) == NT - 1) : ($countones(active) == 1);
    busy       = (state != S_IDLE);
  end

  logic [IW-1:0] nxt;
  assign nxt = next_active(active, int'(k) + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      active  <= '0;
      k       <= '0;
      q       <= '0;
      beat    <= '0;
      waiting <= 1'b0;
    end else begin
      // beat issue within an operation
      if (ctrl.issue) begin
        if (ctrl.last) begin
          waiting <= 1'b1;
          beat    <= '0;
        end else begin
          beat <= beat + 1'b1;
        end
      end
      if (waiting && res_valid) waiting <= 1'b0;

      case (state)
        S_IDLE: if (in_valid) begin
          active <= '1;
          q      <= '0;
          state  <= S_ADJ;
        end
        S_ADJ: if (waiting && res_valid) begin
          if (int'(q) == NR - 1) state <= S_DET;
          else q <= q + 1'b1;
        end
        S_DET: if (waiting && res_valid) state <= S_P0;
        S_P0: begin
          k     <= next_active(active, 0);
          state <= S_U;
        end
        S_U: if (waiting && res_valid) state <= S_D;
        S_D: if (waiting && res_valid) begin
          q     <= '0;
          state <= S_P;
        end
        S_P: if (waiting && res_valid) begin
          if (int'(q) == NR - 1) state <= S_C;
          else q <= q + 1'b1;
        end
        S_C: if (waiting && res_valid) begin
          if (int'(nxt) < NT) begin
            k     <= nxt;
            state <= S_U;
          end else begin
            k     <= next_active(active, 0);
            state <= S_W;
          end
        end
        S_W: if (waiting && res_valid) state <= S_ZS;
        S_ZS: if (waiting && res_valid) begin
          if (int'(nxt) < NT) begin
            k     <= nxt;
            state <= S_W;
          end else if (det_mode == DET_LINEAR) begin
            k     <= '0;
            state <= S_EMIT;
          end else begin
            state <= S_PICK;
          end
        end
        S_PICK: begin
          k     <= best;
          state <= S_EMIT;
        end
        S_EMIT: if (out_ready) begin
          if (det_mode == DET_LINEAR) begin
            if (int'(k) == NT - 1) state <= S_IDLE;
            else k <= k + 1'b1;
          end else if ($countones(active) == 1) begin
            active <= '0;
            state  <= S_IDLE;
          end else begin
            state <= S_CANCEL;
          end
        end
        S_CANCEL: if (waiting && res_valid) begin
          active <= active & ~(NT'(1) << k);
          state     <= S_P0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
