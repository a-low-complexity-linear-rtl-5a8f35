// mimo_core: division-free linear and iterative MIMO-OFDM detector core.
//
// For every OFDM sub-carrier the core receives the vector y of FFT outputs
// from the NR receive chains, the NR x NT channel estimate H and the noise
// variance of each receive antenna, and returns for each of the NT
// transmitted streams an unnormalised symbol estimate z_i = h_i^H P y and
// its reliability ("scale") value scale_i = h_i^H P h_i, where P is a
// scaled inverse of R = Rww + H H^H. The MMSE estimate is z_i / scale_i;
// no division is done inside the core. Modes:
//   in_det = DET_LINEAR,    in_zf = 0   linear MMSE
//   in_det = DET_LINEAR,    in_zf = 1   zero forcing (small fixed variance)
//   in_det = DET_ITERATIVE, in_zf = 0   iterative MMSE with ordering and
//                                       successive cancellation
//   in_det = DET_ITERATIVE, in_zf = 1   iterative ZF
// Each result also carries the hard decision of the slicer for in_mod.
//
// Structure: a state machine (difmad_fsm) sequences operations on a
// datapath (difmad_datapath) built from NR folded complex dot-product units
// (cdot, LANES multipliers each). The core also holds the transmit QAM
// mapper (qam_mapper), which is independent of the detector.
//
// Interface: a sub-carrier is accepted when in_valid and in_ready are both
// high; the core then works alone and offers NT results, one per
// out_valid/out_ready transfer: in stream order in linear mode, in
// detection order (largest scale first) in iterative mode; out_last marks
// the last. in_ready is low from acceptance until the last result is taken.
// Timing at NT = NR = 3, LANES = 1, linear mode: the first result is
// offered 122 cycles after acceptance, about 155 cycles per sub-carrier in
// all. Numbers are cpf_t pseudo-floating point (difmad_pkg).
//
// Following the published architecture: the division-free recursion, the
// estimate/scale-value output pair, the 18-bit mantissa / 6-bit exponent
// format, the split into datapath and state machine, and the QAM mapper on
// the same device. This design's own choices: the handshakes, the
// sequential schedule (which is well short of real-time OFDM rates) and ZF
// as MMSE with a small fixed noise variance.
module mimo_core
  import difmad_pkg::*;
#(
  parameter int NT            = 3,
  parameter int NR            = 3,
  parameter int LANES         = 1,
  parameter int ZF_SIGMA2_EXP = -5
) (
  input  logic              clk,
  input  logic              rst_n,
  // detector input, one sub-carrier per transfer
  input  logic              in_valid,
  output logic              in_ready,
  input  cpf_t              in_y      [NR],
  input  cpf_t              in_h      [NR][NT],
  input  cpf_t              in_sigma2 [NR],
  input  mod_t              in_mod,
  input  det_t              in_det,
  input  logic              in_zf,
  // detector output, one stream per transfer
  output logic              out_valid,
  input  logic              out_ready,
  output logic [IW-1:0]     out_strm,
  output cpf_t              out_z,
  output cpf_t              out_scale,
  output logic signed [3:0] out_dec_re,
  output logic signed [3:0] out_dec_im,
  output logic              out_last,
  output logic              busy,
  // transmit QAM mapper
  input  logic              tx_valid,
  input  mod_t              tx_mod,
  input  logic [5:0]        tx_bits,
  output logic              tx_sym_valid,
  output logic signed [3:0] tx_i,
  output logic signed [3:0] tx_q,
  output cpf_t              tx_sym
);

  ctrl_t         ctrl;
  logic          load, load_p0, res_valid;
  logic [IW-1:0] best;
  logic [NT-1:0] active;
  det_t          det_mode;

  difmad_fsm #(.NT(NT), .NR(NR), .LANES(LANES)) u_fsm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .det_mode (det_mode),
    .res_valid(res_valid),
    .best     (best),
    .active   (active),
    .ctrl     (ctrl),
    .load     (load),
    .load_p0  (load_p0),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_strm (out_strm),
    .out_last (out_last),
    .busy     (busy)
  );

  difmad_datapath #(.NT(NT), .NR(NR), .LANES(LANES), .ZF_SIGMA2_EXP(ZF_SIGMA2_EXP)) u_dp (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (load),
    .in_y      (in_y),
    .in_h      (in_h),
    .in_sigma2 (in_sigma2),
    .in_mod    (in_mod),
    .in_det    (in_det),
    .in_zf     (in_zf),
    .ctrl      (ctrl),
    .load_p0   (load_p0),
    .active    (active),
    .res_valid (res_valid),
    .best      (best),
    .det_mode  (det_mode),
    .out_strm  (out_strm),
    .out_z     (out_z),
    .out_scale (out_scale),
    .out_dec_re(out_dec_re),
    .out_dec_im(out_dec_im)
  );

  qam_mapper u_mapper (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (tx_valid),
    .in_mod   (tx_mod),
    .in_bits  (tx_bits),
    .out_valid(tx_sym_valid),
    .out_i    (tx_i),
    .out_q    (tx_q),
    .out_sym  (tx_sym)
  );

endmodule
