// qam_mapper: transmit QAM mapper of the MIMO core.
//
// Maps a group of coded bits to one constellation point of BPSK, QPSK,
// 16-QAM or 64-QAM, the four modulations of the system's rate table. The
// bit-to-level mapping is the Gray mapping of IEEE 802.11a: bits b0..b(N/2-1)
// choose the in-phase level and the remaining bits the quadrature level,
// and a per-axis Gray code g maps to level 2*bin(g) - (M-1), with b0 the
// most significant bit of g. in_bits[0] is b0. Levels are the odd integers
// of the receiver's slicer; the per-modulation power normalisation is left
// to the transmit chain that follows, consistent with the receiver, which
// expects it folded into the channel estimate. The mapping table follows the
// standard; the level scaling and the interface are this design's choice.
//
// Timing: one register stage, out_valid follows in_valid by one cycle.
module qam_mapper
  import difmad_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  mod_t              in_mod,
  input  logic [5:0]        in_bits,
  output logic              out_valid,
  output logic signed [3:0] out_i,
  output logic signed [3:0] out_q,
  output cpf_t              out_sym
);

  function automatic logic signed [3:0] lvl2(logic b0);
    return b0 ? 4'sd1 : -4'sd1;
  endfunction

  function automatic logic signed [3:0] lvl4(logic b0, logic b1);
    case ({b0, b1})
      2'b00:   return -4'sd3;
      2'b01:   return -4'sd1;
      2'b11:   return  4'sd1;
      default: return  4'sd3;
    endcase
  endfunction

  function automatic logic signed [3:0] lvl8(logic b0, logic b1, logic b2);
    case ({b0, b1, b2})
      3'b000:  return -4'sd7;
      3'b001:  return -4'sd5;
      3'b011:  return -4'sd3;
      3'b010:  return -4'sd1;
      3'b110:  return  4'sd1;
      3'b111:  return  4'sd3;
      3'b101:  return  4'sd5;
      default: return  4'sd7;
    endcase
  endfunction

  logic signed [3:0] li, lq;
  always_comb begin
    case (in_mod)
      MOD_BPSK:  begin li = lvl2(in_bits[0]);                         lq = 4'sd0; end
      MOD_QPSK:  begin li = lvl2(in_bits[0]);                         lq = lvl2(in_bits[1]); end
      MOD_QAM16: begin li = lvl4(in_bits[0], in_bits[1]);             lq = lvl4(in_bits[2], in_bits[3]); end
      default:   begin li = lvl8(in_bits[0], in_bits[1], in_bits[2]); lq = lvl8(in_bits[3], in_bits[4], in_bits[5]); end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      out_sym   <= CPF_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i      <= li;
        out_q      <= lq;
        // level L as L * 2^(BM-5) * 2^(4-(BM-1)) = L
        out_sym.re <= BM'(li) <<< (BM - 5);
        out_sym.im <= BM'(lq) <<< (BM - 5);
        out_sym.e  <= BE'(4);
      end
    end
  end

endmodule
