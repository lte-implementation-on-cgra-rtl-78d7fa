// mod_mapper: modulation mapper for one code word (QPSK, 16QAM, 64QAM).
//
// Scrambled bits arrive one per cycle. A small sequencer counts Q_m bits
// (2, 4 or 6, chosen by the modulation order latched at `start`) into a
// shift register, the first bit b(i) becoming the most significant index
// bit. The complete group addresses one of three look-up tables (4, 16 and
// 64 entries) and a multiplexer picks the table of the selected order. The
// tables hold I and Q as Q1.14 words: levels {1}/sqrt(2), {1,3}/sqrt(10) and
// {1,3,5,7}/sqrt(42), in the LTE bit-to-symbol assignment (first bit: sign
// of I, second: sign of Q, the rest: amplitude). The tables are computed at
// elaboration from that rule and rounded to the nearest integer.
//
// Interface: valid/ready on both sides. The symbol is registered: it is
// presented the cycle after its last bit is accepted and held until taken;
// a new bit is accepted in the same cycle the symbol is taken, so the
// mapper sustains one bit per cycle. `start` empties the sequencer and
// latches `mode`. LUT mapping and the run-time order multiplexer follow the
// design's mapper structure; the fixed-point format and handshake are this
// design's choices.
module mod_mapper
  import lte_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  mod_t  mode,
  input  logic  in_valid,
  output logic  in_ready,
  input  logic  in_bit,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_sym
);
  // One table per component and order; unused upper entries stay zero.
  typedef sample_t lut_t [64];

  function automatic sample_t q14(input real v);
    return sample_t'($rtoi($floor(v * 16384.0 + 0.5)));
  endfunction

  // amplitude of a 64QAM component from its two amplitude bits
  function automatic real amp64(input logic hi, input logic lo);
    case ({hi, lo})
      2'b00:   return 3.0;
      2'b01:   return 1.0;
      2'b10:   return 5.0;
      default: return 7.0;
    endcase
  endfunction

  // want_q = 0 builds the I table, 1 the Q table of order m
  function automatic lut_t mk_lut(input mod_t m, input bit want_q);
    lut_t t;
    for (int i = 0; i < 64; i++) begin
      logic [5:0] b;
      real sgn, mag, s;
      b = 6'(i);
      t[i] = '0;
      case (m)
        MOD_QPSK: if (i < 4) begin
          s   = 1.0 / $sqrt(2.0);
          sgn = (want_q ? b[0] : b[1]) ? -1.0 : 1.0;
          t[i] = q14(sgn * s);
        end
        MOD_16QAM: if (i < 16) begin
          s   = 1.0 / $sqrt(10.0);
          sgn = (want_q ? b[2] : b[3]) ? -1.0 : 1.0;
          mag = (want_q ? b[0] : b[1]) ? 3.0 : 1.0;
          t[i] = q14(sgn * mag * s);
        end
        default: begin
          s   = 1.0 / $sqrt(42.0);
          sgn = (want_q ? b[4] : b[5]) ? -1.0 : 1.0;
          mag = want_q ? amp64(b[2], b[0]) : amp64(b[3], b[1]);
          t[i] = q14(sgn * mag * s);
        end
      endcase
    end
    return t;
  endfunction

  localparam lut_t LUT_QPSK_I  = mk_lut(MOD_QPSK, 1'b0);
  localparam lut_t LUT_QPSK_Q  = mk_lut(MOD_QPSK, 1'b1);
  localparam lut_t LUT_16QAM_I = mk_lut(MOD_16QAM, 1'b0);
  localparam lut_t LUT_16QAM_Q = mk_lut(MOD_16QAM, 1'b1);
  localparam lut_t LUT_64QAM_I = mk_lut(MOD_64QAM, 1'b0);
  localparam lut_t LUT_64QAM_Q = mk_lut(MOD_64QAM, 1'b1);

  mod_t       mode_q;
  logic [4:0] shreg;
  logic [2:0] cnt;
  logic [2:0] qm;
  logic [5:0] idx;
  logic       take_bit;
  cplx_t      sym_next;

  assign qm       = 3'(bits_per_sym(mode_q));
  assign in_ready = !out_valid || out_ready;
  assign take_bit = in_valid && in_ready;
  assign idx      = {shreg, in_bit};

  always_comb begin
    case (mode_q)
      MOD_QPSK: begin
        sym_next.re = LUT_QPSK_I[{4'd0, idx[1:0]}];
        sym_next.im = LUT_QPSK_Q[{4'd0, idx[1:0]}];
      end
      MOD_16QAM: begin
        sym_next.re = LUT_16QAM_I[{2'd0, idx[3:0]}];
        sym_next.im = LUT_16QAM_Q[{2'd0, idx[3:0]}];
      end
      default: begin
        sym_next.re = LUT_64QAM_I[idx];
        sym_next.im = LUT_64QAM_Q[idx];
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q    <= MOD_QPSK;
      shreg     <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else if (start) begin
      mode_q    <= mode;
      shreg     <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take_bit) begin
        if (cnt == qm - 3'd1) begin
          out_sym   <= sym_next;
          out_valid <= 1'b1;
          cnt       <= '0;
          shreg     <= '0;
        end else begin
          shreg <= idx[4:0];
          cnt   <= cnt + 3'd1;
        end
      end
    end
  end
endmodule
