// ifft: in-place radix-2 inverse FFT, size N = 2^log2n chosen at run time
// (N = 128 ... 2^LOG2N_MAX), for the OFDM signal generation of one antenna.
//
// Computes x(n) = (1/N) * sum_k X(k) exp(+j*2*pi*k*n/N).
// Three phases, one sample memory of 2^LOG2N_MAX complex words:
//   LOAD : N frequency-domain inputs are written at bit-reversed addresses
//          (N cycles when the input never stalls).
//   CALC : log2n decimation-in-time stages of N/2 butterflies, one butterfly
//          per cycle (log2n*N/2 cycles). Stage s pairs words m = 2^s apart:
//            t  = W * b,  W = exp(+j*2*pi*p/(2m)), p = position in group
//            a' = (a + t) / 2,  b' = (a - t) / 2
//          Halving in every stage gives the 1/N scale and keeps the 16-bit
//          words from overflowing; each result is rounded half up and
//          saturated.
//   OUT  : the N time-domain samples leave in natural order (N cycles when
//          the output never stalls).
// The twiddle factors are a half-period table of 2^(LOG2N_MAX-1)
// cosine and sine words in Q1.14, computed at elaboration as
// round(16384*cos(2*pi*t/2^LOG2N_MAX)) and likewise for sine; a smaller N
// reads every 2^(LOG2N_MAX-log2n)-th entry.
// Interface: `start` latches log2n and begins LOAD; input and output are
// valid/ready streams. The default size (2048) is the largest LTE FFT; the
// 1536-point size of the 15 MHz bandwidth is not a power of two and is not
// supported. The radix-2 structure, scaling and fixed-point format are
// this design's choices; the IFFT function and the sizes follow the design.
module ifft
  import lte_pkg::*;
#(
  parameter int unsigned LOG2N_MAX = 11
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] log2n,
  input  logic       in_valid,
  output logic       in_ready,
  input  cplx_t      in_bin,
  output logic       out_valid,
  input  logic       out_ready,
  output cplx_t      out_smp
);
  localparam int unsigned NMAX = 1 << LOG2N_MAX;
  localparam int unsigned AW   = LOG2N_MAX;

  typedef sample_t tw_t [NMAX/2];
  typedef enum logic [1:0] {S_OFF, S_LOAD, S_CALC, S_OUT} state_t;

  function automatic tw_t mk_tw(input bit want_sin);
    tw_t t;
    for (int i = 0; i < int'(NMAX / 2); i++) begin
      real ang = 2.0 * 3.14159265358979323846 * real'(i) / real'(NMAX);
      t[i] = sample_t'($rtoi($floor((want_sin ? $sin(ang) : $cos(ang)) * 16384.0 + 0.5)));
    end
    return t;
  endfunction

  localparam tw_t TW_COS = mk_tw(1'b0);
  localparam tw_t TW_SIN = mk_tw(1'b1);

  cplx_t  mem [NMAX];
  state_t state;
  logic [3:0]    log2n_q;
  logic [3:0]    stage;
  logic [AW:0]   cnt;        // sample counter for LOAD and OUT
  logic [AW-1:0] bfly;       // butterfly counter within a stage
  logic [AW:0]   n_pts;
  logic [AW-1:0] m, pos, grp, i0, i1;
  logic [AW-2:0] tw_idx;     // pos < NMAX/2, so one bit less
  logic [AW-1:0] rev_addr;
  cplx_t a, b, a_new, b_new;
  logic signed [39:0] t_re, t_im;
  logic          last_bfly;

  assign n_pts     = (AW+1)'(1) << log2n_q;
  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_smp   = mem[cnt[AW-1:0]];
  assign last_bfly = (bfly == AW'((n_pts >> 1) - 1'b1));

  // bit-reversed load address over log2n bits
  always_comb begin
    logic [AW-1:0] r;
    for (int i = 0; i < int'(AW); i++) r[i] = cnt[AW-1-i];
    rev_addr = r >> (4'(AW) - log2n_q);
  end

  // butterfly addressing and arithmetic
  always_comb begin
    m      = AW'(1) << stage;
    pos    = bfly & (m - AW'(1));
    grp    = bfly >> stage;
    i0     = (grp << (stage + 4'd1)) | pos;
    i1     = i0 | m;
    tw_idx = (AW-1)'(pos << (4'(AW - 1) - stage));
    a      = mem[i0];
    b      = mem[i1];
    t_re   = (40'(TW_COS[tw_idx] * b.re) - 40'(TW_SIN[tw_idx] * b.im)
              + 40'sd8192) >>> FRAC;
    t_im   = (40'(TW_COS[tw_idx] * b.im) + 40'(TW_SIN[tw_idx] * b.re)
              + 40'sd8192) >>> FRAC;
    a_new.re = sat16((40'(a.re) + t_re + 40'sd1) >>> 1);
    a_new.im = sat16((40'(a.im) + t_im + 40'sd1) >>> 1);
    b_new.re = sat16((40'(a.re) - t_re + 40'sd1) >>> 1);
    b_new.im = sat16((40'(a.im) - t_im + 40'sd1) >>> 1);
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mem[rev_addr] <= in_bin;
    end else if (state == S_CALC) begin
      mem[i0] <= a_new;
      mem[i1] <= b_new;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_OFF;
      log2n_q <= 4'(LOG2N_MAX);
      stage   <= '0;
      cnt     <= '0;
      bfly    <= '0;
    end else if (start) begin
      state   <= S_LOAD;
      log2n_q <= log2n;
      stage   <= '0;
      cnt     <= '0;
      bfly    <= '0;
    end else begin
      case (state)
        S_LOAD: if (in_valid) begin
          if (cnt == n_pts - 1'b1) begin
            cnt   <= '0;
            stage <= '0;
            bfly  <= '0;
            state <= S_CALC;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_CALC: begin
          if (last_bfly) begin
            bfly <= '0;
            if (stage == log2n_q - 4'd1) state <= S_OUT;
            else                         stage <= stage + 4'd1;
          end else begin
            bfly <= bfly + 1'b1;
          end
        end
        S_OUT: if (out_ready) begin
          if (cnt == n_pts - 1'b1) begin
            cnt   <= '0;
            state <= S_LOAD;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
