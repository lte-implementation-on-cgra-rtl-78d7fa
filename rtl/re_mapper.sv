// re_mapper: resource element mapper of one antenna port for the PDSCH data
// of one OFDM symbol.
//
// The n_sc used subcarriers k = 0..n_sc-1 of the symbol are written into a
// buffer as they arrive. The block then emits all N = 2^log2n IFFT input
// bins in order 0..N-1, padding zeros at DC and around the band edges:
//   bin 0 (DC)                      -> 0
//   bin b, 1 <= b <= n_sc/2         -> subcarrier k = n_sc/2 + b - 1
//   bin b, N - n_sc/2 <= b <= N-1   -> subcarrier k = b - (N - n_sc/2)
//   every other bin                 -> 0 (guard band)
// so the lower half of the band lands on negative frequencies and the upper
// half on positive ones, skipping DC.
//
// Interface: `start` latches n_sc (even, at most NSC_MAX, below N) and
// log2n and begins filling. Input and output are valid/ready streams; the
// input is accepted only while filling and the output is offered only while
// emitting, so one symbol of n_sc inputs gives N outputs. The buffer read is
// asynchronous and the output is combinational from the bin counter.
// Defaults: 1200 subcarriers and N up to 2048, the largest LTE bandwidth.
// Only PDSCH data is mapped (no reference, synchronisation or control
// channels), as in the design; the DC/edge placement rule is the usual LTE
// one and the buffer/handshake structure is this design's choice.
module re_mapper
  import lte_pkg::*;
#(
  parameter int unsigned NSC_MAX   = 1200,
  parameter int unsigned LOG2N_MAX = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [LOG2N_MAX-1:0] n_sc,
  input  logic [3:0]           log2n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  cplx_t                in_sym,
  output logic                 out_valid,
  input  logic                 out_ready,
  output cplx_t                out_bin
);
  localparam int unsigned AW = $clog2(NSC_MAX);
  localparam int unsigned BW = LOG2N_MAX + 1;

  typedef enum logic [1:0] {S_OFF, S_FILL, S_EMIT} state_t;

  cplx_t buffer [NSC_MAX];
  state_t state;
  logic [LOG2N_MAX-1:0] nsc_q;
  logic [3:0]           log2n_q;
  logic [BW-1:0]        cnt;
  logic [BW-1:0]        n_bins;
  logic [BW-1:0]        half;
  logic [AW-1:0]        k_idx;      // subcarrier index, below NSC_MAX
  logic                 in_band;

  assign n_bins   = BW'(1) << log2n_q;
  assign half     = BW'(nsc_q >> 1);
  assign in_ready = (state == S_FILL);
  assign out_valid = (state == S_EMIT);

  always_comb begin
    in_band = 1'b0;
    k_idx   = '0;
    if (cnt != '0 && cnt <= half) begin
      in_band = 1'b1;
      k_idx   = AW'(half + cnt - BW'(1));
    end else if (cnt >= n_bins - half) begin
      in_band = 1'b1;
      k_idx   = AW'(cnt - (n_bins - half));
    end
    out_bin = in_band ? buffer[k_idx] : '0;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) buffer[AW'(cnt)] <= in_sym;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_OFF;
      cnt     <= '0;
      nsc_q   <= '0;
      log2n_q <= '0;
    end else if (start) begin
      state   <= S_FILL;
      cnt     <= '0;
      nsc_q   <= n_sc;
      log2n_q <= log2n;
    end else begin
      case (state)
        S_FILL: if (in_valid) begin
          if (cnt == BW'(nsc_q) - BW'(1)) begin
            cnt   <= '0;
            state <= S_EMIT;
          end else begin
            cnt <= cnt + BW'(1);
          end
        end
        S_EMIT: if (out_ready) begin
          if (cnt == n_bins - BW'(1)) begin
            cnt   <= '0;
            state <= S_FILL;
          end else begin
            cnt <= cnt + BW'(1);
          end
        end
        default: ;
      endcase
    end
  end
endmodule
