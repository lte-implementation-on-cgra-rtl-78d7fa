// precoder: spatial-multiplexing precoding y(i) = W * x(i) for four layers
// and four antenna ports.
//
// The complex 4x4 precoding matrix W lives in a small register file of 16
// complex words (real and imaginary parts side by side), written through
// the w_we/w_addr/w_data port with address = 4*row + column. Writing a new
// matrix changes the codebook entry at run time, e.g. on a new precoder
// matrix indicator; it may be written while no vector is being processed.
// The matrix for codebook index n is W_n = I - 2 u u^H / (u^H u), possibly
// with permuted columns; it is computed outside this block.
//
// One antenna row is produced per cycle, as four complex multiply-
// accumulates (eight real products per output word):
//   Re y_p = sum_l (Wr[p][l] xr_l - Wi[p][l] xi_l)
//   Im y_p = sum_l (Wi[p][l] xr_l + Wr[p][l] xi_l)
// Both W and x are Q1.14; each sum is rounded half up by 2^14 and
// saturated to 16 bits. A vector is accepted, then rows 0..3 take one cycle
// each; the vector y is registered after row 3 and held on the output with
// valid/ready. The next vector can be accepted in the cycle of row 3, so
// throughput is one vector per four cycles when the output is free.
// The matrix product follows the design; the row-serial schedule, Q1.14
// format, rounding and saturation are this design's choices.
module precoder
  import lte_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  // precoding matrix register file
  input  logic       w_we,
  input  logic [3:0] w_addr,
  input  cplx_t      w_data,
  // layer vector in
  input  logic       in_valid,
  output logic       in_ready,
  input  cplx_t      in_x [NLAYERS],
  // antenna vector out
  output logic       out_valid,
  input  logic       out_ready,
  output cplx_t      out_y [NPORTS]
);
  typedef enum logic [1:0] {S_IDLE, S_CALC, S_WAIT} state_t;

  cplx_t  w_rf [16];
  cplx_t  x_q  [NLAYERS];
  cplx_t  y_q  [NPORTS];
  state_t state;
  logic [1:0] row;
  logic   out_free;
  logic   last_row;
  cplx_t  y_row;

  assign out_free = !out_valid || out_ready;
  assign last_row = (state == S_CALC) && (row == 2'd3);
  assign in_ready = (state == S_IDLE) || (last_row && out_free);

  // one output row: four complex products, rounded and saturated
  always_comb begin
    logic signed [39:0] acc_re, acc_im;
    acc_re = 40'sd0;
    acc_im = 40'sd0;
    for (int l = 0; l < NLAYERS; l++) begin
      acc_re += 40'(w_rf[{row, 2'(l)}].re * x_q[l].re) - 40'(w_rf[{row, 2'(l)}].im * x_q[l].im);
      acc_im += 40'(w_rf[{row, 2'(l)}].im * x_q[l].re) + 40'(w_rf[{row, 2'(l)}].re * x_q[l].im);
    end
    y_row.re = sat16((acc_re + 40'sd8192) >>> FRAC);
    y_row.im = sat16((acc_im + 40'sd8192) >>> FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) w_rf[i] <= '0;
    end else if (w_we) begin
      w_rf[w_addr] <= w_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      row       <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < NLAYERS; i++) x_q[i] <= '0;
      for (int i = 0; i < NPORTS; i++) begin
        y_q[i]   <= '0;
        out_y[i] <= '0;
      end
    end else if (start) begin
      state     <= S_IDLE;
      row       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      case (state)
        S_IDLE: if (in_valid) begin
          x_q   <= in_x;
          row   <= '0;
          state <= S_CALC;
        end
        S_CALC: begin
          y_q[row] <= y_row;
          row      <= row + 2'd1;
          if (last_row) begin
            if (out_free) begin
              for (int p = 0; p < NPORTS - 1; p++) out_y[p] <= y_q[p];
              out_y[NPORTS-1] <= y_row;
              out_valid <= 1'b1;
              if (in_valid) begin
                x_q   <= in_x;
                state <= S_CALC;
              end else begin
                state <= S_IDLE;
              end
            end else begin
              state <= S_WAIT;
            end
          end
        end
        default: if (out_free) begin   // S_WAIT
          out_y     <= y_q;
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
      endcase
    end
  end
endmodule
