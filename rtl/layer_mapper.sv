// layer_mapper: code word to layer mapping for spatial multiplexing with
// two code words and four layers (case 7):
//   x0(i) = d0(2i), x1(i) = d0(2i+1), x2(i) = d1(2i), x3(i) = d1(2i+1)
//
// Each code word input has a two-entry holding stage. When both stages are
// full the four symbols form the layer vector x(i), which is registered and
// offered on the output with valid/ready. The two inputs are independent
// valid/ready streams and may run at different times. Real and imaginary
// parts travel together in one cplx_t. `start` empties all stages.
// The mapping equations are the LTE ones for this case; buffering and
// handshake are this design's choices. Latency: the vector appears the
// cycle after the last of its four symbols is accepted.
module layer_mapper
  import lte_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  cw0_valid,
  output logic  cw0_ready,
  input  cplx_t cw0_sym,
  input  logic  cw1_valid,
  output logic  cw1_ready,
  input  cplx_t cw1_sym,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_x [NLAYERS]
);
  cplx_t d0 [2];
  cplx_t d1 [2];
  logic [1:0] n0, n1;      // symbols held per code word
  logic       fire;
  logic       free_out;

  assign free_out  = !out_valid || out_ready;
  assign fire      = (n0 == 2'd2) && (n1 == 2'd2) && free_out;
  assign cw0_ready = (n0 != 2'd2);
  assign cw1_ready = (n1 != 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n0 <= '0; n1 <= '0;
      out_valid <= 1'b0;
      for (int l = 0; l < NLAYERS; l++) out_x[l] <= '0;
      d0[0] <= '0; d0[1] <= '0; d1[0] <= '0; d1[1] <= '0;
    end else if (start) begin
      n0 <= '0; n1 <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_x[0]  <= d0[0];
        out_x[1]  <= d0[1];
        out_x[2]  <= d1[0];
        out_x[3]  <= d1[1];
        out_valid <= 1'b1;
        n0 <= '0;
        n1 <= '0;
      end else begin
        if (cw0_valid && cw0_ready) begin
          d0[n0[0]] <= cw0_sym;
          n0 <= n0 + 2'd1;
        end
        if (cw1_valid && cw1_ready) begin
          d1[n1[0]] <= cw1_sym;
          n1 <= n1 + 2'd1;
        end
      end
    end
  end
endmodule
