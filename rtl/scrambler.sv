// scrambler: LTE bit-level scrambler for one code word.
//
// A length-31 Gold sequence c(n) = x1(n+Nc) xor x2(n+Nc) with Nc = 1600 is
// XORed onto the code word bits b(i). Two 31-cell Fibonacci LFSRs make the
// m-sequences:
//   x1(n+31) = x1(n+3) xor x1(n)                       (x1 starts 1,0,...,0)
//   x2(n+31) = x2(n+3) xor x2(n+2) xor x2(n+1) xor x2(n) (x2 starts c_init)
// Cell 0 of each register holds x(n); every step shifts towards cell 0 and
// enters the feedback bit in cell 30. The c_init calculator (cinit_calc)
// sits beside LFSR 2 as in the block structure of the platform mapping.
//
// Interface: a one-cycle `start` pulse loads both registers from the
// parameters present in that cycle and then runs the 1600-step warm-up
// (Nc) during which `busy` is high and no bit is accepted. After that one
// bit is scrambled per cycle: in_ready = out_ready, out_valid = in_valid,
// out_bit = in_bit xor c(n), with no register in the data path (zero
// latency). The registers advance only on an accepted bit.
// Equations, polynomials, Nc and the initial states follow the LTE
// definition used by the design; the bit-serial datapath and the warm-up by
// stepping are this design's choices.
module scrambler
  import lte_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  // parameters of the second initialisation, sampled at start
  input  chan_t       chan,
  input  logic [15:0] n_rnti,
  input  logic        q,
  input  logic [4:0]  n_s,
  input  logic [8:0]  cell_id,
  input  logic [7:0]  mbsfn_id,
  output logic        busy,
  // code word bits in
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_bit,
  // scrambled bits out
  output logic        out_valid,
  input  logic        out_ready,
  output logic        out_bit
);
  localparam int unsigned WARM_W = $clog2(NC + 1);

  logic [30:0] x1, x2;
  logic [30:0] c_init;
  logic [WARM_W-1:0] warm_cnt;
  logic        running;
  logic        step;
  logic        c_n;

  cinit_calc u_cinit (
    .chan, .n_rnti, .q, .n_s, .cell_id, .mbsfn_id, .c_init
  );

  function automatic logic [30:0] adv_x1(input logic [30:0] x);
    return {x[3] ^ x[0], x[30:1]};
  endfunction

  function automatic logic [30:0] adv_x2(input logic [30:0] x);
    return {x[3] ^ x[2] ^ x[1] ^ x[0], x[30:1]};
  endfunction

  assign c_n       = x1[0] ^ x2[0];
  assign busy      = !running || (warm_cnt != '0);
  assign in_ready  = !busy && out_ready;
  assign out_valid = !busy && in_valid;
  assign out_bit   = in_bit ^ c_n;
  assign step      = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1       <= 31'd1;
      x2       <= '0;
      warm_cnt <= '0;
      running  <= 1'b0;
    end else if (start) begin
      x1       <= 31'd1;
      x2       <= c_init;
      warm_cnt <= WARM_W'(NC);
      running  <= 1'b1;
    end else if (warm_cnt != '0) begin
      x1       <= adv_x1(x1);
      x2       <= adv_x2(x2);
      warm_cnt <= warm_cnt - 1'b1;
    end else if (step) begin
      x1 <= adv_x1(x1);
      x2 <= adv_x2(x2);
    end
  end
endmodule
