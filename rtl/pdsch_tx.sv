// pdsch_tx: LTE downlink shared channel (PDSCH) baseband transmitter, from
// two code words of bits to four antenna ports of OFDM time samples.
//
//   cw0 bits -> scrambler(q=0) -> mod_mapper --\                  /-> re_mapper -> ifft -> port 0
//                                               layer_mapper -> precoder ... (x4)
//   cw1 bits -> scrambler(q=1) -> mod_mapper --/                  \-> re_mapper -> ifft -> port 3
//
// Spatial multiplexing with two code words on four layers and four antenna
// ports. One run (one `start` pulse) processes one OFDM symbol: each code
// word supplies 2*n_sc*Q_m bits, giving n_sc layer vectors of four
// symbols each, i.e. n_sc used subcarriers per antenna, which the
// resource element mappers place into an N = 2^log2n point IFFT. The
// configurations of the design are
//   QPSK  : 1200 bits per code word, n_sc =  300, N =  512
//   16QAM : 4800 bits per code word, n_sc =  600, N = 1024
//   64QAM :14400 bits per code word, n_sc = 1200, N = 2048
// and all three run on the default parameters, selected at run time.
//
// Interface: hold the configuration inputs stable from `start` to the end
// of the run. `start` loads the scramblers (c_init from n_RNTI, q, n_s and
// the cell or MBSFN identity), which then spend 1600 cycles in warm-up
// (`busy` high) before accepting bits. The precoding matrix is written
// through w_we/w_addr/w_data while the chain is idle. Code word bits enter
// on valid/ready streams, one bit per cycle each; antenna samples leave on
// four independent valid/ready streams after each IFFT has finished. The
// four antenna branches are fed in lock step: a precoded vector is handed
// over only when all four resource element mappers can take it.
// The chain of blocks follows the design; the streaming handshakes and the
// run-time choice of modulation and FFT size are this design's choices.
module pdsch_tx
  import lte_pkg::*;
#(
  parameter int unsigned NSC_MAX   = 1200,
  parameter int unsigned LOG2N_MAX = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  // run configuration
  input  mod_t                 mode,
  input  chan_t                chan,
  input  logic [15:0]          n_rnti,
  input  logic [4:0]           n_s,
  input  logic [8:0]           cell_id,
  input  logic [7:0]           mbsfn_id,
  input  logic [LOG2N_MAX-1:0] n_sc,
  input  logic [3:0]           log2n,
  // precoding matrix write port
  input  logic                 w_we,
  input  logic [3:0]           w_addr,
  input  cplx_t                w_data,
  // code word bit streams
  input  logic                 cw0_valid,
  output logic                 cw0_ready,
  input  logic                 cw0_bit,
  input  logic                 cw1_valid,
  output logic                 cw1_ready,
  input  logic                 cw1_bit,
  // antenna port sample streams
  output logic [NPORTS-1:0]    ant_valid,
  input  logic [NPORTS-1:0]    ant_ready,
  output cplx_t                ant_smp [NPORTS]
);
  logic  sc_busy [2];
  logic  sc_valid [2], sc_ready [2], sc_bit [2];
  logic  cw_valid [2], cw_ready [2], cw_bit [2];
  logic  mm_valid [2], mm_ready [2];
  cplx_t mm_sym [2];
  logic  lm_valid, lm_ready;
  cplx_t lm_x [NLAYERS];
  logic  pc_valid, pc_ready;
  cplx_t pc_y [NPORTS];
  logic [NPORTS-1:0] rm_in_ready, rm_valid, rm_ready;
  cplx_t rm_bin [NPORTS];

  assign cw_valid[0] = cw0_valid;
  assign cw_valid[1] = cw1_valid;
  assign cw_bit[0]   = cw0_bit;
  assign cw_bit[1]   = cw1_bit;
  assign cw0_ready   = cw_ready[0];
  assign cw1_ready   = cw_ready[1];
  assign busy        = sc_busy[0] || sc_busy[1];

  for (genvar c = 0; c < 2; c++) begin : g_cw
    scrambler u_scr (
      .clk, .rst_n, .start,
      .chan, .n_rnti, .q(c == 1), .n_s, .cell_id, .mbsfn_id,
      .busy      (sc_busy[c]),
      .in_valid  (cw_valid[c]),
      .in_ready  (cw_ready[c]),
      .in_bit    (cw_bit[c]),
      .out_valid (sc_valid[c]),
      .out_ready (sc_ready[c]),
      .out_bit   (sc_bit[c])
    );

    mod_mapper u_map (
      .clk, .rst_n, .start, .mode,
      .in_valid  (sc_valid[c]),
      .in_ready  (sc_ready[c]),
      .in_bit    (sc_bit[c]),
      .out_valid (mm_valid[c]),
      .out_ready (mm_ready[c]),
      .out_sym   (mm_sym[c])
    );
  end

  layer_mapper u_layer (
    .clk, .rst_n, .start,
    .cw0_valid (mm_valid[0]), .cw0_ready (mm_ready[0]), .cw0_sym (mm_sym[0]),
    .cw1_valid (mm_valid[1]), .cw1_ready (mm_ready[1]), .cw1_sym (mm_sym[1]),
    .out_valid (lm_valid), .out_ready (lm_ready), .out_x (lm_x)
  );

  precoder u_prec (
    .clk, .rst_n, .start,
    .w_we, .w_addr, .w_data,
    .in_valid  (lm_valid), .in_ready (lm_ready), .in_x (lm_x),
    .out_valid (pc_valid), .out_ready (pc_ready), .out_y (pc_y)
  );

  // lock-step hand-over of one precoded vector to all four branches
  assign pc_ready = &rm_in_ready;

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_port
    re_mapper #(.NSC_MAX(NSC_MAX), .LOG2N_MAX(LOG2N_MAX)) u_rem (
      .clk, .rst_n, .start, .n_sc, .log2n,
      .in_valid  (pc_valid && pc_ready),
      .in_ready  (rm_in_ready[p]),
      .in_sym    (pc_y[p]),
      .out_valid (rm_valid[p]),
      .out_ready (rm_ready[p]),
      .out_bin   (rm_bin[p])
    );

    ifft #(.LOG2N_MAX(LOG2N_MAX)) u_ifft (
      .clk, .rst_n, .start, .log2n,
      .in_valid  (rm_valid[p]),
      .in_ready  (rm_ready[p]),
      .in_bin    (rm_bin[p]),
      .out_valid (ant_valid[p]),
      .out_ready (ant_ready[p]),
      .out_smp   (ant_smp[p])
    );
  end
endmodule
