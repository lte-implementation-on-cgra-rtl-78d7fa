// tb_pdsch_tx: end-to-end test of the PDSCH transmitter at its default
// parameters. It runs the three configurations of the design, one OFDM
// symbol each: QPSK with 1200 bits per code word into a 512-point IFFT,
// 16QAM with 4800 bits into 1024 points, 64QAM with 14400 bits into 2048
// points, a QPSK run with PMCH scrambling on the 1.4 MHz size (72
// subcarriers, 128-point IFFT) and a 64QAM run on the 3 MHz size (180
// subcarriers, 256-point IFFT). A reference model
// written here (Gold sequence from the m-sequence recurrences, closed-form
// constellations, case-7 layer mapping, fixed-point precoding, DC/edge
// subcarrier placement and a direct inverse DFT) predicts every antenna
// sample, which must match within a small rounding tolerance.
// Mechanisms counted, each of which must occur: modulation switch, FFT size
// switch, precoding matrix change, PMCH initialisation, scrambler warm-up,
// gaps on the bit inputs and stalls on the antenna outputs.
module tb_pdsch_tx;
  import lte_pkg::*;

  localparam int TOL = 6;
  localparam int MAXB = 14400;

  logic clk = 0, rst_n = 0, start = 0, busy;
  mod_t mode = MOD_QPSK;
  chan_t chan = CH_PDSCH;
  logic [15:0] n_rnti = '0;
  logic [4:0] n_s = '0;
  logic [8:0] cell_id = '0;
  logic [7:0] mbsfn_id = '0;
  logic [10:0] n_sc = '0;
  logic [3:0] log2n = '0;
  logic w_we = 0;
  logic [3:0] w_addr = '0;
  cplx_t w_data = '0;
  logic cw0_valid = 0, cw0_ready, cw0_bit = 0;
  logic cw1_valid = 0, cw1_ready, cw1_bit = 0;
  logic [3:0] ant_valid, ant_ready = '0;
  cplx_t ant_smp [4];

  int checks = 0, failures = 0;
  int n_modeswitch = 0, n_fftswitch = 0, n_wchange = 0, n_pmch = 0;
  int n_warmup = 0, n_ingap = 0, n_outstall = 0;

  bit  bits [2][MAXB];
  bit  x1 [NC + MAXB + 31];
  bit  x2 [NC + MAXB + 31];
  int  dre [2][MAXB/2], dim [2][MAXB/2];   // modulation symbols per code word
  int  yre [4][1200], yim [4][1200];       // precoded symbols per port
  int  wr [16], wi [16];
  real tre [4][2048], tim [4][2048];       // expected time samples
  real cs [2048], sn [2048];

  pdsch_tx dut (.*);

  always #5 clk = ~clk;

  // c_init from the LTE formula
  function automatic longint cinit_ref(input chan_t ch, input int rnti, input int qq,
                                       input int ns, input int cid, input int mb);
    int lo;
    if (ch == CH_PDSCH) lo = qq * 8192 + (ns / 2) * 512 + cid;
    else                lo = (ns / 2) * 512 + mb;
    return (ch == CH_PDSCH) ? longint'(rnti) * 16384 + longint'(lo) : longint'(lo);
  endfunction


  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q14(input real v);
    return $rtoi($floor(v * 16384.0 + 0.5));
  endfunction

  function automatic real sg(input bit b);
    return b ? -1.0 : 1.0;
  endfunction

  function automatic int sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  task automatic load_w(input real ur [4], input real ui [4]);
    real nrm = 0.0;
    for (int k = 0; k < 4; k++) nrm += ur[k] * ur[k] + ui[k] * ui[k];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        real pr = ur[r] * ur[c] + ui[r] * ui[c];
        real pi = ui[r] * ur[c] - ur[r] * ui[c];
        wr[4*r+c] = q14((((r == c) ? 1.0 : 0.0) - 2.0 * pr / nrm) / 2.0);
        wi[4*r+c] = q14((-2.0 * pi / nrm) / 2.0);
        @(negedge clk);
        w_we = 1; w_addr = 4'(4*r+c);
        w_data.re = 16'(wr[4*r+c]); w_data.im = 16'(wi[4*r+c]);
      end
    @(negedge clk);
    w_we = 0;
    n_wchange++;
  endtask

  // reference model of one OFDM symbol on all four ports
  task automatic model(input mod_t m, input chan_t ch, input int rnti, input int ns,
                       input int cid, input int mb, input int nsc, input int l2n);
    int qm = int'(bits_per_sym(m));
    int nb = 2 * nsc * qm;
    int nsym = 2 * nsc;
    int n = 1 << l2n;
    for (int c = 0; c < 2; c++) begin
      longint cinit;
      cinit = cinit_ref(ch, rnti, c, ns, cid, mb);
      for (int i = 0; i < 31; i++) begin
        x1[i] = (i == 0);
        x2[i] = cinit[i];
      end
      for (int i = 0; i < NC + nb; i++) begin
        x1[i + 31] = x1[i + 3] ^ x1[i];
        x2[i + 31] = x2[i + 3] ^ x2[i + 2] ^ x2[i + 1] ^ x2[i];
      end
      for (int s = 0; s < nsym; s++) begin
        bit b [6];
        for (int k = 0; k < 6; k++)
          b[k] = (k < qm) ? bits[c][s*qm+k] ^ x1[s*qm+k+NC] ^ x2[s*qm+k+NC] : 1'b0;
        case (m)
          MOD_QPSK: begin
            dre[c][s] = q14(sg(b[0]) / $sqrt(2.0));
            dim[c][s] = q14(sg(b[1]) / $sqrt(2.0));
          end
          MOD_16QAM: begin
            dre[c][s] = q14(sg(b[0]) * (2.0 - sg(b[2])) / $sqrt(10.0));
            dim[c][s] = q14(sg(b[1]) * (2.0 - sg(b[3])) / $sqrt(10.0));
          end
          default: begin
            dre[c][s] = q14(sg(b[0]) * (4.0 - sg(b[2]) * (2.0 - sg(b[4]))) / $sqrt(42.0));
            dim[c][s] = q14(sg(b[1]) * (4.0 - sg(b[3]) * (2.0 - sg(b[5]))) / $sqrt(42.0));
          end
        endcase
      end
    end
    // layers x0..x3 = d0(2i), d0(2i+1), d1(2i), d1(2i+1); then y = W x
    for (int i = 0; i < nsc; i++)
      for (int p = 0; p < 4; p++) begin
        longint ar = 0, ai = 0;
        for (int l = 0; l < 4; l++) begin
          int xr = dre[l / 2][2*i + l % 2];
          int xi = dim[l / 2][2*i + l % 2];
          ar += longint'(wr[4*p+l]) * xr - longint'(wi[4*p+l]) * xi;
          ai += longint'(wi[4*p+l]) * xr + longint'(wr[4*p+l]) * xi;
        end
        yre[p][i] = sat((ar + 8192) >>> 14);
        yim[p][i] = sat((ai + 8192) >>> 14);
      end
    for (int k = 0; k < n; k++) begin
      cs[k] = $cos(2.0 * 3.14159265358979323846 * k / n);
      sn[k] = $sin(2.0 * 3.14159265358979323846 * k / n);
    end
    // subcarrier k sits at frequency k - nsc/2 (k < nsc/2) or k - nsc/2 + 1
    for (int p = 0; p < 4; p++)
      for (int t = 0; t < n; t++) begin
        real er = 0.0, ei = 0.0;
        for (int k = 0; k < nsc; k++) begin
          int f = (k < nsc / 2) ? k - nsc / 2 : k - nsc / 2 + 1;
          int idx = ((f + n) * t) % n;
          er += yre[p][k] * cs[idx] - yim[p][k] * sn[idx];
          ei += yre[p][k] * sn[idx] + yim[p][k] * cs[idx];
        end
        tre[p][t] = er / n;
        tim[p][t] = ei / n;
      end
  endtask

  task automatic run(input mod_t m, input chan_t ch, input int rnti, input int ns,
                     input int cid, input int mb, input int nsc, input int l2n,
                     input bit stall);
    int qm = int'(bits_per_sym(m));
    int nb = 2 * nsc * qm;
    int n = 1 << l2n;
    int sent [2];
    int got [4];
    int cyc, maxerr;
    bit done;
    if (m != mode) n_modeswitch++;
    if (4'(l2n) != log2n) n_fftswitch++;
    if (ch == CH_PMCH) n_pmch++;
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < nb; i++) bits[c][i] = 1'($urandom);
    model(m, ch, rnti, ns, cid, mb, nsc, l2n);
    mode = m; chan = ch; n_rnti = 16'(rnti); n_s = 5'(ns); cell_id = 9'(cid);
    mbsfn_id = 8'(mb); n_sc = 11'(nsc); log2n = 4'(l2n);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    sent = '{0, 0}; got = '{0, 0, 0, 0};
    cyc = 0; maxerr = 0; done = 0;
    while (!done) begin
      if (busy) n_warmup++;
      cw0_valid = (sent[0] < nb) && (!stall || $urandom_range(4) != 0);
      cw1_valid = (sent[1] < nb) && (!stall || $urandom_range(4) != 0);
      cw0_bit   = (sent[0] < nb) ? bits[0][sent[0]] : 1'b0;
      cw1_bit   = (sent[1] < nb) ? bits[1][sent[1]] : 1'b0;
      for (int p = 0; p < 4; p++) ant_ready[p] = !stall || $urandom_range(3) != 0;
      @(posedge clk);
      cyc++;
      if (!busy && ((sent[0] < nb && !cw0_valid) || (sent[1] < nb && !cw1_valid))) n_ingap++;
      if (cw0_valid && cw0_ready) sent[0]++;
      if (cw1_valid && cw1_ready) sent[1]++;
      for (int p = 0; p < 4; p++) begin
        if (ant_valid[p] && !ant_ready[p]) n_outstall++;
        if (ant_valid[p] && ant_ready[p]) begin
          int dr = $rtoi($floor(tre[p][got[p]] - real'(ant_smp[p].re) + 0.5));
          int di = $rtoi($floor(tim[p][got[p]] - real'(ant_smp[p].im) + 0.5));
          if (dr < 0) dr = -dr;
          if (di < 0) di = -di;
          if (dr > maxerr) maxerr = dr;
          if (di > maxerr) maxerr = di;
          checks++;
          if (dr > TOL || di > TOL) begin
            int gr = int'(ant_smp[p].re), gi = int'(ant_smp[p].im);
            failures++;
            if (failures < 10) $display("FAIL port %0d sample %0d: got %0d,%0d expected %f,%f",
                                        p, got[p], gr, gi,
                                        tre[p][got[p]], tim[p][got[p]]);
          end
          got[p]++;
        end
      end
      done = (got[0] == n) && (got[1] == n) && (got[2] == n) && (got[3] == n);
      @(negedge clk);
    end
    cw0_valid = 0; cw1_valid = 0; ant_ready = '0;
    checks++;
    if (sent[0] != nb || sent[1] != nb) begin
      failures++;
      $display("FAIL only %0d/%0d bits taken", sent[0], sent[1]);
    end
    $display("mode %0d, %0d bits per code word, N=%0d, stalls %0d: %0d cycles, max error %0d LSB",
             m, nb, n, stall, cyc, maxerr);
  endtask

  initial begin
    static real s = 1.0 / $sqrt(2.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_w('{1.0, -1.0, -1.0, -1.0}, '{0.0, 0.0, 0.0, 0.0});
    run(MOD_QPSK, CH_PDSCH, 1, 1, 0, 0, 300, 9, 1'b0);
    load_w('{1.0, -s, 0.0, s}, '{0.0, -s, -1.0, -s});
    run(MOD_16QAM, CH_PDSCH, 4660, 6, 301, 0, 600, 10, 1'b1);
    run(MOD_64QAM, CH_PDSCH, 65535, 19, 503, 0, 1200, 11, 1'b0);
    run(MOD_QPSK, CH_PMCH, 0, 4, 0, 17, 72, 7, 1'b1);
    run(MOD_64QAM, CH_PDSCH, 100, 13, 42, 0, 180, 8, 1'b0);
    $display("mechanisms: modulation switches %0d, FFT size switches %0d, matrix loads %0d,",
             n_modeswitch, n_fftswitch, n_wchange);
    $display("            PMCH runs %0d, warm-up cycles %0d, input gaps %0d, output stalls %0d",
             n_pmch, n_warmup, n_ingap, n_outstall);
    checks++; if (n_modeswitch == 0) begin failures++; $display("FAIL no modulation switch"); end
    checks++; if (n_fftswitch == 0)  begin failures++; $display("FAIL no FFT size switch"); end
    checks++; if (n_wchange < 2)     begin failures++; $display("FAIL no matrix change"); end
    checks++; if (n_pmch == 0)       begin failures++; $display("FAIL no PMCH run"); end
    checks++; if (n_warmup == 0)     begin failures++; $display("FAIL no warm-up seen"); end
    checks++; if (n_ingap == 0)      begin failures++; $display("FAIL no input gap"); end
    checks++; if (n_outstall == 0)   begin failures++; $display("FAIL no output stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
