// tb_precoder: loads codebook matrices built from W_n = I - 2 u u^H/(u^H u)
// (scaled by 1/sqrt(4) for four layers) for u_0 = [1 -1 -1 -1] and
// u_4 = [1 (-1-j)/sqrt2 -j (1-j)/sqrt2], sends random layer vectors and
// compares each antenna output with the complex product computed here in
// 64-bit integers (Q1.14, round half up, saturate). Also checks one vector
// per four cycles without stalls, and a matrix change between vectors.
module tb_precoder;
  import lte_pkg::*;

  localparam int NV = 400;

  logic clk = 0, rst_n = 0, start = 0;
  logic w_we = 0;
  logic [3:0] w_addr = '0;
  cplx_t w_data = '0;
  logic in_valid = 0, in_ready;
  cplx_t in_x [NLAYERS];
  logic out_valid, out_ready = 0;
  cplx_t out_y [NPORTS];
  int checks = 0, failures = 0;
  int wr [16], wi [16];
  cplx_t xv [NV][NLAYERS];

  precoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q14(input real v);
    return $rtoi($floor(v * 16384.0 + 0.5));
  endfunction

  function automatic int sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  task automatic load_w(input real ur [4], input real ui [4]);
    real nrm;
    nrm = 0.0;
    for (int k = 0; k < 4; k++) nrm += ur[k] * ur[k] + ui[k] * ui[k];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        // u_r * conj(u_c)
        real pr = ur[r] * ur[c] + ui[r] * ui[c];
        real pi = ui[r] * ur[c] - ur[r] * ui[c];
        real er = ((r == c) ? 1.0 : 0.0) - 2.0 * pr / nrm;
        real ei = -2.0 * pi / nrm;
        wr[4*r+c] = q14(er / 2.0);
        wi[4*r+c] = q14(ei / 2.0);
        @(negedge clk);
        w_we = 1; w_addr = 4'(4*r+c);
        w_data.re = 16'(wr[4*r+c]); w_data.im = 16'(wi[4*r+c]);
      end
    @(negedge clk);
    w_we = 0;
  endtask

  task automatic run(input bit stall, input bit big);
    int sent, got, cyc, first_cyc;
    for (int v = 0; v < NV; v++)
      for (int l = 0; l < 4; l++) begin
        int lim = big ? 32767 : 12000;
        xv[v][l].re = 16'($urandom_range(2*lim) - lim);
        xv[v][l].im = 16'($urandom_range(2*lim) - lim);
      end
    sent = 0; got = 0; cyc = 0; first_cyc = 0;
    while (got < NV) begin
      in_valid  = (sent < NV) && (!stall || $urandom_range(2) != 0);
      in_x      = xv[sent % NV];
      out_ready = !stall || $urandom_range(2) != 0;
      @(posedge clk);
      cyc++;
      if (out_valid && out_ready) begin
        for (int p = 0; p < 4; p++) begin
          longint ar = 0, ai = 0;
          int er, ei;
          for (int l = 0; l < 4; l++) begin
            ar += longint'(wr[4*p+l]) * xv[got][l].re - longint'(wi[4*p+l]) * xv[got][l].im;
            ai += longint'(wi[4*p+l]) * xv[got][l].re + longint'(wr[4*p+l]) * xv[got][l].im;
          end
          er = sat((ar + 8192) >>> 14);
          ei = sat((ai + 8192) >>> 14);
          checks++;
          if (out_y[p].re != 16'(er) || out_y[p].im != 16'(ei)) begin
            int gr = int'(out_y[p].re), gi = int'(out_y[p].im);
            failures++;
            if (failures < 10) $display("FAIL vector %0d port %0d: got %0d,%0d expected %0d,%0d",
                                        got, p, gr, gi, er, ei);
          end
        end
        if (got == 0) first_cyc = cyc;
        got++;
      end
      if (in_valid && in_ready) sent++;
      @(negedge clk);
    end
    in_valid = 0;
    if (!stall) begin
      checks++;
      if (cyc - first_cyc != 4 * (NV - 1)) begin
        failures++;
        $display("FAIL rate: %0d cycles between first and last of %0d vectors", cyc - first_cyc, NV);
      end
    end
  endtask

  initial begin
    static real s = 1.0 / $sqrt(2.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_w('{1.0, -1.0, -1.0, -1.0}, '{0.0, 0.0, 0.0, 0.0});
    run(1'b0, 1'b0);
    run(1'b1, 1'b0);
    load_w('{1.0, -s, 0.0, s}, '{0.0, -s, -1.0, -s});
    run(1'b0, 1'b0);
    run(1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
