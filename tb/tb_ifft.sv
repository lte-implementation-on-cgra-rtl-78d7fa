// tb_ifft: transforms random frequency-domain vectors of 128, 256, 512 and 2048
// points and compares each output sample with a direct inverse DFT
// (1/N) sum X(k) exp(+j 2 pi k n / N) computed here in real arithmetic,
// allowing a small rounding error. Stall-free runs check the schedule:
// N load cycles, log2(N)*N/2 compute cycles, N output cycles. A second
// run stalls both sides at random.
module tb_ifft;
  import lte_pkg::*;

  localparam int TOL = 6;

  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] log2n = '0;
  logic in_valid = 0, in_ready;
  cplx_t in_bin = '0;
  logic out_valid, out_ready = 0;
  cplx_t out_smp;
  cplx_t xf [2048];
  real cs [2048], sn [2048];
  int checks = 0, failures = 0;

  ifft dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int l2n, input int amp, input bit stall);
    int n, sent, got, cyc_in, cyc_calc, cyc_out, maxerr;
    n = 1 << l2n;
    for (int k = 0; k < n; k++) begin
      xf[k].re = 16'($urandom_range(2*amp) - amp);
      xf[k].im = 16'($urandom_range(2*amp) - amp);
      cs[k] = $cos(2.0 * 3.14159265358979323846 * k / n);
      sn[k] = $sin(2.0 * 3.14159265358979323846 * k / n);
    end
    log2n = 4'(l2n);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    sent = 0; cyc_in = 0;
    while (sent < n) begin
      in_valid = !stall || $urandom_range(2) != 0;
      in_bin   = xf[sent];
      @(posedge clk);
      cyc_in++;
      if (in_valid && in_ready) sent++;
      @(negedge clk);
    end
    in_valid = 0;
    cyc_calc = 0;
    while (!out_valid) begin
      cyc_calc++;
      @(negedge clk);
    end
    got = 0; cyc_out = 0; maxerr = 0;
    while (got < n) begin
      out_ready = !stall || $urandom_range(2) != 0;
      @(posedge clk);
      cyc_out++;
      if (out_valid && out_ready) begin
        real er = 0.0, ei = 0.0;
        int dr, di;
        for (int k = 0; k < n; k++) begin
          int idx = (k * got) % n;
          er += xf[k].re * cs[idx] - xf[k].im * sn[idx];
          ei += xf[k].re * sn[idx] + xf[k].im * cs[idx];
        end
        er /= n; ei /= n;
        dr = $rtoi(er - real'(out_smp.re) + (er > real'(out_smp.re) ? 0.5 : -0.5));
        di = $rtoi(ei - real'(out_smp.im) + (ei > real'(out_smp.im) ? 0.5 : -0.5));
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (dr > maxerr) maxerr = dr;
        if (di > maxerr) maxerr = di;
        checks++;
        if (dr > TOL || di > TOL) begin
          int gr = int'(out_smp.re), gi = int'(out_smp.im);
          failures++;
          if (failures < 10) $display("FAIL N=%0d n=%0d: got %0d,%0d expected %f,%f",
                                      n, got, gr, gi, er, ei);
        end
        got++;
      end
      @(negedge clk);
    end
    out_ready = 0;
    $display("N=%0d amp=%0d stall=%0d: load %0d, compute %0d, output %0d cycles, max error %0d",
             n, amp, stall, cyc_in, cyc_calc, cyc_out, maxerr);
    if (!stall) begin
      checks++;
      if (cyc_in != n || cyc_calc != l2n * n / 2 || cyc_out != n) begin
        failures++;
        $display("FAIL schedule for N=%0d", n);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(7, 12000, 1'b0);
    run(8, 12000, 1'b0);
    run(9, 12000, 1'b1);
    run(11, 8000, 1'b0);
    run(7, 300, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
