// tb_re_mapper: fills the mapper with random subcarrier symbols for the
// LTE sizes (72 in 128, 180 in 256, 300 in 512, 600 in 1024 and 1200 in
// 2048) and checks every emitted IFFT bin: zero at DC and in the guard
// band, the upper half of the band on bins 1..n_sc/2 and the lower half on
// the top bins. Input and output stall at random in every second pass;
// stall-free passes check n_sc input cycles and N output cycles.
module tb_re_mapper;
  import lte_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [10:0] n_sc = '0;
  logic [3:0]  log2n = '0;
  logic in_valid = 0, in_ready;
  cplx_t in_sym = '0;
  logic out_valid, out_ready = 0;
  cplx_t out_bin;
  cplx_t sc [1200];
  int checks = 0, failures = 0;

  re_mapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nsc, input int l2n, input bit stall);
    int n, sent, got, cyc_in, cyc_out;
    n = 1 << l2n;
    for (int k = 0; k < nsc; k++) sc[k] = cplx_t'($urandom | 32'h0001_0001);
    n_sc = 11'(nsc); log2n = 4'(l2n);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    sent = 0; cyc_in = 0;
    while (sent < nsc) begin
      in_valid = !stall || $urandom_range(2) != 0;
      in_sym   = sc[sent];
      @(posedge clk);
      cyc_in++;
      if (in_valid && in_ready) sent++;
      @(negedge clk);
    end
    in_valid = 0;
    got = 0; cyc_out = 0;
    while (got < n) begin
      out_ready = !stall || $urandom_range(2) != 0;
      @(posedge clk);
      cyc_out++;
      if (out_valid && out_ready) begin
        cplx_t e;
        // frequency of bin got: 0..n/2-1 positive, n/2..n-1 negative
        int f = (got < n / 2) ? got : got - n;
        if (f >= 1 && f <= nsc / 2)       e = sc[nsc / 2 + f - 1];
        else if (f < 0 && f >= -nsc / 2)  e = sc[nsc / 2 + f];
        else                              e = '0;
        checks++;
        if (out_bin !== e) begin
          failures++;
          if (failures < 10) $display("FAIL n_sc %0d bin %0d", nsc, got);
        end
        got++;
      end
      @(negedge clk);
    end
    out_ready = 0;
    if (!stall) begin
      checks++;
      if (cyc_in != nsc || cyc_out != n) begin
        failures++;
        $display("FAIL timing: %0d input cycles, %0d output cycles", cyc_in, cyc_out);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      run(72, 7, s[0]);
      run(180, 8, s[0]);
      run(300, 9, s[0]);
      run(600, 10, s[0]);
      run(1200, 11, s[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
