// tb_mod_mapper: feeds random scrambled bits in each modulation order and
// compares every symbol with the LTE constellation written as a closed
// formula (independent of the mapper's tables):
//   QPSK : I = (1-2b0)/sqrt2,                Q = (1-2b1)/sqrt2
//   16QAM: I = (1-2b0)(2-(1-2b2))/sqrt10,    Q = (1-2b1)(2-(1-2b3))/sqrt10
//   64QAM: I = (1-2b0)(4-(1-2b2)(2-(1-2b4)))/sqrt42, Q likewise with b1,b3,b5
// rounded to Q1.14. A first pass with no stalls checks the rate, one
// symbol per Q_m cycles; a second pass stalls both sides at random.
module tb_mod_mapper;
  import lte_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  mod_t mode = MOD_QPSK;
  logic in_valid = 0, in_ready, in_bit = 0;
  logic out_valid, out_ready = 0;
  cplx_t out_sym;
  int checks = 0, failures = 0;

  mod_mapper dut (.*);

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

  function automatic real sg(input bit b);
    return b ? -1.0 : 1.0;
  endfunction

  function automatic cplx_t ref_sym(input mod_t m, input bit b[6]);
    cplx_t r;
    case (m)
      MOD_QPSK: begin
        r.re = 16'(q14(sg(b[0]) / $sqrt(2.0)));
        r.im = 16'(q14(sg(b[1]) / $sqrt(2.0)));
      end
      MOD_16QAM: begin
        r.re = 16'(q14(sg(b[0]) * (2.0 - sg(b[2])) / $sqrt(10.0)));
        r.im = 16'(q14(sg(b[1]) * (2.0 - sg(b[3])) / $sqrt(10.0)));
      end
      default: begin
        r.re = 16'(q14(sg(b[0]) * (4.0 - sg(b[2]) * (2.0 - sg(b[4]))) / $sqrt(42.0)));
        r.im = 16'(q14(sg(b[1]) * (4.0 - sg(b[3]) * (2.0 - sg(b[5]))) / $sqrt(42.0)));
      end
    endcase
    return r;
  endfunction

  task automatic run(input mod_t m, input int nsym, input bit stall);
    int qm, sent, got, cyc, first_cyc;
    bit bits [];
    qm = int'(bits_per_sym(m));
    bits = new[nsym * qm];
    for (int i = 0; i < nsym * qm; i++) bits[i] = 1'($urandom);
    mode = m;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    sent = 0; got = 0; cyc = 0; first_cyc = 0;
    while (got < nsym) begin
      in_valid  = (sent < nsym * qm) && (!stall || $urandom_range(3) != 0);
      in_bit    = (sent < nsym * qm) ? bits[sent] : 1'b0;
      out_ready = !stall || ($urandom_range(3) != 0);
      @(posedge clk);
      cyc++;
      if (out_valid && out_ready) begin
        bit g [6];
        cplx_t e;
        for (int k = 0; k < 6; k++) g[k] = (k < qm) ? bits[got * qm + k] : 1'b0;
        e = ref_sym(m, g);
        checks++;
        if (out_sym !== e) begin
          failures++;
          if (failures < 10)
            $display("FAIL mode %0d sym %0d: got %0d,%0d expected %0d,%0d", m, got,
                     $signed(out_sym.re), $signed(out_sym.im), $signed(e.re), $signed(e.im));
        end
        if (got == 0) first_cyc = cyc;
        got++;
      end
      if (in_valid && in_ready) sent++;
      @(negedge clk);
    end
    in_valid = 0;
    if (!stall) begin
      // the last symbol leaves Q_m cycles after the one before it
      checks++;
      if (cyc - first_cyc != (nsym - 1) * qm) begin
        failures++;
        $display("FAIL mode %0d rate: %0d cycles for %0d symbols", m, cyc - first_cyc, nsym - 1);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      run(MOD_QPSK, 300, s[0]);
      run(MOD_16QAM, 300, s[0]);
      run(MOD_64QAM, 400, s[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
