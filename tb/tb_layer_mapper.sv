// tb_layer_mapper: sends two independent random symbol streams with random
// gaps and output stalls and checks x0=d0(2i), x1=d0(2i+1), x2=d1(2i),
// x3=d1(2i+1) for every vector; a stall-free pass checks one vector per two
// input symbols per code word.
module tb_layer_mapper;
  import lte_pkg::*;

  localparam int NV = 500;

  logic clk = 0, rst_n = 0, start = 0;
  logic cw0_valid = 0, cw0_ready, cw1_valid = 0, cw1_ready;
  cplx_t cw0_sym = '0, cw1_sym = '0;
  logic out_valid, out_ready = 0;
  cplx_t out_x [NLAYERS];
  cplx_t d0 [2*NV], d1 [2*NV];
  int checks = 0, failures = 0;

  layer_mapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit stall);
    int s0, s1, got, cyc;
    for (int i = 0; i < 2*NV; i++) begin
      d0[i] = cplx_t'($urandom);
      d1[i] = cplx_t'($urandom);
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    s0 = 0; s1 = 0; got = 0; cyc = 0;
    while (got < NV) begin
      cw0_valid = (s0 < 2*NV) && (!stall || $urandom_range(2) != 0);
      cw1_valid = (s1 < 2*NV) && (!stall || $urandom_range(2) != 0);
      cw0_sym   = d0[s0 % (2*NV)];
      cw1_sym   = d1[s1 % (2*NV)];
      out_ready = !stall || $urandom_range(2) != 0;
      @(posedge clk);
      cyc++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_x[0] !== d0[2*got] || out_x[1] !== d0[2*got+1] ||
            out_x[2] !== d1[2*got] || out_x[3] !== d1[2*got+1]) begin
          failures++;
          if (failures < 10) $display("FAIL vector %0d", got);
        end
        got++;
      end
      if (cw0_valid && cw0_ready) s0++;
      if (cw1_valid && cw1_ready) s1++;
      @(negedge clk);
    end
    cw0_valid = 0; cw1_valid = 0;
    if (!stall) begin
      checks++;
      if (cyc > 3 * NV + 3) begin
        failures++;
        $display("FAIL rate: %0d cycles for %0d vectors", cyc, NV);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
