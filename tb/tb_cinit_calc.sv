// tb_cinit_calc: checks the c_init calculator against the LTE formula
// computed with plain integer arithmetic, for the parameter set
// (n_RNTI=1, q=0, n_s=1, cellid 0), the range limits and random values, for
// both the PDSCH and the PMCH formula.
module tb_cinit_calc;
  import lte_pkg::*;

  chan_t       chan;
  logic [15:0] n_rnti;
  logic        q;
  logic [4:0]  n_s;
  logic [8:0]  cell_id;
  logic [7:0]  mbsfn_id;
  logic [30:0] c_init;
  int checks = 0, failures = 0;

  cinit_calc dut (.*);

  // c_init from the LTE formula
  function automatic longint cinit_ref(input chan_t ch, input int rnti, input int qq,
                                       input int ns, input int cid, input int mb);
    int lo;
    if (ch == CH_PDSCH) lo = qq * 8192 + (ns / 2) * 512 + cid;
    else                lo = (ns / 2) * 512 + mb;
    return (ch == CH_PDSCH) ? longint'(rnti) * 16384 + longint'(lo) : longint'(lo);
  endfunction

  task automatic check(input chan_t ch, input int rnti, input int qq, input int ns,
                       input int cellid, input int mb);
    longint exp_v;
    chan = ch; n_rnti = 16'(rnti); q = qq[0]; n_s = 5'(ns);
    cell_id = 9'(cellid); mbsfn_id = 8'(mb);
    #1;
    exp_v = cinit_ref(ch, rnti, qq, ns, cellid, mb);
    checks++;
    if (longint'(c_init) != exp_v) begin
      failures++;
      $display("FAIL chan=%0d rnti=%0d q=%0d ns=%0d cellid=%0d mb=%0d: got %0d expected %0d",
               ch, rnti, qq, ns, cellid, mb, c_init, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(CH_PDSCH, 1, 0, 1, 0, 0);
    check(CH_PDSCH, 65535, 1, 19, 503, 0);
    check(CH_PDSCH, 0, 0, 0, 0, 0);
    check(CH_PMCH, 0, 0, 9, 0, 255);
    for (int i = 0; i < 500; i++)
      check(($urandom_range(1) == 1) ? CH_PMCH : CH_PDSCH, $urandom_range(65535), $urandom_range(1),
            $urandom_range(19), $urandom_range(503), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
