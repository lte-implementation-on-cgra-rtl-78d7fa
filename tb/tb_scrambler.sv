// tb_scrambler: runs the scrambler for two code words with different
// parameters and compares every output bit with b(i) xor c(i), where the
// Gold sequence is rebuilt here from the m-sequence recurrences on plain
// bit arrays (x1, x2 indexed by n, c(n) = x1(n+1600) xor x2(n+1600)).
// Inputs arrive with random gaps and the output is randomly stalled. The
// warm-up must last exactly 1600 cycles after start.
module tb_scrambler;
  import lte_pkg::*;

  localparam int M = 3000;

  logic clk = 0, rst_n = 0, start = 0;
  chan_t chan = CH_PDSCH;
  logic [15:0] n_rnti = '0;
  logic q = 0;
  logic [4:0] n_s = '0;
  logic [8:0] cell_id = '0;
  logic [7:0] mbsfn_id = '0;
  logic busy;
  logic in_valid = 0, in_ready, in_bit = 0;
  logic out_valid, out_ready = 0, out_bit;
  int checks = 0, failures = 0;

  bit x1 [NC + M + 31];
  bit x2 [NC + M + 31];
  bit cseq [M];
  bit data [M];

  scrambler dut (.*);

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void gold(input longint cinit);
    for (int n = 0; n < 31; n++) begin
      x1[n] = (n == 0);
      x2[n] = cinit[n];
    end
    for (int n = 0; n < NC + M; n++) begin
      x1[n + 31] = x1[n + 3] ^ x1[n];
      x2[n + 31] = x2[n + 3] ^ x2[n + 2] ^ x2[n + 1] ^ x2[n];
    end
    for (int n = 0; n < M; n++) cseq[n] = x1[n + NC] ^ x2[n + NC];
  endfunction

  task automatic run(input chan_t ch, input int rnti, input int qq, input int ns,
                     input int cellid, input int mb);
    longint cinit;
    int warm, sent, got;
    cinit = cinit_ref(ch, rnti, qq, ns, cellid, mb);
    gold(cinit);
    for (int i = 0; i < M; i++) data[i] = 1'($urandom);
    chan = ch; n_rnti = 16'(rnti); q = qq[0]; n_s = 5'(ns); cell_id = 9'(cellid);
    mbsfn_id = 8'(mb);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    warm = 0;
    while (busy) begin
      warm++;
      @(negedge clk);
    end
    checks++;
    if (warm != NC) begin
      failures++;
      $display("FAIL warm-up took %0d cycles, expected %0d", warm, NC);
    end
    sent = 0; got = 0;
    while (got < M) begin
      in_valid  = (sent < M) && ($urandom_range(3) != 0);
      in_bit    = (sent < M) ? data[sent] : 1'b0;
      out_ready = ($urandom_range(3) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (out_bit !== (data[got] ^ cseq[got])) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d: got %0b expected %0b", got, out_bit,
                                      data[got] ^ cseq[got]);
        end
        got++;
      end
      if (in_valid && in_ready) sent++;
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(CH_PDSCH, 1, 0, 1, 0, 0);
    run(CH_PDSCH, 4660, 1, 7, 301, 0);
    run(CH_PMCH, 0, 0, 12, 0, 77);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
