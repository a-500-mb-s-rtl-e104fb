// tb_sova_csa_array: feeds random branch metrics to the eight-CSA array and
// checks every decision, metric difference and path metric against an
// integer Viterbi recursion on the radix-2 trellis (state j reached from
// j>>1 and (j>>1)+4 with new bit j&1), starting in state 0. The first output
// after reset is the start step: state 0 at metric 0, the others at the
// start penalty 2^(PM_W-3).
module tb_sova_csa_array;
  import sova_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bm_t  bm [NS][2];
  logic [NS-1:0] dec;
  mag_t delta [NS];
  pm_t  metric [NS];
  int checks = 0, failures = 0;
  longint sm [8], part [8][2];
  bm_t nb [NS][2];

  sova_csa_array dut (.clk(clk), .rst_n(rst_n), .bm(bm), .dec(dec), .delta(delta), .metric(metric));

  task automatic chk(input string w, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask

  initial begin
    bm = '{default: '{default: '0}};
    foreach (part[p, a]) part[p][a] = (p == 0 && a == 0) ? 0 : 512;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      for (int p = 0; p < NS; p++)
        for (int a = 0; a < 2; a++)
          nb[p][a] = (n % 50 < 25) ? bm_t'($urandom_range(0, 255)) : bm_t'($urandom_range(0, 20));
      for (int p = 0; p < NS; p++)
        for (int a = 0; a < 2; a++) bm[p][a] <= nb[p][a];
      @(posedge clk);
      #1;
      for (int j = 0; j < 8; j++) begin
        longint c0, c1, e;
        c0 = part[j >> 1][j & 1];
        c1 = part[(j >> 1) | 4][j & 1];
        sm[j] = (c1 < c0) ? c1 : c0;
        e = (c1 < c0) ? c0 - c1 : c1 - c0;
        if (e > 63) e = 63;
        chk($sformatf("dec[%0d] step %0d", j, n), dec[j], c1 < c0);
        chk($sformatf("delta[%0d] step %0d", j, n), delta[j], e);
        chk($sformatf("metric[%0d] step %0d", j, n), metric[j], sm[j] % 4096);
      end
      for (int p = 0; p < 8; p++)
        for (int a = 0; a < 2; a++) part[p][a] = sm[p] + longint'(nb[p][a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
