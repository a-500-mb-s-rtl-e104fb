// tb_sova_chip: end-to-end test of the two-decoder chip at its default sizes
// (L = M = 16). Random user bits are encoded, sent through the EPR4 channel
// (with precoder) or the Octal(13) code, and disturbed with uniform noise in
// part of the stream; the EPR4 decoder also gets a-priori values. Every soft
// output of both decoders is compared with the traceback reference
// (sova_ref_pkg); decided bits on the clean stretches are compared with the
// transmitted bits; latency and one-bit-per-clock throughput are checked.
// Mechanisms that must occur at least once: saturation of a metric
// difference, a reliability below 111111 (RMU minimum taken), an output
// left at 111111, wrap-around of the modulo path metrics, and a traceback
// starting from a state other than 0.
module tb_sova_chip;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int L = 16, M = 16, N = 3000;
  localparam int LAT_E = L + M + 5, LAT_O = L + M + 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  smag_t se, ae, so, soft_e, soft_o;
  logic  ve, vo;
  int    checks = 0, failures = 0;

  sova_chip dut (
    .clk(clk), .rst_n(rst_n),
    .epr4_sample(se), .epr4_apriori(ae), .epr4_soft(soft_e), .epr4_valid(ve),
    .oct13_sample(so), .oct13_soft(soft_o), .oct13_valid(vo));

  int ue[$], uo[$];
  logic [6:0] ye[$], apq[$], xo[$];
  sova_ref re, ro;
  int cyc, ne, no, first_e, first_o, gap_e, gap_o;
  int n_sat, n_minrel, n_maxrel, n_wrap, n_beststart, n_errs;
  pm_t last_m0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Bits whose decoding window lies in the noise-free start of the stream.
  // (After noise the rate-one Octal(13) trellis may settle on a wrong but
  // equally consistent path, so later clean stretches are not compared.)
  function automatic bit clean(input int T);
    return T >= 8 && T < 500 - L - M - 8;
  endfunction

  initial begin
    gen_reset();
    for (int b = 0; b < N / 1000; b++) begin
      gen_epr4(500, 0, 0, ue, ye, apq);
      gen_epr4(500, 12 + 4 * b, 24, ue, ye, apq);
      gen_oct13(500, 20, 0, uo, xo);
      gen_oct13(500, 12, 26 + 4 * b, uo, xo);
    end
    re = new(EPR4, L, M);  re.samp = ye; re.apri = apq; re.run();
    ro = new(OCT13, L, M); ro.samp = xo; ro.apri = xo;  ro.run();
    se = 0; ae = 0; so = 0;
    n_sat = 0; n_minrel = 0; n_maxrel = 0; n_wrap = 0; n_beststart = 0; n_errs = 0;
    last_m0 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    ne = 0; no = 0; first_e = -1; first_o = -1; gap_e = 0; gap_o = 0;
    for (cyc = 0; cyc < N + LAT_O + 2; cyc++) begin
      se <= (cyc < N) ? ye[cyc] : 7'd0;
      ae <= (cyc < N) ? apq[cyc] : 7'd0;
      so <= (cyc < N) ? xo[cyc] : 7'd0;
      @(posedge clk);
      #1;
      // mechanism monitors
      for (int j = 0; j < NS; j++) if (dut.u_sova_epr4.delta[j] == MAG_MAX) n_sat++;
      if (dut.u_sova_epr4.metric[0] < last_m0 && (last_m0 - dut.u_sova_epr4.metric[0]) > 2048) n_wrap++;
      last_m0 = dut.u_sova_epr4.metric[0];
      if (dut.u_sova_13.best != 0) n_beststart++;
      if (ve) begin
        int h, r;
        if (first_e < 0) first_e = cyc;
        if (cyc - first_e != ne) gap_e++;
        if (ne < N - L - M - 8) begin
          re.soft_bit(ne, h, r);
          check($sformatf("epr4 bit %0d hard", ne), soft_e[6], h);
          check($sformatf("epr4 bit %0d rel", ne), soft_e[5:0], r);
          if (clean(ne)) check($sformatf("epr4 bit %0d vs data", ne), soft_e[6], ue[ne]);
          else if (soft_e[6] != ue[ne]) n_errs++;
          if (soft_e[5:0] == 63) n_maxrel++; else n_minrel++;
        end
        ne++;
      end
      if (vo) begin
        int h, r;
        if (first_o < 0) first_o = cyc;
        if (cyc - first_o != no) gap_o++;
        if (no < N - L - M - 8) begin
          ro.soft_bit(no, h, r);
          check($sformatf("oct13 bit %0d hard", no), soft_o[6], h);
          check($sformatf("oct13 bit %0d rel", no), soft_o[5:0], r);
          if (clean(no)) check($sformatf("oct13 bit %0d vs data", no), soft_o[6], uo[no]);
          else if (soft_o[6] != uo[no]) n_errs++;
          if (soft_o[5:0] == 63) n_maxrel++; else n_minrel++;
        end
        no++;
      end
    end
    check("epr4 latency", first_e, LAT_E - 1);
    check("oct13 latency", first_o, LAT_O - 1);
    check("epr4 one bit per clock", gap_e, 0);
    check("oct13 one bit per clock", gap_o, 0);
    $display("mechanisms: delta saturations %0d, reliabilities below max %0d, at max %0d, metric wraps %0d, tracebacks from state != 0 %0d",
             n_sat, n_minrel, n_maxrel, n_wrap, n_beststart);
    $display("decision errors in noisy stretches (information only): %0d", n_errs);
    check("delta saturation seen", n_sat > 0, 1);
    check("RMU minimum taken", n_minrel > 0, 1);
    check("output at max reliability", n_maxrel > 0, 1);
    check("path metric wrap seen", n_wrap > 0, 1);
    check("traceback from best state != 0", n_beststart > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
