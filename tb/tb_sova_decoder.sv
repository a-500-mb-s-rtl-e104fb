// tb_sova_decoder: end-to-end check of sova_decoder for both trellis codes at
// reduced window sizes (L=12, M=10, deliberately unequal). Random user bits
// go through the matching encoder/channel model with noise; every soft
// output (decided bit and six-bit reliability) is compared with the
// traceback reference of sova_ref_pkg. Also checked: the output starts
// exactly LATENCY cycles after the first symbol and then comes one per
// cycle, and on the clean part of the stream the decided bits equal the
// transmitted ones.
module tb_sova_decoder;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int L = 12, M = 10, N = 700;
  localparam int LAT_E = L + M + 5, LAT_O = L + M + 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  smag_t se, ae, so, soft_e, soft_o;
  logic  ve, vo;
  int    checks = 0, failures = 0;

  sova_decoder #(.CODE(CODE_EPR4),  .L(L), .M(M)) dut_e (
    .clk(clk), .rst_n(rst_n), .sample(se), .apriori(ae), .soft_out(soft_e), .soft_valid(ve));
  sova_decoder #(.CODE(CODE_OCT13), .L(L), .M(M)) dut_o (
    .clk(clk), .rst_n(rst_n), .sample(so), .apriori(7'd0), .soft_out(soft_o), .soft_valid(vo));

  int ue[$], uo[$];
  logic [6:0] ye[$], apq[$], xo[$];
  sova_ref re, ro;
  int cyc, ne, no, first_e, first_o, gap_e, gap_o;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    gen_reset();
    // first half clean, second half noisy; a-priori values on the EPR4 side
    gen_epr4(N / 2, 0, 0, ue, ye, apq);
    gen_epr4(N / 2, 14, 20, ue, ye, apq);
    gen_oct13(N / 2, 24, 0, uo, xo);
    gen_oct13(N / 2, 16, 30, uo, xo);
    re = new(EPR4, L, M);  re.samp = ye; re.apri = apq; re.run();
    ro = new(OCT13, L, M); ro.samp = xo; ro.apri = xo;  ro.run();
    se = 0; ae = 0; so = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    ne = 0; no = 0; first_e = -1; first_o = -1; gap_e = 0; gap_o = 0;
    for (cyc = 0; cyc < N + LAT_O + 2; cyc++) begin
      se <= (cyc < N) ? ye[cyc] : 7'd0;
      ae <= (cyc < N) ? apq[cyc] : 7'd0;
      so <= (cyc < N) ? xo[cyc] : 7'd0;
      @(posedge clk);
      #1;
      if (ve) begin
        int h, r;
        if (first_e < 0) first_e = cyc;
        if (cyc - first_e != ne) gap_e++;
        if (ne < N - L - M - 8) begin
          re.soft_bit(ne, h, r);
          check($sformatf("epr4 bit %0d hard", ne), soft_e[6], h);
          check($sformatf("epr4 bit %0d rel", ne), soft_e[5:0], r);
          if (ne >= 4 && ne < N / 2 - L - M - 8) check($sformatf("epr4 bit %0d vs data", ne), soft_e[6], ue[ne]);
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
          if (no >= 4 && no < N / 2 - L - M - 8) check($sformatf("oct13 bit %0d vs data", no), soft_o[6], uo[no]);
        end
        no++;
      end
    end
    // latency: symbol presented in loop cycle 0 is captured at the end of it
    check("epr4 latency", first_e, LAT_E - 1);
    check("oct13 latency", first_o, LAT_O - 1);
    check("epr4 one bit per clock", gap_e, 0);
    check("oct13 one bit per clock", gap_o, 0);
    $display("reference: epr4 saturated deltas %0d, oct13 saturated deltas %0d", re.nsat, ro.nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
