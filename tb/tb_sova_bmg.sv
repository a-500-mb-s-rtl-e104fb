// tb_sova_bmg: exhaustive check of the branch metric generator. For both
// codes and every sample / a-priori pair on a grid of values, all 16 branch
// metrics are compared with metrics computed here from the channel and code
// definitions (EPR4 levels 8*(a + a1 - a2 - a3) in bipolar form, Octal(13)
// code bit u ^ u2 ^ u3).
module tb_sova_bmg;
  import sova_pkg::*;
  smag_t samp, ap;
  bm_t   bme [NS][2], bmo [NS][2];
  int checks = 0, failures = 0;

  sova_bmg #(.CODE(CODE_EPR4))  dut_e (.sample(samp), .apriori(ap), .bm(bme));
  sova_bmg #(.CODE(CODE_OCT13)) dut_o (.sample(samp), .apriori(ap), .bm(bmo));

  function automatic int pm1(input int b); return b ? 1 : -1; endfunction

  initial begin
    for (int s = 0; s < 128; s += 3) begin
      for (int q = 0; q < 128; q += 13) begin
        int y;
        samp = 7'(s); ap = 7'(q);
        #1;
        y = s[6] ? -(s & 63) : (s & 63);
        for (int p = 0; p < 8; p++) begin
          for (int a = 0; a < 2; a++) begin
            int lev, e, u, x;
            // p = {b[t-3], b[t-2], b[t-1]}
            lev = 8 * (pm1(a) + pm1(p & 1) - pm1((p >> 2) & 1) - pm1((p >> 1) & 1));
            e = (y > lev) ? y - lev : lev - y;
            u = a ^ (p & 1);
            if (((q >> 6) & 1) != u) e += q & 63;
            checks++;
            if (int'(bme[p][a]) != e) begin
              failures++;
              if (failures < 10) $display("FAIL epr4 s=%0d q=%0d p=%0d a=%0d got %0d exp %0d", s, q, p, a, bme[p][a], e);
            end
            x = a ^ ((p >> 1) & 1) ^ ((p >> 2) & 1);
            e = (((s >> 6) & 1) != x) ? (s & 63) : 0;
            checks++;
            if (int'(bmo[p][a]) != e) begin
              failures++;
              if (failures < 10) $display("FAIL oct13 s=%0d p=%0d a=%0d got %0d exp %0d", s, p, a, bmo[p][a], e);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
