// tb_sova_csa: random and corner-case checks of one CSA unit. For each pair
// of candidate sums (including ties, differences above 63 and values that
// straddle the wrap-around of the path metric) it checks the decision, the
// saturated metric difference, the selected metric and both next partial
// sums one cycle later.
module tb_sova_csa;
  import sova_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pm_t  in0, in1, out [2], metric;
  bm_t  bmn [2];
  logic dec;
  mag_t delta;
  int checks = 0, failures = 0;

  sova_csa dut (.clk(clk), .rst_n(rst_n), .in0(in0), .in1(in1), .bm_next(bmn),
                .out(out), .dec(dec), .delta(delta), .metric(metric));

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask

  initial begin
    in0 = 0; in1 = 0; bmn = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 400; n++) begin
      int base, d, a0, a1, b0, b1, win, e;
      base = $urandom_range(0, 4095);
      case (n % 4)
        0: d = 0;
        1: d = int'($urandom_range(0, 20)) - 10;
        2: d = int'($urandom_range(0, 400)) - 200;
        default: d = int'($urandom_range(0, 1000)) - 500;
      endcase
      a0 = base; a1 = base + d;          // true values, may exceed 12 bits
      b0 = $urandom_range(0, 255); b1 = $urandom_range(0, 255);
      in0 <= pm_t'(a0); in1 <= pm_t'(a1); bmn <= '{bm_t'(b0), bm_t'(b1)};
      @(posedge clk);
      #1;
      win = (a1 < a0) ? a1 : a0;
      e = (a1 < a0) ? a0 - a1 : a1 - a0;
      if (e > 63) e = 63;
      chk("dec", dec, a1 < a0);
      chk("delta", delta, e);
      chk("metric", metric, (win + 8192) % 4096);
      chk("out0", out[0], (win + b0 + 8192) % 4096);
      chk("out1", out[1], (win + b1 + 8192) % 4096);
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
