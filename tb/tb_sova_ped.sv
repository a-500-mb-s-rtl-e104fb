// tb_sova_ped: random decision vectors drive two path-equivalence detectors
// (EPR4 and Octal(13) flavour). Every cycle and for every state i, the two
// paths entering i are traced back explicitly through the decision history,
// and the expected step-difference flags and per-stage equivalence outputs
// are compared with eqbar.
module tb_sova_ped;
  import sova_pkg::*;
  localparam int M = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NS-1:0] dec;
  logic [M-1:0]  eq_e [NS], eq_o [NS];
  logic [NS-1:0] hist[$];
  int checks = 0, failures = 0;

  sova_ped #(.CODE(CODE_EPR4),  .M(M)) dut_e (.clk(clk), .rst_n(rst_n), .dec_d(dec), .eqbar(eq_e));
  sova_ped #(.CODE(CODE_OCT13), .M(M)) dut_o (.clk(clk), .rst_n(rst_n), .dec_d(dec), .eqbar(eq_o));

  // decision k steps back from state s at time t (history D[0..t-1])
  function automatic int tbk(input int s, input int t, input int k);
    int d;
    d = 0;
    for (int x = 1; x <= k; x++) begin
      d = (t - x < 0) ? 0 : hist[t - x][s];
      s = (s >> 1) | (d << 2);
    end
    return d;
  endfunction

  initial begin
    dec = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      logic [NS-1:0] d;
      d = NS'($urandom);
      dec <= d;
      @(posedge clk);
      #1;
      hist.push_back(d);
      for (int i = 0; i < 8; i++) begin
        int df [M];
        df[0] = 1;
        for (int s = 1; s < M; s++) df[s] = tbk(i >> 1, t + 1, s) != tbk((i >> 1) | 4, t + 1, s);
        for (int j = 0; j < M; j++) begin
          checks += 2;
          if (eq_o[i][j] != df[j]) begin
            failures++;
            if (failures < 10) $display("FAIL oct13 t=%0d i=%0d j=%0d", t, i, j);
          end
          if (eq_e[i][j] != (df[j] ^ ((j > 0) ? df[j - 1] : 0))) begin
            failures++;
            if (failures < 10) $display("FAIL epr4 t=%0d i=%0d j=%0d", t, i, j);
          end
        end
      end
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
