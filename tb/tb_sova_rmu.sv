// tb_sova_rmu: random metric differences, equivalence vectors and hard bits
// drive the reliability pipeline. For each bit the expected reliability is
// the minimum, starting from 63, of the deltas of the M cycles it spends in
// the pipeline, taken only where that cycle's equivalence bit for its stage
// is set; it must appear with its hard bit exactly M cycles after entry.
module tb_sova_rmu;
  import sova_pkg::*;
  localparam int M = 7, N = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mag_t delta;
  logic [M-1:0] eq;
  logic hin;
  smag_t so;
  int checks = 0, failures = 0, updates = 0;
  int dq[N], hq[N];
  logic [M-1:0] eqq[N];

  sova_rmu #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .delta(delta), .eqbar(eq), .hard_in(hin), .soft_out(so));

  initial begin
    delta = '0; eq = '0; hin = 0;
    for (int c = 0; c < N; c++) begin
      dq[c] = (c % 3 == 0) ? 63 : $urandom_range(0, 63);
      hq[c] = $urandom_range(0, 1);
      eqq[c] = M'($urandom) & M'($urandom);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < N; c++) begin
      delta <= mag_t'(dq[c]); eq <= eqq[c]; hin <= hq[c][0];
      @(posedge clk);
      #1;
      if (c >= M) begin
        int b, r;
        b = c - M + 1;          // entered in cycle b, left after cycle b+M-1
        r = 63;
        for (int j = 0; j < M; j++)
          if (eqq[b + j][j] && dq[b + j] < r) begin r = dq[b + j]; updates++; end
        checks++;
        if (so !== {hq[b][0], 6'(r)}) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d got %h exp %0d/%0d", b, so, hq[b], r);
        end
      end
    end
    if (updates == 0) failures++;
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
