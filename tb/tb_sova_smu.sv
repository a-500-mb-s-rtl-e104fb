// tb_sova_smu: random decision vectors and random start states drive the
// register-exchange survivor memory; every cycle ml_state is compared with
// an explicit L-step traceback through the stored decision history
// (predecessor of state s under decision d is {d, s[2:1]}).
module tb_sova_smu;
  import sova_pkg::*;
  localparam int L = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NS-1:0] dec;
  state_t st, ml;
  logic [NS-1:0] hist[$];
  int checks = 0, failures = 0;

  sova_smu #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .dec(dec), .start_state(st), .ml_state(ml));

  function automatic int tb_state(input int s, input int t);
    // state at time t-L on the survivor of s at time t (history D[0..t-1])
    for (int k = t - 1; k >= t - L; k--) s = (s >> 1) | (((k < 0) ? 0 : hist[k][s]) << 2);
    return s;
  endfunction

  initial begin
    dec = '0; st = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      logic [NS-1:0] d;
      d = NS'($urandom);
      dec <= d;
      @(posedge clk);
      hist.push_back(d);
      for (int s = 0; s < 8; s++) begin
        st = state_t'(s);
        #1;
        checks++;
        if (int'(ml) != tb_state(s, t + 1)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d start %0d got %0d exp %0d", t, s, ml, tb_state(s, t + 1));
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
