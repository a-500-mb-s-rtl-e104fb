// tb_sova_fifo: drives random words into sova_fifo and checks that each one
// comes out exactly DEPTH cycles later, and that the output is zero until
// the first word arrives.
module tb_sova_fifo;
  localparam int W = 11, D = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [W-1:0] din, dout;
  logic [W-1:0] hist[$];
  int checks = 0, failures = 0;

  sova_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout));

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 200; c++) begin
      din <= W'($urandom);
      @(posedge clk);
      #1;
      hist.push_back(din);
      checks++;
      if (c >= D - 1) begin
        if (dout !== hist[c - D + 1]) begin failures++; $display("FAIL cycle %0d", c); end
      end else if (dout !== '0) begin failures++; $display("FAIL reset contents cycle %0d", c); end
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
