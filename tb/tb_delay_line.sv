// tb_delay_line: checks that the delay unit returns every word exactly D
// cycles later, for D = 5 and for the pass-through case D = 0.
module tb_delay_line;
  logic        clk = 0, rst_n = 0;
  logic [15:0] din = '0, d5, d0;
  logic [15:0] hist [64];
  int          checks = 0, failures = 0;

  delay_line #(.WIDTH(16), .D(5)) u5 (.clk, .rst_n, .din, .dout(d5));
  delay_line #(.WIDTH(16), .D(0)) u0 (.clk, .rst_n, .din, .dout(d0));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (d5 != '0) failures++;     // reset value
    rst_n = 1;
    for (int t = 0; t < 64; t++) begin
      @(negedge clk);
      din = 16'($urandom);
      hist[t] = din;
      #1;
      checks++;
      if (d0 != din) failures++;
      if (t >= 5) begin
        checks++;
        if (d5 != hist[t-5]) begin failures++; $display("FAIL at %0d", t); end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
