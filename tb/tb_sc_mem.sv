// tb_sc_mem: checks the per-subcarrier buffer against a model: random
// writes with random per-field enables, then reads of every address
// (asynchronous: data is valid in the cycle the address is applied).
module tb_sc_mem;
  localparam int DEPTH = 16, NF = 3, FW = 8;
  logic                clk = 0;
  logic [NF-1:0]       we = '0;
  logic [3:0]          waddr = '0, raddr = '0;
  logic [NF*FW-1:0]    wdata = '0, rdata;
  logic [NF*FW-1:0]    model [DEPTH];
  int                  checks = 0, failures = 0;

  sc_mem #(.DEPTH(DEPTH), .NF(NF), .FW(FW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every location once with all fields
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = '1; waddr = 4'(a); wdata = NF*FW'($urandom);
      model[a] = wdata;
    end
    // partial writes
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      we = NF'($urandom); waddr = 4'($urandom); wdata = NF*FW'($urandom);
      for (int f = 0; f < NF; f++)
        if (we[f]) model[waddr][f*FW +: FW] = wdata[f*FW +: FW];
      raddr = 4'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr] && !(we != 0 && raddr == waddr)) failures++;
    end
    @(negedge clk) we = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      raddr = 4'(a);
      #1;
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL at %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
