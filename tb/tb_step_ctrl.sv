// tb_step_ctrl: checks the step sequencer with M = 3 steps and ALPHA = 4.
// For several subcarrier counts it checks that every step reads and writes
// back each subcarrier once and in order, that step numbers run 1..M, that
// the first result of the last step comes (N+ALPHA)(M-1)+ALPHA cycles after
// the first read, and that done follows the last result.
module tb_step_ctrl;
  localparam int M = 3, ALPHA = 4, N_MAX = 16;
  logic       clk = 0, rst_n = 0, start = 0;
  logic [4:0] n_sc = '0;
  logic       busy, done, rd_valid, wr_valid;
  logic [1:0] step;
  logic [3:0] rd_idx, wr_idx;
  int         checks = 0, failures = 0;

  step_ctrl #(.M(M), .ALPHA(ALPHA), .N_MAX(N_MAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    int rd_cnt [M+1], wr_cnt [M+1];
    int cyc, first_rd, first_last_wr, done_cyc, exp_rd, exp_wr, last_step;
    for (int s = 0; s <= M; s++) begin rd_cnt[s] = 0; wr_cnt[s] = 0; end
    @(negedge clk);
    start = 1; n_sc = 5'(n);
    @(negedge clk);
    start = 0;
    cyc = 0; first_rd = -1; first_last_wr = -1; done_cyc = -1;
    exp_rd = 0; exp_wr = 0; last_step = 1;
    while (done_cyc < 0 && cyc < 1000) begin
      if (busy) begin
        if (int'(step) != last_step) begin
          checks++;
          if (int'(step) != last_step + 1) failures++;
          if (rd_cnt[last_step] != n || wr_cnt[last_step] != n) begin
            failures++; $display("FAIL: step %0d rd %0d wr %0d", last_step, rd_cnt[last_step], wr_cnt[last_step]);
          end
          last_step = int'(step); exp_rd = 0; exp_wr = 0;
        end
        if (rd_valid) begin
          if (first_rd < 0) first_rd = cyc;
          if (int'(rd_idx) != exp_rd) failures++;
          exp_rd++; rd_cnt[step]++;
        end
        if (wr_valid) begin
          if (step == 2'(M) && first_last_wr < 0) first_last_wr = cyc;
          if (int'(wr_idx) != exp_wr) failures++;
          exp_wr++; wr_cnt[step]++;
        end
      end
      if (done) done_cyc = cyc;
      @(negedge clk);
      cyc++;
    end
    checks += 3;
    if (rd_cnt[M] != n || wr_cnt[M] != n) failures++;
    if (first_last_wr - first_rd != (n + ALPHA) * (M - 1) + ALPHA) begin
      failures++; $display("FAIL: processing cycles %0d", first_last_wr - first_rd);
    end
    if (done_cyc != first_rd + (n + ALPHA) * M) begin
      failures++; $display("FAIL: done at %0d", done_cyc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5);
    run(1);
    run(16);
    checks++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
