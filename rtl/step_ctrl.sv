// step_ctrl: step sequencer of a scalable pipeline detector.
//
// Runs the M steps of the preprocessing one after the other. In every step
// the N active subcarriers are fed to the pipeline in N consecutive cycles
// (rd_valid, rd_idx); ALPHA cycles after each read the result leaves the
// pipeline (wr_valid, wr_idx) and is written back. A step lasts N + ALPHA
// cycles, so the first result of the last step appears
//   (N + ALPHA)(M - 1) + ALPHA
// cycles after the first read, the published processing-time formula.
// The current step number (1..M) is decoded by the detector into Sel and the
// operand routing.
// Handshake (this design's choice): a one-cycle start pulse while idle
// samples n_sc (1..N_MAX); busy is high while steps run; done pulses for one
// cycle after the last result of step M.
// The assertions below use rst_n in their disable condition as well as the
// flops' asynchronous reset; lint tools may point this out, and it is intended.
module step_ctrl #(
  parameter int M     = 9,
  parameter int ALPHA = 12,
  parameter int N_MAX = 512,
  localparam int NW   = $clog2(N_MAX + 1),
  localparam int AW   = $clog2(N_MAX),
  localparam int SW   = $clog2(M + 1),
  localparam int CW   = $clog2(N_MAX + ALPHA + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] n_sc,
  output logic          busy,
  output logic          done,
  output logic [SW-1:0] step,
  output logic          rd_valid,
  output logic [AW-1:0] rd_idx,
  output logic          wr_valid,
  output logic [AW-1:0] wr_idx
);
  logic [CW-1:0] cnt;
  logic [CW-1:0] n_r;
  logic          last_cycle;

  assign last_cycle = (cnt == n_r + CW'(ALPHA) - CW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      step <= '0;
      cnt  <= '0;
      n_r  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          step <= SW'(1);
          cnt  <= '0;
          n_r  <= CW'(n_sc);
        end
      end else if (last_cycle) begin
        cnt <= '0;
        if (step == SW'(M)) begin
          busy <= 1'b0;
          done <= 1'b1;
          step <= '0;
        end else begin
          step <= step + SW'(1);
        end
      end else begin
        cnt <= cnt + CW'(1);
      end
    end
  end

  assign rd_valid = busy && (cnt < n_r);
  assign rd_idx   = AW'(cnt);
  assign wr_valid = busy && (cnt >= CW'(ALPHA));
  assign wr_idx   = AW'(cnt - CW'(ALPHA));

  a_nsc_range: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (n_sc >= NW'(1) && n_sc <= NW'(N_MAX)))
    else $error("step_ctrl: n_sc out of range");
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (step >= SW'(1) && step <= SW'(M)));
endmodule
