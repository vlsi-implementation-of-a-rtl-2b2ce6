// mmse_detector_top: the two configurations of the scalable pipeline MMSE
// MIMO detector for a 4x4 MIMO-OFDM receiver, side by side.
//
// d9_*: 9-step detector (one 2x2 INV, two 2x2 MULs, one 2x2 ADD; 12 pipeline
//       stages), sized for about 108 subcarriers within 4 us at 250 MHz.
// d2_*: 2-step detector (4x4 MUL + 4x4 INV HALF; 15 pipeline stages), fast
//       enough for 472 subcarriers at 160 MHz.
// Both compute the MMSE filter G = (A A^H + sigma^2 I)^-1 A for every
// subcarrier from channel matrices loaded through their h_* ports; G leaves
// on the g_* ports towards the MIMO decoder (s_hat = G y), which is not part
// of this design. The two detectors share only clock and reset.
// There is no reset synchroniser: rst_n is applied asynchronously and is
// also used to disable the assertions inside the detectors.
module mmse_detector_top
  import mmse_pkg::*;
#(
  parameter int N_MAX = 512,
  localparam int NW   = $clog2(N_MAX + 1),
  localparam int AW   = $clog2(N_MAX)
) (
  input  logic          clk,
  input  logic          rst_n,
  // 9-step detector
  input  logic          d9_h_we,
  input  logic [AW-1:0] d9_h_addr,
  input  mat4_t         d9_h_wdata,
  input  fx_t           d9_sigma2,
  input  logic          d9_start,
  input  logic [NW-1:0] d9_n_sc,
  output logic          d9_busy,
  output logic          d9_done,
  output sel_t          d9_sel,
  output logic [3:0]    d9_step,
  output logic          d9_g_valid,
  output logic [1:0]    d9_g_blk,
  output logic [AW-1:0] d9_g_idx,
  output mat2_t         d9_g_data,
  // 2-step detector
  input  logic          d2_h_we,
  input  logic [AW-1:0] d2_h_addr,
  input  mat4_t         d2_h_wdata,
  input  fx_t           d2_sigma2,
  input  logic          d2_start,
  input  logic [NW-1:0] d2_n_sc,
  output logic          d2_busy,
  output logic          d2_done,
  output sel_t          d2_sel,
  output logic          d2_g_valid,
  output logic [AW-1:0] d2_g_idx,
  output mat4_t         d2_g_data
);
  det9 #(.N_MAX(N_MAX)) u_det9 (
    .clk, .rst_n, .h_we(d9_h_we), .h_addr(d9_h_addr), .h_wdata(d9_h_wdata),
    .sigma2(d9_sigma2), .start(d9_start), .n_sc(d9_n_sc), .busy(d9_busy),
    .done(d9_done), .sel(d9_sel), .step(d9_step), .g_valid(d9_g_valid),
    .g_blk(d9_g_blk), .g_idx(d9_g_idx), .g_data(d9_g_data));

  det2 #(.N_MAX(N_MAX)) u_det2 (
    .clk, .rst_n, .h_we(d2_h_we), .h_addr(d2_h_addr), .h_wdata(d2_h_wdata),
    .sigma2(d2_sigma2), .start(d2_start), .n_sc(d2_n_sc), .busy(d2_busy),
    .done(d2_done), .sel(d2_sel), .g_valid(d2_g_valid), .g_idx(d2_g_idx),
    .g_data(d2_g_data));
endmodule
