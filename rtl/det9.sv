// det9: scalable pipeline MMSE preprocessing in 9 steps (one 2x2 INV, two
// 2x2 MULs, one 2x2 ADD).
//
// For every subcarrier k it computes the MMSE filter
//   G = (A A^H + sigma^2 I)^-1 A
// of the 4x4 complex matrix A = [h11 h12; h21 h22] (2x2 blocks) with
// Strassen's block inversion, spread over nine steps so that each step needs
// at most 2 MUL, 1 ADD and 1 INV:
//   step 1  b11 = h11 h11^H + h12 h12^H + sigma^2 I        (Type A)
//   step 2  b12 = h11 h21^H + h12 h22^H                     (Type A)
//   step 3  b22 = h21 h21^H + h22 h22^H + sigma^2 I        (Type A)
//   step 4  c1 = b11^-1, c2 = b12^H c1, c4 = b22 - c2 b12   (Type B)
//   step 5  c5 = c4^-1,  c6 = c2^H c5,  c8 = c1 + c6 c2      (Type B)
//   step 6  g11 = c8 h11 - c6 h21        step 7  g12 = c8 h12 - c6 h22
//   step 8  g21 = -c6^H h11 + c5 h21     step 9  g22 = -c6^H h12 + c5 h22
// Every step streams all N subcarriers through the 12-stage datapath and
// writes the results back to the intermediate memory, from which the next
// steps read them; steps 6-9 send their 2x2 block of G out instead.
// The step division and datapath follow the published design; the
// intermediate memory is inside the module here (shared external memory in the
// original), and the operand routing per step is this design's.
//
// Interface: load channel matrices with h_we/h_addr/h_wdata while idle, set
// sigma2, pulse start with n_sc = N. g_valid marks one 2x2 block of G
// (g_blk 0..3 = g11, g12, g21, g22) of subcarrier g_idx. done pulses after
// the last block. The first block of step 9 leaves (N+12)*8+12 cycles after
// the first read.
// The assertions below use rst_n in their disable condition as well as the
// flops' asynchronous reset; lint tools may point this out, and it is intended.
module det9
  import mmse_pkg::*;
#(
  parameter int N_MAX = 512,
  parameter int ALPHA = 12,
  parameter int M     = 9,
  localparam int NW   = $clog2(N_MAX + 1),
  localparam int AW   = $clog2(N_MAX),
  localparam int SW   = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  mat4_t         h_wdata,
  input  fx_t           sigma2,
  input  logic          start,
  input  logic [NW-1:0] n_sc,
  output logic          busy,
  output logic          done,
  output sel_t          sel,
  output logic [SW-1:0] step,
  output logic          g_valid,
  output logic [1:0]    g_blk,
  output logic [AW-1:0] g_idx,
  output mat2_t         g_data
);
  // intermediate memory fields
  typedef enum int {F_B11, F_B12, F_B22, F_C1, F_C2, F_C4, F_C5, F_C6, F_C8, NFLD} fld_e;
  localparam int NF = NFLD;

  logic          rd_valid, wr_valid;
  logic [AW-1:0] rd_idx, wr_idx;

  step_ctrl #(.M(M), .ALPHA(ALPHA), .N_MAX(N_MAX)) u_ctrl (
    .clk, .rst_n, .start, .n_sc, .busy, .done, .step,
    .rd_valid, .rd_idx, .wr_valid, .wr_idx);

  // channel matrix buffer: fields h11, h12, h21, h22
  mat4_t h;
  sc_mem #(.DEPTH(N_MAX), .NF(4), .FW(MAT2_W)) u_hmem (
    .clk, .we({4{h_we}}), .waddr(h_addr), .wdata(h_wdata),
    .raddr(rd_idx), .rdata(h));

  // intermediate values fed back between steps
  mat2_t         rd_f [NF];
  mat2_t         wr_f [NF];
  logic [NF-1:0] wr_en;
  logic [NF*MAT2_W-1:0] im_rdata, im_wdata;
  always_comb
    for (int f = 0; f < NF; f++) begin
      rd_f[f] = im_rdata[f*MAT2_W +: MAT2_W];
      im_wdata[f*MAT2_W +: MAT2_W] = wr_f[f];
    end
  sc_mem #(.DEPTH(N_MAX), .NF(NF), .FW(MAT2_W)) u_imem (
    .clk, .we(wr_en), .waddr(wr_idx), .wdata(im_wdata),
    .raddr(rd_idx), .rdata(im_rdata));

  // step decoding: Sel, operand routing and flags
  dp9_in_t  opnd;
  dp9_ctl_t ctl;
  always_comb begin
    opnd = '0;
    ctl  = '0;
    sel  = TYPE_A;
    unique case (step)
      SW'(1): begin
        opnd.m1_x = h.b11; opnd.m1_y = h.b11; opnd.m2_x = h.b12; opnd.m2_y = h.b12;
        ctl.m1_hy = 1'b1; ctl.m2_hy = 1'b1; ctl.add_sigma = 1'b1;
      end
      SW'(2): begin
        opnd.m1_x = h.b11; opnd.m1_y = h.b21; opnd.m2_x = h.b12; opnd.m2_y = h.b22;
        ctl.m1_hy = 1'b1; ctl.m2_hy = 1'b1;
      end
      SW'(3): begin
        opnd.m1_x = h.b21; opnd.m1_y = h.b21; opnd.m2_x = h.b22; opnd.m2_y = h.b22;
        ctl.m1_hy = 1'b1; ctl.m2_hy = 1'b1; ctl.add_sigma = 1'b1;
      end
      SW'(4): begin
        sel = TYPE_B;
        opnd.inv_x = rd_f[F_B11]; opnd.m1_x = rd_f[F_B12];
        opnd.m2_y  = rd_f[F_B12]; opnd.add_x = rd_f[F_B22];
        ctl.m1_hx = 1'b1; ctl.neg_a = 1'b1;
      end
      SW'(5): begin
        sel = TYPE_B;
        opnd.inv_x = rd_f[F_C4]; opnd.m1_x = rd_f[F_C2];
        opnd.m2_y  = rd_f[F_C2]; opnd.add_x = rd_f[F_C1];
        ctl.m1_hx = 1'b1;
      end
      SW'(6): begin
        opnd.m1_x = rd_f[F_C8]; opnd.m1_y = h.b11; opnd.m2_x = rd_f[F_C6]; opnd.m2_y = h.b21;
        ctl.neg_a = 1'b1;
      end
      SW'(7): begin
        opnd.m1_x = rd_f[F_C8]; opnd.m1_y = h.b12; opnd.m2_x = rd_f[F_C6]; opnd.m2_y = h.b22;
        ctl.neg_a = 1'b1;
      end
      SW'(8): begin
        opnd.m1_x = rd_f[F_C6]; opnd.m1_y = h.b11; opnd.m2_x = rd_f[F_C5]; opnd.m2_y = h.b21;
        ctl.m1_hx = 1'b1; ctl.neg_b = 1'b1;
      end
      SW'(9): begin
        opnd.m1_x = rd_f[F_C6]; opnd.m1_y = h.b12; opnd.m2_x = rd_f[F_C5]; opnd.m2_y = h.b22;
        ctl.m1_hx = 1'b1; ctl.neg_b = 1'b1;
      end
      default: ;
    endcase
  end

  logic  dp_valid;
  mat2_t add_q, mul1_q, inv_q;
  dp9_datapath #(.ALPHA(ALPHA)) u_dp (
    .clk, .rst_n, .sel, .ctl, .sigma2, .in_valid(rd_valid), .opnd,
    .out_valid(dp_valid), .add_out(add_q), .mul1_out(mul1_q), .inv_out(inv_q));

  // write-back: results of steps 1-5 go to the intermediate memory
  always_comb begin
    wr_en = '0;
    for (int f = 0; f < NF; f++) wr_f[f] = add_q;
    wr_f[F_C1] = inv_q;  wr_f[F_C5] = inv_q;
    wr_f[F_C2] = mul1_q; wr_f[F_C6] = mul1_q;
    if (wr_valid) begin
      unique case (step)
        SW'(1): wr_en[F_B11] = 1'b1;
        SW'(2): wr_en[F_B12] = 1'b1;
        SW'(3): wr_en[F_B22] = 1'b1;
        SW'(4): begin wr_en[F_C1] = 1'b1; wr_en[F_C2] = 1'b1; wr_en[F_C4] = 1'b1; end
        SW'(5): begin wr_en[F_C5] = 1'b1; wr_en[F_C6] = 1'b1; wr_en[F_C8] = 1'b1; end
        default: ;
      endcase
    end
  end

  // steps 6-9 deliver G block by block
  assign g_valid = wr_valid && (step >= SW'(6));
  assign g_blk   = 2'(step - SW'(6));
  assign g_idx   = wr_idx;
  assign g_data  = add_q;

  a_align: assert property (@(posedge clk) disable iff (!rst_n) wr_valid == dp_valid)
    else $error("det9: write-back out of step with the datapath");
endmodule
