// det2: scalable pipeline MMSE preprocessing in 2 steps (4x4 MUL and
// 4x4 INV HALF: ten 2x2 MULs, five 2x2 ADDs, one 2x2 INV).
//
// Computes, for every subcarrier, G = (A A^H + sigma^2 I)^-1 A of the 4x4
// complex matrix A = [h11 h12; h21 h22]. The same two units are used in both
// steps; Sel swaps their order:
//   step 1 (Type A): A -> 4x4 MUL (b11, b12, b22) -> INV HALF (c1, c2, c4)
//                    -> intermediate memory
//   step 2 (Type B): memory (c4, c2, c1) -> INV HALF (c5, c6, c8)
//                    -> 4x4 MUL with A delayed 12 cycles -> G
// Both orders take 3 + 12 = 15 pipeline stages, so the first G leaves
// (N + 15) + 15 cycles after the first read.
// The unit structure and the 12-cycle delay on A follow the published
// design; the memory inside the module and the handshake are this design's.
// Interface: as det9, but G leaves whole (four 2x2 blocks) with g_valid.
// The assertions below use rst_n in their disable condition as well as the
// flops' asynchronous reset; lint tools may point this out, and it is intended.
module det2
  import mmse_pkg::*;
#(
  parameter int N_MAX = 512,
  parameter int ALPHA = 15,
  parameter int M     = 2,
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
  output logic          g_valid,
  output logic [AW-1:0] g_idx,
  output mat4_t         g_data
);
  localparam int T_IH = 12;   // latency of INV HALF = delay of A in step 2

  logic          rd_valid, wr_valid;
  logic [AW-1:0] rd_idx, wr_idx;
  logic [SW-1:0] step;

  step_ctrl #(.M(M), .ALPHA(ALPHA), .N_MAX(N_MAX)) u_ctrl (
    .clk, .rst_n, .start, .n_sc, .busy, .done, .step,
    .rd_valid, .rd_idx, .wr_valid, .wr_idx);

  assign sel = (step == SW'(2)) ? TYPE_B : TYPE_A;

  mat4_t h;
  sc_mem #(.DEPTH(N_MAX), .NF(4), .FW(MAT2_W)) u_hmem (
    .clk, .we({4{h_we}}), .waddr(h_addr), .wdata(h_wdata),
    .raddr(rd_idx), .rdata(h));

  // intermediate memory: c1, c2, c4 (fields 0, 1, 2)
  logic [3*MAT2_W-1:0] im_rdata, im_wdata;
  mat2_t rc1, rc2, rc4;
  assign {rc4, rc2, rc1} = im_rdata;

  // delay unit of 12 cycles on A for the second step
  mat4_t h_d;
  delay_line #(.WIDTH($bits(mat4_t)), .D(T_IH)) u_dh (.clk, .rst_n, .din(h), .dout(h_d));

  // 4x4 MUL
  logic  mm_in_v, mm_v;
  mat4_t mm_a, mm_o;
  logic  ih_in_v, ih_v;
  mat2_t ih_x, ih_y, ih_z, ih_inv, ih_mul, ih_add;

  assign mm_in_v = (sel == TYPE_A) ? rd_valid : ih_v;
  assign mm_a    = (sel == TYPE_A) ? h : h_d;
  mat4_mul u_mm (.clk, .rst_n, .sel, .in_valid(mm_in_v), .a(mm_a),
                 .c5(ih_inv), .c6(ih_mul), .c8(ih_add), .sigma2,
                 .out_valid(mm_v), .o(mm_o));

  // 4x4 INV HALF
  assign ih_in_v = (sel == TYPE_A) ? mm_v : rd_valid;
  assign ih_x    = (sel == TYPE_A) ? mm_o.b11 : rc4;
  assign ih_y    = (sel == TYPE_A) ? mm_o.b12 : rc2;
  assign ih_z    = (sel == TYPE_A) ? mm_o.b22 : rc1;
  inv_half u_ih (.clk, .rst_n, .in_valid(ih_in_v), .x(ih_x), .y(ih_y), .z(ih_z),
                 .sub(sel == TYPE_A), .out_valid(ih_v),
                 .inv_o(ih_inv), .mul_o(ih_mul), .add_o(ih_add));

  assign im_wdata = {ih_add, ih_mul, ih_inv};
  sc_mem #(.DEPTH(N_MAX), .NF(3), .FW(MAT2_W)) u_imem (
    .clk, .we({3{wr_valid && sel == TYPE_A}}), .waddr(wr_idx), .wdata(im_wdata),
    .raddr(rd_idx), .rdata(im_rdata));

  assign g_valid = wr_valid && (sel == TYPE_B);
  assign g_idx   = wr_idx;
  assign g_data  = mm_o;

  a_align: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid == ((sel == TYPE_A) ? ih_v : mm_v))
    else $error("det2: write-back out of step with the datapath");
endmodule
