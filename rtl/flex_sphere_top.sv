// flex_sphere_top: Flex-Sphere, a configurable sort-free sphere detector
// for multi-user MIMO uplinks with 2, 3 or 4 complex streams and 4-, 16- or
// 64-QAM chosen per stream.
//
// The detector searches the real-valued tree of the QR-decomposed channel
// (levels i = 8 .. 1, two levels per complex stream in the modified
// real-valued decomposition order: real and imaginary part of the same
// symbol are adjacent levels). The first two levels are expanded in full
// (8 x 8 = 64 nodes); below them every node keeps only its best child,
// found by rounding instead of sorting, and the best of the 64 surviving
// paths is the detected vector.
//
// Structure (as in the published block diagram):
//   flex_ctrl      admission, context store, Min_Finder window reservation
//   ped1           level 8, all 8 candidates at once
//   8 rows of      ped2 (level 7, 8 children per parent, one per cycle)
//                  followed by pedg at levels 6, 5, 4, 3, 2, 1
//   min_finder     takes level 5, 3 or 1 per M_T, minimum over 64 nodes
//
// Interface: present a problem with in_valid; it is taken in a cycle where
// in_ready is high. R is upper triangular with R_{k,l} at in_r[k-1][l-1];
// a problem with M_T < 4 uses levels 8 down to 9 - 2*M_T, so its R and y'
// occupy the highest indices and the lower entries are ignored. The
// preprocessing (QR decomposition, channel ordering, 1/R_ii) is outside
// this design. The result appears with out_valid, carrying the label given
// with the problem; out_sym[i-1] is the detected real symbol of level i.
//
// Timing: one problem per 8 cycles at most; the result of a problem
// accepted in cycle t appears in cycle t + 84, t + 128 or t + 172 for
// M_T = 2, 3, 4, the published latencies. Results of problems with
// different M_T may leave out of order.
module flex_sphere_top
  import flex_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  fx_t  [M-1:0][M-1:0]  in_r,
  input  fx_t  [M-1:0]         in_rinv,
  input  fx_t  [M-1:0]         in_y,
  input  q_t   [M-1:0]         in_q,
  input  mt_t                  in_mt,
  input  logic [IDW-1:0]       in_id,
  output logic                 out_valid,
  output sym_t [M-1:0]         out_sym,
  output ped_t                 out_ped,
  output mt_t                  out_mt,
  output logic [IDW-1:0]       out_id
);
  logic                acc;
  tag_t                acc_tag;
  mt_t                 acc_mt;
  tag_t  [M-2:0]       col_tag;
  col_t  [M-2:0]       col;
  fx_t   [M-1:0]       rcol_top;

  logic                p1_valid;
  node_t [NCH-1:0]     p1_node;

  // outputs of levels 1 .. M-1, index level-1
  logic  [NCH-1:0]     lv_valid [M-1];
  node_t [NCH-1:0]     lv_node  [M-1];

  logic  [2:0]         mf_valid;
  node_t [2:0][NCH-1:0] mf_node;
  node_t               det;

  flex_ctrl u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_mt, .in_r, .in_rinv, .in_q, .in_id,
    .in_ready, .acc, .acc_tag, .acc_mt,
    .col_tag, .col,
    .id_tag(det.tag), .id(out_id)
  );

  always_comb
    for (int unsigned k = 0; k < M; k++) rcol_top[k] = in_r[k][M-1];

  ped1 u_ped1 (
    .clk, .rst_n,
    .in_valid(acc), .in_y, .in_rcol(rcol_top), .in_q(in_q[M-1]),
    .in_tag(acc_tag), .in_mt(acc_mt),
    .out_valid(p1_valid), .out_node(p1_node)
  );

  // each level reads its problem's column through the tag of row 0; all
  // rows carry nodes of the same problem in the same cycle
  assign col_tag[M-2] = p1_node[0].tag;
  for (genvar l = 1; l < M - 1; l++) begin : g_tag
    assign col_tag[l-1] = lv_node[l][0].tag;
  end

  for (genvar r = 0; r < NCH; r++) begin : g_row
    ped2 u_ped2 (
      .clk, .rst_n,
      .in_valid(p1_valid), .in_node(p1_node[r]),
      .in_rcol(col[M-2].rcol), .in_q(col[M-2].q),
      .out_valid(lv_valid[M-2][r]), .out_node(lv_node[M-2][r])
    );
    for (genvar l = M - 2; l >= 1; l--) begin : g_lvl
      pedg #(.LEVEL(l)) u_pedg (
        .clk, .rst_n,
        .in_valid(lv_valid[l][r]), .in_node(lv_node[l][r]), .in_col(col[l-1]),
        .out_valid(lv_valid[l-1][r]), .out_node(lv_node[l-1][r])
      );
    end
  end

  // Min_Finder taps: level 5, 3, 1 for M_T = 2, 3, 4
  for (genvar t = 0; t < 3; t++) begin : g_tap
    localparam int LV = M + 1 - 2 * (t + 2);
    assign mf_valid[t] = lv_valid[LV-1][0];
    assign mf_node[t]  = lv_node[LV-1];
  end

  min_finder u_mf (
    .clk, .rst_n,
    .in_valid(mf_valid), .in_node(mf_node),
    .out_valid, .out_node(det)
  );

  assign out_sym = det.sym;
  assign out_ped = det.ped;
  assign out_mt  = det.mt;
endmodule
