// flex_ctrl: input admission and per-problem context store.
//
// A problem (R, 1/R_ii, y', q^(i), M_T and a caller label) is accepted when
// in_valid and in_ready are both high. The folded units downstream take 8
// cycles per problem (F = 8), so at most one problem is accepted every F
// cycles. M_T may change from one problem to the next; since a problem with
// fewer streams finishes earlier, two problems of different M_T could bring
// their final nodes to the Min_Finder in overlapping cycles. A reservation
// register therefore records, for each coming cycle, whether the Min_Finder
// window is taken, and a problem whose window would overlap is held back
// (in_ready low) until it fits. Results may thus leave in a different order
// than problems entered; the label identifies them.
//
// Each accepted problem is written into one of NCTX context slots (round
// robin); its slot number, the tag, travels with every node, and each tree
// level reads the column of R it needs, 1/R_ii and q^(i) from the slot.
// NCTX = 32 exceeds the 22 problems that can be in flight at the largest
// latency, so a slot is never reused while in use.
//
// in_ready depends on in_mt in the same cycle. Reset is synchronous, active
// low; in_ready is low during reset.
//
// The published design states only that M_T may change on the fly and that
// the units are folded by 8; this admission scheme and the context store are
// this design's own way of providing that.
module flex_ctrl
  import flex_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  mt_t                     in_mt,
  input  fx_t  [M-1:0][M-1:0]     in_r,      // R_{k,l} at [k-1][l-1]
  input  fx_t  [M-1:0]            in_rinv,   // 1/R_ii at [i-1]
  input  q_t   [M-1:0]            in_q,      // q^(i) at [i-1]
  input  logic [IDW-1:0]          in_id,
  output logic                    in_ready,
  output logic                    acc,       // problem accepted this cycle
  output tag_t                    acc_tag,   // its context slot
  output mt_t                     acc_mt,    // its M_T, normalised to 2..4
  input  tag_t [M-2:0]            col_tag,   // per level 1..M-1: slot to read
  output col_t [M-2:0]            col,       // level l column at [l-1]
  input  tag_t                    id_tag,
  output logic [IDW-1:0]          id
);
  localparam int RL = mf_window(3'd4) + F;

  typedef struct packed {
    fx_t  [M-1:0][M-1:0] r;
    fx_t  [M-1:0]        rinv;
    q_t   [M-1:0]        q;
    logic [IDW-1:0]      id;
  } ctx_t;

  ctx_t                      mem [NCTX];
  logic [RL-1:0]             res;        // bit d: Min_Finder busy d cycles ahead
  logic [RL-1:0]             win;
  logic [$clog2(F+1)-1:0]    gap;        // cycles since the last acceptance
  tag_t                      wp;
  logic                      up;

  always_comb begin
    acc_mt   = mt_norm(in_mt);
    win      = {{(RL-F){1'b0}}, {F{1'b1}}} << mf_window(acc_mt);
    in_ready = up && (gap >= ($clog2(F+1))'(F)) && ((res & win) == '0);
    acc      = in_valid && in_ready;
    acc_tag  = wp;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      up  <= 1'b0;
      res <= '0;
      gap <= ($clog2(F+1))'(F);
      wp  <= '0;
    end else begin
      up  <= 1'b1;
      res <= (res | (acc ? win : '0)) >> 1;
      if (acc)                               gap <= ($clog2(F+1))'(1);
      else if (gap < ($clog2(F+1))'(F))      gap <= gap + 1'b1;
      if (acc) wp <= wp + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (acc) mem[wp] <= '{r: in_r, rinv: in_rinv, q: in_q, id: in_id};

  always_comb begin
    for (int unsigned l = 0; l < M - 1; l++) begin
      for (int unsigned k = 0; k < M; k++) col[l].rcol[k] = mem[col_tag[l]].r[k][l];
      col[l].rinv = mem[col_tag[l]].rinv[l];
      col[l].q    = mem[col_tag[l]].q[l];
    end
    id = mem[id_tag].id;
  end
endmodule
