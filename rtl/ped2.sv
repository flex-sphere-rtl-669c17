// ped2: PED_2, full expansion of level i = M-1 for one parent node.
//
// Each of the 8 rows of the detector has one PED_2. It takes the level-M
// node of its row and computes all 8 children at level M-1, the second
// fully expanded level: for s = -7, -5, ..., 7 in that order,
// e = z_{M-1} - R_{M-1,M-1} * s, T = T_parent + e^2, and the residuals of
// the lower levels are updated by R_{k,M-1} * s. Children with |s| > q^(M-1)
// get the maximum PED, and so do all children of an out-of-range parent.
//
// The unit is folded by F = 8: the children leave one per cycle, so the
// 8 x 8 = 64 level-(M-1) nodes of a problem come out of the 8 rows over 8
// consecutive cycles, and the units behind it process one node per cycle.
// Child j of a parent accepted in cycle t appears in cycle t + LAT + j
// (published LAT = 17; the generator and four arithmetic stages, products,
// residuals, squares and sums, take 5 cycles, the rest is padding).
// A new parent may be accepted at most once every 8 cycles; the assertion
// below checks this.
module ped2
  import flex_pkg::*;
#(
  parameter int unsigned LAT = LAT_PED2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  node_t         in_node,    // level-M parent
  input  fx_t  [M-1:0]  in_rcol,    // R_{k,M-1}, index k-1
  input  q_t            in_q,       // q^(M-1)
  output logic          out_valid,
  output node_t         out_node
);
  localparam int L = M - 1;         // level computed here

  // child generator: holds the parent for 8 cycles
  logic                     busy;
  logic [$clog2(NCH)-1:0]   cnt;
  node_t                    par;
  fx_t  [M-1:0]             rc;
  q_t                       qh;
  sym_t                     s_g;
  localparam int unsigned NS = 5;   // generator + 4 arithmetic stages
  // stage 2: products R_k,M-1 * s
  logic                     v2, v3, v4, v5;
  node_t                    n2, n3, n4, n5;
  z_t   [L-1:0]             prod2;
  logic                     ok2, ok3, ok4;
  sq_t                      sq4;

  assign s_g = cand_sym(32'(cnt));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      {v2, v3, v4, v5} <= '0;
    end else begin
      if (in_valid) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        cnt  <= cnt + 1'b1;
        if (cnt == $clog2(NCH)'(NCH - 1)) busy <= 1'b0;
      end
      {v2, v3, v4, v5} <= {busy, v2, v3, v4};
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      par <= in_node;
      rc  <= in_rcol;
      qh  <= in_q;
    end
    n2 <= par;
    n2.sym[L-1] <= s_g;
    for (int unsigned k = 0; k < L; k++) prod2[k] <= z_t'(rc[k]) * z_t'(s_g);
    ok2 <= sym_in_range(s_g, qh);
    n3  <= n2;
    for (int unsigned k = 0; k < L; k++) n3.z[k] <= n2.z[k] - prod2[k];
    ok3 <= ok2;
    n4  <= n3;
    sq4 <= ped_sq((ZW+1)'(n3.z[L-1]));
    ok4 <= ok3;
    n5     <= n4;
    n5.ped <= ok4 ? ped_add(n4.ped, sq4) : PED_MAX;
  end

  delay_line #(.T(node_t), .N(LAT - NS)) u_pad (
    .clk, .rst_n,
    .in_valid(v5), .in_data(n5),
    .out_valid, .out_data(out_node)
  );

  initial assert (LAT >= NS) else $error("ped2: LAT below the arithmetic stages");

  // A parent may only arrive when the previous one has been fully expanded.
  a_fold: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid |-> !busy || cnt == $clog2(NCH)'(NCH - 1))
    else $error("ped2: new parent while children of the previous one are still issued");
endmodule
