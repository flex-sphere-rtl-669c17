// ped1: PED_1, the root level i = M of the detection tree.
//
// The root is expanded in full: for each of the 8 real candidates
// s = -7, -5, ..., 7 it computes the error e_M = y'_M - R_MM * s, the partial
// Euclidean distance T_M = e_M^2 (the PED above the root is zero), and the
// residuals z_k = y'_k - R_kM * s of every lower level k, which later levels
// use in place of y'. A candidate with |s| > q^(M) does not exist in the
// modulation in use; its PED is overwritten with the maximum value so that
// it loses every later minimum search, as the published design does.
//
// Interface: in_valid qualifies one problem (y', column M of R, q^(M), and
// the context tag and M_T that travel with every node). All 8 nodes
// (out_node[c] has symbol cand_sym(c)) appear together, LAT cycles later.
// The arithmetic takes five register stages (inputs, products, residuals,
// squares, sums); the rest of the published 7-cycle latency is padding. A new problem may enter every cycle.
module ped1
  import flex_pkg::*;
#(
  parameter int unsigned LAT = LAT_PED1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  fx_t  [M-1:0]       in_y,     // y'_k, index k-1
  input  fx_t  [M-1:0]       in_rcol,  // R_{k,M}, index k-1
  input  q_t                 in_q,     // q^(M)
  input  tag_t               in_tag,
  input  mt_t                in_mt,
  output logic               out_valid,
  output node_t [NCH-1:0]    out_node
);
  typedef node_t [NCH-1:0] nodes_t;
  localparam int unsigned NS = 5;   // arithmetic stages

  logic [NS-1:0]          v;
  // stage 1: inputs
  fx_t  [M-1:0]           y1, r1;
  q_t                     q1;
  tag_t                   tag1;
  mt_t                    mt1;
  // stage 2: products R_kM * s per candidate
  z_t   [NCH-1:0][M-1:0]  prod2;
  fx_t  [M-1:0]           y2;
  q_t                     q2;
  tag_t                   tag2;
  mt_t                    mt2;
  // stage 3: residuals, error kept in z[M-1]
  nodes_t                 n3;
  logic [NCH-1:0]         ok3, ok4;
  // stage 4: squared errors
  nodes_t                 n4;
  sq_t  [NCH-1:0]         sq4;
  // stage 5: PEDs
  nodes_t                 n5;

  always_ff @(posedge clk) begin
    if (!rst_n) v <= '0;
    else        v <= {v[NS-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    y1   <= in_y;
    r1   <= in_rcol;
    q1   <= in_q;
    tag1 <= in_tag;
    mt1  <= in_mt;
    y2   <= y1;
    q2   <= q1;
    tag2 <= tag1;
    mt2  <= mt1;
    for (int unsigned c = 0; c < NCH; c++) begin
      for (int unsigned k = 0; k < M; k++) begin
        prod2[c][k] <= z_t'(r1[k]) * z_t'(cand_sym(c));
        n3[c].z[k]  <= z_t'(y2[k]) - prod2[c][k];
      end
      n3[c].ped      <= '0;
      n3[c].sym      <= '0;
      n3[c].sym[M-1] <= cand_sym(c);
      n3[c].tag      <= tag2;
      n3[c].mt       <= mt2;
      ok3[c]         <= sym_in_range(cand_sym(c), q2);
      ok4[c]         <= ok3[c];
      n4[c]          <= n3[c];
      sq4[c]         <= ped_sq((ZW+1)'(n3[c].z[M-1]));
      n5[c]          <= n4[c];
      n5[c].ped      <= ok4[c] ? ped_add('0, sq4[c]) : PED_MAX;
    end
  end

  delay_line #(.T(nodes_t), .N(LAT - NS)) u_pad (
    .clk, .rst_n,
    .in_valid(v[NS-1]), .in_data(n5),
    .out_valid, .out_data(out_node)
  );

  initial assert (LAT >= NS) else $error("ped1: LAT below the arithmetic stages");
endmodule
