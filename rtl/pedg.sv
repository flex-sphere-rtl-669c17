// pedg: PED_g, the general PED unit of levels i = M-2 down to 1.
//
// Below the two fully expanded levels every node has exactly one surviving
// child: the Schnorr-Euchner first child, which is the real constellation
// point closest to b = z_i / R_ii (z_i is y'_i with the interference of all
// decided symbols removed). No sorting is needed. For each incoming node the
// unit computes b = z_i * (1/R_ii), finds the closest point s with the
// run-time modulation order q^(i) (se_slicer, Eq. 10/11), then
// e = z_i - R_ii * s, T_i = T_{i+1} + e^2, and updates the residuals
// z_k -= R_{k,i} * s of every lower level. A parent that carries the
// out-of-range marker keeps it.
//
// Interface: in_valid, the node and the level-i column of its problem's R
// (with 1/R_ii and q^(i)) enter together; the child leaves LAT cycles later
// (published LAT = 22). One node per cycle; 8 per problem with F = 8. The
// arithmetic takes 11 stages (input, multiply, 5 in the slicer, products,
// residuals, square, sum); the rest of the latency is padding.
module pedg
  import flex_pkg::*;
#(
  parameter int unsigned LEVEL = 1,          // tree level i handled here
  parameter int unsigned LAT   = LAT_PEDG
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  node_t  in_node,
  input  col_t   in_col,
  output logic   out_valid,
  output node_t  out_node
);
  localparam int unsigned SL = 5;            // slicer latency

  typedef struct packed {
    node_t n;
    col_t  c;
  } work_t;

  localparam int unsigned NS = 11;           // arithmetic stages

  logic                     v1, v2, vs, v8, v9, v10, v11;
  work_t                    w1, w2, ws, w8, w9;
  logic signed [ZW+DW-1:0]  b2;
  sym_t                     s;
  z_t   [LEVEL-1:0]         prod8;
  node_t                    n10, n11;
  sq_t                      sq10;

  always_ff @(posedge clk) begin
    if (!rst_n) {v1, v2, v8, v9, v10, v11} <= '0;
    else        {v1, v2, v8, v9, v10, v11} <= {in_valid, v1, vs, v8, v9, v10};
  end

  always_ff @(posedge clk) begin
    // 1: inputs; 2: b = z_i * 1/R_ii
    w1 <= '{n: in_node, c: in_col};
    w2 <= w1;
    b2 <= (ZW+DW)'(w1.n.z[LEVEL-1]) * (ZW+DW)'(w1.c.rinv);
  end

  // 3..7: nearest constellation point
  se_slicer u_slicer (.clk, .b(b2), .q(w2.c.q), .s);

  delay_line #(.T(work_t), .N(SL)) u_carry (
    .clk, .rst_n,
    .in_valid(v2), .in_data(w2),
    .out_valid(vs), .out_data(ws)
  );

  always_ff @(posedge clk) begin
    // 8: products R_ki * s
    w8 <= ws;
    w8.n.sym[LEVEL-1] <= s;
    for (int unsigned k = 0; k < LEVEL; k++) prod8[k] <= z_t'(ws.c.rcol[k]) * z_t'(s);
    // 9: residuals; z_i becomes the error e
    w9 <= w8;
    for (int unsigned k = 0; k < LEVEL; k++) w9.n.z[k] <= w8.n.z[k] - prod8[k];
    // 10: e^2
    n10  <= w9.n;
    sq10 <= ped_sq((ZW+1)'(w9.n.z[LEVEL-1]));
    // 11: T_i = T_{i+1} + e^2
    n11     <= n10;
    n11.ped <= ped_add(n10.ped, sq10);
  end

  delay_line #(.T(node_t), .N(LAT - NS)) u_pad (
    .clk, .rst_n,
    .in_valid(v11), .in_data(n11),
    .out_valid, .out_data(out_node)
  );

  initial begin
    assert (LAT >= NS) else $error("pedg: LAT below the arithmetic stages");
    assert (LEVEL >= 1 && LEVEL <= M - 2) else $error("pedg: LEVEL out of range");
  end
endmodule
