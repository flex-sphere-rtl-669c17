// se_slicer: Schnorr-Euchner closest-candidate finder for one real level
// with a run-time modulation order.
//
// Given b = b_{i+1} / R_ii it returns the real constellation point closest
// to b, g(2*round((b+1)/2) - 1), where round() goes to the nearest integer
// (halves upward) and g() clips to [-q, q]. q is 1, 3 or 7 for 4-, 16- and
// 64-QAM. Because q changes per level and per problem, a fixed set of
// thresholds cannot be used; the rounding form works for every q, and its
// divisions and multiplications by two are one-bit shifts.
//
// The order of operations and the five register stages follow the
// published block diagram of this converter: register the input, add one,
// halve and round, double and subtract one, compare with -q and +q, then
// select. b is a fixed-point number of BW bits with BF fraction bits.
//
// Interface: b and q enter together; s appears 5 cycles later. The unit
// accepts a new input every cycle. There is no reset; nothing here holds
// state beyond the pipeline.
module se_slicer
  import flex_pkg::*;
#(
  parameter int BW = ZW + DW,   // width of b
  parameter int BF = FR + FRI   // fraction bits of b
) (
  input  logic                 clk,
  input  logic signed [BW-1:0] b,
  input  q_t                   q,
  output sym_t                 s
);
  localparam int IW = BW + 2 - BF;      // integer part after rounding

  logic signed [BW-1:0] b1;
  logic signed [BW:0]   p2;             // b + 1
  logic signed [IW-1:0] n3, n4;         // 2*round((b+1)/2) - 1
  logic                 lo4, hi4;
  q_t                   q1, q2, q3, q4;

  logic signed [BW+1:0] rnd;
  logic signed [IW-1:0] r;
  logic signed [IW-1:0] qs3;

  always_comb begin
    // (b+1)/2 keeps all bits with BF+1 fraction bits; adding one half and
    // dropping the fraction rounds it to the nearest integer.
    rnd = (BW+2)'(p2) + (BW+2)'(signed'({1'b0, 1'b1, {BF{1'b0}}}));
    r   = IW'(rnd >>> (BF + 1));
    qs3 = IW'(signed'({1'b0, q3}));
  end

  always_ff @(posedge clk) begin
    b1  <= b;
    q1  <= q;
    p2  <= (BW+1)'(b1) + (BW+1)'(signed'({1'b0, 1'b1, {BF{1'b0}}}));
    q2  <= q1;
    n3  <= IW'(r <<< 1) - IW'(1);
    q3  <= q2;
    lo4 <= n3 <= -qs3;
    hi4 <= n3 >=  qs3;
    n4  <= n3;
    q4  <= q3;
    if (lo4)      s <= -sym_t'({1'b0, q4});
    else if (hi4) s <=  sym_t'({1'b0, q4});
    else          s <=  sym_t'(n4);
  end
endmodule
