// flex_pkg: shared constants, number formats and record types of the
// Flex-Sphere sort-free sphere detector.
//
// The detector is built for its largest case, four complex streams with
// 64-QAM, which after real-valued decomposition is a tree of M = 8 real
// levels with sqrt(64) = 8 children per node. Levels are numbered i = 8
// (root, first detected) down to i = 1. Everywhere in this design an array
// indexed by level uses index i-1.
//
// Number formats (the 16-bit word width is the published one; the binary
// point positions are this design's choice):
//   R entries, y'          : signed 16 bit, 8 fraction bits  (Q7.8)
//   1/R_ii                 : signed 16 bit, 12 fraction bits (Q3.12)
//   cancelled residuals z  : signed 24 bit, 8 fraction bits (wide enough that
//                            y' minus seven products R*s cannot overflow)
//   real symbols           : signed 4 bit odd integers, -7..7
//   partial distances (PED): unsigned 16 bit, 6 fraction bits, saturating.
//                            PED_MAX marks a candidate outside the
//                            constellation; valid distances saturate one
//                            below it so an invalid candidate never wins.
//
// Published pipeline latencies (cycles): PED_1 7, PED_2 17, PED_g 22,
// Min_Finder 8, plus F = 8 cycles in which the 8 nodes of one row stream
// through a folded unit.
package flex_pkg;

  localparam int M      = 8;    // real-valued tree levels (2 * M_T at most)
  localparam int NCH    = 8;    // children per node, sqrt(64)
  localparam int F      = 8;    // folding factor: nodes per PED_g per problem

  localparam int DW     = 16;   // R and y' word width
  localparam int FR     = 8;    // fraction bits of R, y' and z
  localparam int FRI    = 12;   // fraction bits of 1/R_ii
  localparam int ZW     = 24;   // residual width
  localparam int SW     = 4;    // real symbol width
  localparam int PW     = 16;   // PED width
  localparam int PFRAC  = 6;    // fraction bits of a PED
  localparam int IDW    = 8;    // caller label width

  localparam int NCTX   = 32;   // problems that can be in flight
  localparam int TAGW   = $clog2(NCTX);

  localparam int LAT_PED1 = 7;
  localparam int LAT_PED2 = 17;
  localparam int LAT_PEDG = 22;
  localparam int LAT_MF   = 8;

  typedef logic signed [DW-1:0]  fx_t;
  typedef logic signed [ZW-1:0]  z_t;
  typedef logic signed [SW-1:0]  sym_t;
  typedef logic        [PW-1:0]  ped_t;
  typedef logic        [2:0]     q_t;    // q^(i): 1, 3 or 7
  typedef logic        [2:0]     mt_t;   // M_T: 2, 3 or 4
  typedef logic        [TAGW-1:0] tag_t;

  localparam ped_t PED_MAX = '1;
  localparam ped_t PED_SAT = PED_MAX - 1'b1;

  // One tree node travelling down a row.
  typedef struct packed {
    ped_t             ped;   // T_i of this node
    sym_t [M-1:0]     sym;   // symbols decided so far, index = level - 1
    z_t   [M-1:0]     z;     // y'_k minus the interference of decided symbols
    tag_t             tag;   // context slot of the problem
    mt_t              mt;    // M_T of the problem
  } node_t;

  // What a PED unit at level i needs of its problem.
  typedef struct packed {
    fx_t  [M-1:0]     rcol;  // R_{k,i}, index k-1; rcol[i-1] is R_ii
    fx_t              rinv;  // 1/R_ii
    q_t               q;     // q^(i)
  } col_t;

  // The i-th real candidate of a full expansion: -7, -5, ..., 7.
  function automatic sym_t cand_sym(input int unsigned idx);
    return sym_t'(2 * int'(idx) - 7);
  endfunction

  // True when |s| <= q.
  function automatic logic sym_in_range(input sym_t s, input q_t q);
    logic signed [SW:0] qs;
    qs = {2'b00, q};
    return ((SW+1)'(s) <= qs) && ((SW+1)'(s) >= -qs);
  endfunction

  // Squared error of a Q.8 residual, scaled to the PED format (truncated).
  typedef logic [2*ZW+1:0] sq_t;
  function automatic sq_t ped_sq(input logic signed [ZW:0] e);
    logic signed [2*ZW+1:0] ew;
    ew = (2*ZW+2)'(e);
    return unsigned'(ew * ew) >> (2 * FR - PFRAC);
  endfunction

  // Child PED T_parent + e^2, with the out-of-range marker propagated and
  // valid sums saturated one below it.
  function automatic ped_t ped_add(input ped_t parent, input sq_t sq);
    logic [2*ZW+2:0] sum;
    if (parent == PED_MAX) return PED_MAX;
    sum = {1'b0, sq} + (2*ZW+3)'(parent);
    return (sum >= (2*ZW+3)'(PED_SAT)) ? PED_SAT : ped_t'(sum);
  endfunction

  // Window start, in cycles after acceptance, at which the final-level
  // nodes of a problem with the given M_T reach the Min_Finder.
  function automatic int mf_window(input mt_t mt);
    return LAT_PED1 + LAT_PED2 + LAT_PEDG * (2 * int'(mt) - 2);
  endfunction

  // M_T values other than 2, 3, 4 are treated as 4.
  function automatic mt_t mt_norm(input mt_t mt);
    return (mt == 3'd2 || mt == 3'd3) ? mt : 3'd4;
  endfunction

endpackage
