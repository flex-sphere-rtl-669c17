// min_finder: Min_Finder with its M_T input multiplexers.
//
// M_T sets how many tree levels a problem uses: with the modified
// real-valued decomposition each complex stream occupies two consecutive
// levels, so a problem with M_T streams is complete after level
// i = M + 1 - 2*M_T, i.e. after level 5, 3 or 1 for M_T = 2, 3 or 4. Every
// row of the detector brings those three levels to this unit (taps 0, 1, 2);
// per cycle a multiplexer picks the tap whose node belongs to a problem of
// matching M_T, so problems of different M_T can follow each other.
//
// A problem's 64 final nodes arrive as 8 rows in each of F = 8 consecutive
// cycles. Each cycle a comparison tree finds the smallest PED of the 8 rows
// (lowest row wins a tie), and an accumulator keeps the smallest over the 8
// cycles (an earlier cycle wins a tie). The winner is the detected vector.
//
// Timing: if the first 8 nodes of a problem arrive in cycle c, the result
// is valid in cycle c + F + LAT (published LAT = 8, counted from the end of
// the 8-cycle window). The caller must keep windows from overlapping.
module min_finder
  import flex_pkg::*;
#(
  parameter int unsigned LAT  = LAT_MF,
  parameter int unsigned NTAP = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic  [NTAP-1:0]           in_valid,
  input  node_t [NTAP-1:0][NCH-1:0]  in_node,
  output logic                       out_valid,
  output node_t                      out_node
);
  localparam int CW = $clog2(F);

  logic  [NTAP-1:0]  hit;
  logic              cv, v1, vr;
  node_t [NCH-1:0]   cand;
  node_t             best_c, best1, acc, res;
  logic  [CW-1:0]    cnt;

  // input multiplexers: the tap whose problem ends at this level
  always_comb begin
    cv   = 1'b0;
    cand = in_node[0];
    for (int unsigned t = 0; t < NTAP; t++) begin
      hit[t] = in_valid[t] && (in_node[t][0].mt == mt_t'(t + 2));
      if (hit[t]) begin
        cv   = 1'b1;
        cand = in_node[t];
      end
    end
  end

  // minimum over the 8 rows, lowest row on a tie
  always_comb begin
    best_c = cand[0];
    for (int unsigned r = 1; r < NCH; r++)
      if (cand[r].ped < best_c.ped) best_c = cand[r];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      vr  <= 1'b0;
      cnt <= '0;
    end else begin
      v1 <= cv;
      vr <= 1'b0;
      if (v1) begin
        cnt <= cnt + 1'b1;
        if (cnt == CW'(F - 1)) begin
          vr  <= 1'b1;
          cnt <= '0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    best1 <= best_c;
    if (v1) begin
      if (cnt == '0 || best1.ped < acc.ped) acc <= best1;
      if (cnt == CW'(F - 1)) res <= (best1.ped < acc.ped) ? best1 : acc;
    end
  end

  delay_line #(.T(node_t), .N(F + LAT - 9)) u_pad (
    .clk, .rst_n,
    .in_valid(vr), .in_data(res),
    .out_valid, .out_data(out_node)
  );

  initial assert (F + LAT >= 9) else $error("min_finder: LAT too small");

  a_one_tap: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit))
    else $error("min_finder: final nodes of two problems arrived in the same cycle");
endmodule
