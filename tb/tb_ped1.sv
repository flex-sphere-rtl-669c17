// tb_ped1: self-checking test of PED_1 (root level, full expansion).
//
// Random channels and received vectors with random q^(8) are applied, mostly
// back to back and sometimes with idle cycles. For every problem the 8
// output nodes are checked 7 cycles later (the published latency) against
// the reference model: candidate symbol, PED (or the out-of-range marker),
// all 7 lower residuals, tag and M_T. A valid output in any other cycle is
// a failure.
module tb_ped1;
  import flex_pkg::*;
  import flex_ref_pkg::*;
  localparam int N = 400;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            in_valid;
  fx_t  [M-1:0]    in_y, in_rcol;
  q_t              in_q;
  tag_t            in_tag;
  mt_t             in_mt;
  logic            out_valid;
  node_t [NCH-1:0] out_node;

  int checks = 0, failures = 0, cyc = 0, n_oor = 0;
  typedef struct { int due; prob_t p; int tag; } exp_t;
  exp_t exp_q [$];

  ped1 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out();
    if (exp_q.size() > 0 && exp_q[0].due == cyc) begin
      exp_t e;
      e = exp_q.pop_front();
      checks++;
      if (!out_valid) begin
        failures++;
        $display("missing output at cycle %0d", cyc);
      end
      for (int c = 0; c < NCH; c++) begin
        int     s;
        longint t;
        s = 2 * c - 7;
        if (s > e.p.q[M-1] || s < -e.p.q[M-1]) begin
          t = RMAX;
          n_oor++;
        end else t = ref_ped(0, e.p.y[M-1] - e.p.r[M-1][M-1] * s);
        checks++;
        if (int'(out_node[c].sym[M-1]) != s || longint'(out_node[c].ped) != t ||
            int'(out_node[c].tag) != e.tag || out_node[c].mt != 3'd4) begin
          failures++;
          if (failures < 10) $display("node %0d: sym %0d ped %0d, expected %0d %0d",
                                      c, out_node[c].sym[M-1], out_node[c].ped, s, t);
        end
        for (int k = 0; k < M - 1; k++) begin
          checks++;
          if (longint'(out_node[c].z[k]) != e.p.y[k] - e.p.r[k][M-1] * s) failures++;
        end
      end
    end else if (out_valid) begin
      failures++;
      $display("unexpected output at cycle %0d", cyc);
    end
  endtask

  initial begin
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N || exp_q.size() > 0; n++) begin
      @(negedge clk);
      check_out();
      in_valid = 1'b0;
      if (n < N && $urandom_range(3) != 0) begin
        prob_t p;
        p = gen_prob(4, 40, 1'b0);
        for (int k = 0; k < M; k++) begin
          in_y[k]    = fx_t'(p.y[k]);
          in_rcol[k] = fx_t'(p.r[k][M-1]);
        end
        in_q     = q_t'(p.q[M-1]);
        in_tag   = tag_t'(n);
        in_mt    = 3'd4;
        in_valid = 1'b1;
        exp_q.push_back('{due: cyc + LAT_PED1, p: p, tag: n % NCTX});
      end
    end
    if (n_oor == 0) begin
      failures++;
      $display("no out-of-range candidate was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
