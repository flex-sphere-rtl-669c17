// tb_pedg: self-checking test of PED_g at levels 6 and 1.
//
// A random node enters every cycle (with occasional idle cycles) together
// with a random level column, 1/R_ii and q. The residual of the level is
// usually near R_ii times a constellation point, sometimes far outside the
// constellation so that clipping to +-q happens. Each child is checked 22
// cycles later (published latency) against the reference model: the
// Schnorr-Euchner symbol, the PED, the updated residuals and the untouched
// fields. Both clipping directions and marker propagation must occur.
module tb_pedg;
  import flex_pkg::*;
  import flex_ref_pkg::*;
  localparam int N = 3000;
  localparam int NL = 2;
  localparam int LV [NL] = '{6, 1};

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   in_valid;
  node_t  in_node;
  col_t   in_col [NL];
  logic   out_valid [NL];
  node_t  out_node [NL];

  int checks = 0, failures = 0, cyc = 0;
  int n_clip_hi = 0, n_clip_lo = 0, n_mark = 0;
  typedef struct { int due; node_t n; longint ped; longint z [M]; } exp_t;
  exp_t exp_q [NL][$];

  for (genvar g = 0; g < NL; g++) begin : g_dut
    pedg #(.LEVEL(LV[g])) dut (
      .clk, .rst_n, .in_valid, .in_node, .in_col(in_col[g]),
      .out_valid(out_valid[g]), .out_node(out_node[g])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // residual k of a node as a signed number
  function automatic longint zval(input node_t n, input int k);
    z_t z;
    z = n.z[k];
    return longint'(z);
  endfunction

  task automatic check_out();
    for (int g = 0; g < NL; g++) begin
      if (exp_q[g].size() > 0 && exp_q[g][0].due == cyc) begin
        exp_t e;
        e = exp_q[g].pop_front();
        checks++;
        if (!out_valid[g] || out_node[g].sym != e.n.sym || longint'(out_node[g].ped) != e.ped ||
            out_node[g].tag != e.n.tag || out_node[g].mt != e.n.mt) begin
          failures++;
          if (failures < 10) $display("L%0d cycle %0d: sym %h ped %0d, expected %h %0d", LV[g], cyc,
                                      out_node[g].sym, out_node[g].ped, e.n.sym, e.ped);
        end
        for (int k = 0; k < LV[g]; k++) begin
          checks++;
          if (zval(out_node[g], k) != e.z[k]) begin
            failures++;
            if (failures < 10) $display("L%0d z[%0d] %0d expected %0d", LV[g], k, zval(out_node[g], k), e.z[k]);
          end
        end
      end else if (out_valid[g]) begin
        failures++;
        $display("unexpected output at cycle %0d", cyc);
      end
    end
  endtask

  initial begin
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N || exp_q[0].size() > 0; n++) begin
      @(negedge clk);
      check_out();
      in_valid = 1'b0;
      if (n < N && $urandom_range(7) != 0) begin
        node_t par;
        par = '0;
        for (int k = 0; k < M; k++) begin
          par.z[k]   = z_t'(longint'($urandom_range(20000)) - 10000);
          par.sym[k] = sym_t'(2 * int'($urandom_range(7)) - 7);
        end
        par.ped = ($urandom_range(9) == 0) ? PED_MAX : ped_t'($urandom_range(3000));
        par.tag = tag_t'($urandom);
        par.mt  = mt_t'(2 + $urandom_range(2));
        for (int g = 0; g < NL; g++) begin
          int     lv;
          longint rii;
          lv  = LV[g];
          rii = 192 + longint'($urandom_range(576));
          for (int k = 0; k < M; k++) in_col[g].rcol[k] = fx_t'(longint'($urandom_range(768)) - 384);
          in_col[g].rcol[lv-1] = fx_t'(rii);
          in_col[g].rinv = fx_t'((4096 * 256 + rii / 2) / rii);
          in_col[g].q    = q_t'(rand_q());
          // residual near R_ii * (a point up to 10), plus noise
          if ($urandom_range(1) == 0)
            par.z[lv-1] = z_t'(rii * (2 * int'($urandom_range(10)) - 10) +
                               longint'($urandom_range(400)) - 200);
        end
        for (int g = 0; g < NL; g++) begin
          int     lv, q, s;
          longint rii, ez;
          exp_t   e;
          lv  = LV[g];
          q   = int'(in_col[g].q);
          rii = longint'(in_col[g].rcol[lv-1]);
          s  = ref_slice(zval(par, lv - 1), longint'(in_col[g].rinv), q);
          if (s == q  && real'(zval(par, lv - 1)) / real'(rii) > q + 1)  n_clip_hi++;
          if (s == -q && real'(zval(par, lv - 1)) / real'(rii) < -q - 1) n_clip_lo++;
          if (par.ped == PED_MAX) n_mark++;
          e.n = par;
          e.n.sym[lv-1] = sym_t'(s);
          for (int k = 0; k < lv; k++)
            e.z[k] = zval(par, k) - longint'(in_col[g].rcol[k]) * s;
          ez = zval(par, lv - 1) - rii * s;
          e.ped = ref_ped(longint'(par.ped), ez);
          e.due = cyc + LAT_PEDG;
          exp_q[g].push_back(e);
        end
        in_node  = par;
        in_valid = 1'b1;
      end
    end
    if (n_clip_hi == 0 || n_clip_lo == 0 || n_mark == 0) begin
      failures++;
      $display("not exercised: clip high %0d clip low %0d marker %0d", n_clip_hi, n_clip_lo, n_mark);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
