// tb_ped2: self-checking test of PED_2 (second level, full expansion,
// folded by 8).
//
// Random parent nodes (some carrying the out-of-range marker, some with a
// PED near saturation) are applied every 8 cycles or with extra idle
// cycles, each with a random column of R and q^(7). Child j of a parent
// applied in cycle t must appear in cycle t + 17 + j (published latency)
// with symbol 2j - 7, the reference PED and residuals, and the parent's
// other fields. Out-of-range children, marker propagation and saturation
// must each occur.
module tb_ped2;
  import flex_pkg::*;
  import flex_ref_pkg::*;
  localparam int N = 150;
  localparam int L = M - 1;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid;
  node_t         in_node;
  fx_t  [M-1:0]  in_rcol;
  q_t            in_q;
  logic          out_valid;
  node_t         out_node;

  int checks = 0, failures = 0, cyc = 0;
  int n_oor = 0, n_mark = 0, n_sat = 0;
  typedef struct { int due; node_t n; longint ped; } exp_t;
  exp_t exp_q [$];

  ped2 dut (.*);

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
      if (!out_valid || out_node.sym != e.n.sym || longint'(out_node.ped) != e.ped ||
          out_node.tag != e.n.tag || out_node.mt != e.n.mt) begin
        failures++;
        if (failures < 10) $display("cycle %0d: valid %0b sym %h ped %0d, expected sym %h ped %0d",
                                    cyc, out_valid, out_node.sym, out_node.ped, e.n.sym, e.ped);
      end
      for (int k = 0; k < L; k++) begin
        checks++;
        if (out_node.z[k] != e.n.z[k]) failures++;
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
      node_t par;
      int    q;
      @(negedge clk);
      check_out();
      in_valid = 1'b0;
      if (n < N) begin
        par = '0;
        for (int k = 0; k < M; k++) begin
          par.z[k]   = z_t'(longint'($urandom_range(60000)) - 30000);
          par.sym[k] = sym_t'(2 * int'($urandom_range(7)) - 7);
          in_rcol[k] = fx_t'(longint'($urandom_range(1000)) - 500);
        end
        in_rcol[L-1] = fx_t'(100 + $urandom_range(700));
        case ($urandom_range(3))
          0:       par.ped = PED_MAX;
          1:       par.ped = PED_SAT - ped_t'($urandom_range(3));
          default: par.ped = ped_t'($urandom_range(4000));
        endcase
        par.tag  = tag_t'($urandom);
        par.mt   = mt_t'(2 + $urandom_range(2));
        q        = rand_q();
        in_q     = q_t'(q);
        in_node  = par;
        in_valid = 1'b1;
        for (int j = 0; j < NCH; j++) begin
          exp_t   e;
          int     s;
          longint ez;
          s  = 2 * j - 7;
          e.n = par;
          e.n.sym[L-1] = sym_t'(s);
          for (int k = 0; k < L; k++)
            e.n.z[k] = z_t'(longint'(par.z[k]) - longint'(in_rcol[k]) * s);
          ez = longint'(par.z[L-1]) - longint'(in_rcol[L-1]) * s;
          if (s > q || s < -q) begin
            e.ped = RMAX;
            n_oor++;
          end else e.ped = ref_ped(longint'(par.ped), ez);
          if (par.ped == PED_MAX) n_mark++;
          if (e.ped == RSAT) n_sat++;
          e.due = cyc + LAT_PED2 + j;
          exp_q.push_back(e);
        end
        repeat (NCH - 1) begin
          @(negedge clk);
          check_out();
          in_valid = 1'b0;
        end
        repeat ($urandom_range(1) * $urandom_range(5)) begin
          @(negedge clk);
          check_out();
        end
      end
    end
    if (n_oor == 0 || n_mark == 0 || n_sat == 0) begin
      failures++;
      $display("not exercised: out-of-range %0d marker %0d saturation %0d", n_oor, n_mark, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
