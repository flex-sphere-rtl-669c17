// tb_min_finder: self-checking test of the Min_Finder and its M_T
// multiplexers.
//
// Problems arrive as windows of 8 consecutive cycles on the tap that
// matches their M_T (level 5, 3, 1 for M_T = 2, 3, 4), back to back or with
// gaps. Meanwhile the other taps carry valid nodes of problems that have
// not finished yet (their M_T does not match the tap), which must be
// ignored. PEDs are drawn from a small range so that ties are common. The
// expected result is the smallest PED of the 64 nodes, the earliest cycle
// and then the lowest row winning a tie; it must appear 16 cycles after the
// window starts (8-cycle window plus the published latency of 8).
module tb_min_finder;
  import flex_pkg::*;
  localparam int N = 300;

  logic                       clk = 1'b0, rst_n = 1'b0;
  logic  [2:0]                in_valid;
  node_t [2:0][NCH-1:0]       in_node;
  logic                       out_valid;
  node_t                      out_node;

  int checks = 0, failures = 0, cyc = 0;
  int n_mt [5];
  int n_distract = 0;
  typedef struct { int due; node_t n; } exp_t;
  exp_t exp_q [$];

  min_finder dut (.*);

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
      if (!out_valid || out_node.ped != e.n.ped || out_node.sym != e.n.sym ||
          out_node.tag != e.n.tag || out_node.mt != e.n.mt) begin
        failures++;
        if (failures < 10) $display("cycle %0d: valid %0b ped %0d sym %h, expected ped %0d sym %h",
                                    cyc, out_valid, out_node.ped, out_node.sym, e.n.ped, e.n.sym);
      end
    end else if (out_valid) begin
      failures++;
      $display("unexpected output at cycle %0d", cyc);
    end
  endtask

  function automatic node_t rand_node(input int mt, input int tag);
    node_t n;
    n = '0;
    for (int k = 0; k < M; k++) n.sym[k] = sym_t'(2 * int'($urandom_range(7)) - 7);
    n.ped = ped_t'($urandom_range(40));
    if ($urandom_range(7) == 0) n.ped = PED_MAX;
    n.tag = tag_t'(tag);
    n.mt  = mt_t'(mt);
    return n;
  endfunction

  // drive one cycle: the window tap (or none) and distractor traffic
  task automatic drive(input int tap, input node_t [NCH-1:0] nodes);
    for (int t = 0; t < 3; t++) begin
      in_valid[t] = 1'b0;
      if (t == tap) begin
        in_valid[t] = 1'b1;
        in_node[t]  = nodes;
      end else if ($urandom_range(1) == 1) begin
        int mt;
        // a problem still in flight: its M_T is larger than this tap's
        mt = (t == 2) ? -1 : t + 3 + $urandom_range(1 - t + (t == 0 ? 1 : 0));
        if (mt > 4) mt = 4;
        if (mt > 0) begin
          in_valid[t] = 1'b1;
          for (int r = 0; r < NCH; r++) in_node[t][r] = rand_node(mt, 31);
          in_node[t][0].ped = '0;
          n_distract++;
        end
      end
    end
  endtask

  initial begin
    node_t [NCH-1:0] none;
    none = '0;
    in_valid = '0;
    in_node  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < N; p++) begin
      int     tap, mt;
      node_t  best;
      tap = $urandom_range(2);
      mt  = tap + 2;
      n_mt[mt]++;
      for (int j = 0; j < F; j++) begin
        node_t [NCH-1:0] nodes;
        @(negedge clk);
        check_out();
        for (int r = 0; r < NCH; r++) begin
          nodes[r] = rand_node(mt, p % NCTX);
          if (j == 0 && r == 0) best = nodes[r];
          else if (nodes[r].ped < best.ped) best = nodes[r];
        end
        if (j == 0) exp_q.push_back('{due: cyc + F + LAT_MF, n: '0});
        drive(tap, nodes);
      end
      exp_q[exp_q.size() - 1].n = best;
      repeat ($urandom_range(1) * $urandom_range(6)) begin
        @(negedge clk);
        check_out();
        drive(-1, none);
      end
    end
    repeat (F + LAT_MF + 2) begin
      @(negedge clk);
      check_out();
      drive(-1, none);
    end
    if (n_mt[2] == 0 || n_mt[3] == 0 || n_mt[4] == 0 || n_distract == 0 || exp_q.size() != 0) begin
      failures++;
      $display("not exercised or outputs missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
