// tb_flex_ctrl: self-checking test of admission control and the context
// store.
//
// Problems with random M_T are offered with random gaps. A model in the
// testbench keeps the cycles of all earlier acceptances and decides, for
// every offered cycle, whether the problem may enter: at least 8 cycles
// after the previous one, and with a Min_Finder window (starting 68, 112 or
// 156 cycles after acceptance for M_T = 2, 3, 4, 8 cycles long) that
// overlaps no earlier window. in_ready must match that decision exactly, so
// both missed stalls and needless stalls fail. Every accepted problem's
// context is then read back through the column and label ports and
// compared with what was written.
module tb_flex_ctrl;
  import flex_pkg::*;
  localparam int N = 300;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 in_valid;
  mt_t                  in_mt;
  fx_t  [M-1:0][M-1:0]  in_r;
  fx_t  [M-1:0]         in_rinv;
  q_t   [M-1:0]         in_q;
  logic [IDW-1:0]       in_id;
  logic                 in_ready, acc;
  tag_t                 acc_tag;
  mt_t                  acc_mt;
  tag_t [M-2:0]         col_tag;
  col_t [M-2:0]         col;
  tag_t                 id_tag;
  logic [IDW-1:0]       id;

  int checks = 0, failures = 0, cyc = 0, n_acc = 0, n_win_stall = 0, n_gap_stall = 0;
  int acc_cyc [$];
  int win_lo [$];

  typedef struct {
    fx_t [M-1:0][M-1:0] r;
    fx_t [M-1:0] rinv;
    q_t  [M-1:0] q;
    logic [IDW-1:0] id;
  } ctx_t;
  ctx_t stored [NCTX];

  flex_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int window(input int mt);
    return 7 + 17 + 22 * (2 * mt - 2);
  endfunction

  // check every level's column and the label of one slot
  task automatic check_slot(input int slot);
    for (int l = 0; l < M - 1; l++) col_tag[l] = tag_t'(slot);
    id_tag = tag_t'(slot);
    #1;
    for (int l = 0; l < M - 1; l++) begin
      checks++;
      if (col[l].rinv != stored[slot].rinv[l] || col[l].q != stored[slot].q[l]) failures++;
      for (int k = 0; k < M; k++) if (col[l].rcol[k] != stored[slot].r[k][l]) failures++;
    end
    checks++;
    if (id != stored[slot].id) failures++;
  endtask

  initial begin
    in_valid = 1'b0;
    in_mt    = 3'd4;
    col_tag  = '0;
    id_tag   = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (n_acc < N) begin
      bit exp_ready, gap_ok, win_ok;
      int mt, lo;
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      mt       = 2 + $urandom_range(2);
      in_mt    = mt_t'(mt);
      for (int k = 0; k < M; k++) begin
        for (int l = 0; l < M; l++) in_r[k][l] = fx_t'($urandom);
        in_rinv[k] = fx_t'($urandom);
        in_q[k]    = q_t'($urandom);
      end
      in_id = IDW'($urandom);
      #1;
      lo     = cyc + window(mt);
      gap_ok = acc_cyc.size() == 0 || cyc - acc_cyc[acc_cyc.size() - 1] >= F;
      win_ok = 1'b1;
      foreach (win_lo[w]) if (lo < win_lo[w] + F && win_lo[w] < lo + F) win_ok = 1'b0;
      exp_ready = gap_ok && win_ok;
      checks++;
      if (in_ready != exp_ready || acc != (in_valid && exp_ready) || acc_mt != mt_t'(mt)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: in_ready %0b expected %0b", cyc, in_ready, exp_ready);
      end
      if (in_valid && gap_ok && !win_ok) n_win_stall++;
      if (in_valid && !gap_ok) n_gap_stall++;
      if (in_valid && in_ready) begin
        checks++;
        if (int'(acc_tag) != n_acc % NCTX) failures++;
        stored[n_acc % NCTX] = '{r: in_r, rinv: in_rinv, q: in_q, id: in_id};
        acc_cyc.push_back(cyc);
        win_lo.push_back(lo);
        n_acc++;
        if (win_lo.size() > 40) void'(win_lo.pop_front());
        @(negedge clk);
        in_valid = 1'b0;
        check_slot((n_acc - 1) % NCTX);
        if (n_acc > 5) check_slot((n_acc - 1 - $urandom_range(4)) % NCTX);
      end
    end
    if (n_win_stall == 0 || n_gap_stall == 0) begin
      failures++;
      $display("not exercised: window stalls %0d, spacing stalls %0d", n_win_stall, n_gap_stall);
    end
    $display("window stalls %0d, spacing stalls %0d", n_win_stall, n_gap_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
