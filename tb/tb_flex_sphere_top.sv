// tb_flex_sphere_top: end-to-end test of the Flex-Sphere detector at its
// full size (8 levels, 8 rows, 64-QAM capable, default parameters).
//
// Random detection problems are offered back to back: random upper
// triangular R with its reciprocal diagonal, random symbols with a random
// modulation per complex stream (4-, 16- or 64-QAM), M_T drawn from 2, 3, 4
// for every problem (so the mode changes on the fly), and y' = R s plus
// noise. One problem in three is noise-free. Each result is matched to its
// problem by label and compared with the reference model (symbols of the
// levels the problem uses, distance, M_T); noise-free results must equal
// the transmitted symbols. The cycle count from acceptance to result must
// be 84, 128 or 172 for M_T = 2, 3, 4.
//
// Mechanisms that must each happen at least once: every M_T, a change of
// M_T between consecutive problems, a stall for a colliding Min_Finder
// window, results leaving out of order, out-of-range root candidates
// (q < 7 at the two expanded levels) and a problem mixing modulations.
module tb_flex_sphere_top;
  import flex_pkg::*;
  import flex_ref_pkg::*;
  localparam int N = 400;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 in_valid, in_ready;
  fx_t  [M-1:0][M-1:0]  in_r;
  fx_t  [M-1:0]         in_rinv, in_y;
  q_t   [M-1:0]         in_q;
  mt_t                  in_mt;
  logic [IDW-1:0]       in_id;
  logic                 out_valid;
  sym_t [M-1:0]         out_sym;
  ped_t                 out_ped;
  mt_t                  out_mt;
  logic [IDW-1:0]       out_id;

  int checks = 0, failures = 0, cyc = 0, n_done = 0;
  int n_mt [5];
  int n_switch = 0, n_stall = 0, n_ooo = 0, n_oor = 0, n_mixed = 0, n_exact = 0;
  int last_acc = -100, last_mt = 0, last_out_id = -1;

  prob_t  pend   [int];
  int     t_acc  [int];
  bit     exact  [int];

  flex_sphere_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (N * 20 + 2000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d results", n_done, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int latency(input int mt);
    return 8 + LAT_PED1 + LAT_PED2 + (2 * mt - 2) * LAT_PEDG + LAT_MF;
  endfunction

  // results are checked at every negative edge
  always @(negedge clk) if (rst_n && out_valid) begin
    int     id;
    int     syms [M];
    longint ped;
    id = int'(out_id);
    checks++;
    if (!pend.exists(id)) begin
      failures++;
      $display("result with unknown label %0d", id);
    end else begin
      prob_t p;
      int    lowest;
      p = pend[id];
      ref_detect(p, syms, ped);
      lowest = M + 1 - 2 * p.mt;
      if (int'(out_mt) != p.mt || longint'(out_ped) != ped) begin
        failures++;
        if (failures < 10) $display("label %0d: mt %0d ped %0d, expected %0d %0d", id, out_mt, out_ped, p.mt, ped);
      end
      for (int k = lowest - 1; k < M; k++) begin
        checks++;
        if (int'(out_sym[k]) != syms[k]) begin
          failures++;
          if (failures < 10) $display("label %0d level %0d: %0d expected %0d", id, k + 1, out_sym[k], syms[k]);
        end
        if (exact[id]) begin
          checks++;
          if (int'(out_sym[k]) != p.s[k]) failures++;
        end
      end
      checks++;
      if (cyc - t_acc[id] != latency(p.mt)) begin
        failures++;
        $display("label %0d: latency %0d, expected %0d", id, cyc - t_acc[id], latency(p.mt));
      end
      if (last_out_id >= 0 && ((id - last_out_id) & 8'hff) > 8'h80) n_ooo++;
      last_out_id = id;
      if (exact[id]) n_exact++;
      pend.delete(id);
      n_done++;
    end
  end

  initial begin
    in_valid = 1'b0;
    in_mt    = 3'd4;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      prob_t p;
      int    mt, noise;
      bit    mixed;
      mt    = 2 + $urandom_range(2);
      noise = ($urandom_range(2) == 0) ? 0 : 20 + $urandom_range(100);
      p     = gen_prob(mt, noise, $urandom_range(1) == 1);
      @(negedge clk);
      for (int k = 0; k < M; k++) begin
        for (int l = 0; l < M; l++) in_r[k][l] = fx_t'(p.r[k][l]);
        in_rinv[k] = fx_t'(p.rinv[k]);
        in_y[k]    = fx_t'(p.y[k]);
        in_q[k]    = q_t'(p.q[k]);
      end
      in_mt    = mt_t'(mt);
      in_id    = IDW'(n);
      in_valid = 1'b1;
      #1;
      while (!in_ready) begin
        if (cyc - last_acc >= F) n_stall++;
        @(negedge clk);
        #1;
      end
      pend[n % 256]  = p;
      t_acc[n % 256] = cyc;
      exact[n % 256] = (noise == 0);
      n_mt[mt]++;
      if (last_mt != 0 && last_mt != mt) n_switch++;
      if (p.q[M-1] < 7 || p.q[M-2] < 7) n_oor++;
      mixed = 1'b0;
      for (int k = M + 1 - 2 * mt; k < M; k++) if (p.q[k] != p.q[M-1]) mixed = 1'b1;
      if (mixed) n_mixed++;
      last_mt  = mt;
      last_acc = cyc;
      @(negedge clk);
      in_valid = 1'b0;
      repeat ($urandom_range(3) == 0 ? $urandom_range(12) : 0) @(negedge clk);
    end
    while (n_done < N) @(negedge clk);
    repeat (200) @(negedge clk);
    $display("M_T 2/3/4: %0d/%0d/%0d, mode switches %0d, window stalls %0d, out of order %0d,",
             n_mt[2], n_mt[3], n_mt[4], n_switch, n_stall, n_ooo);
    $display("out-of-range roots %0d, mixed modulation %0d, noise-free %0d", n_oor, n_mixed, n_exact);
    if (n_mt[2] == 0 || n_mt[3] == 0 || n_mt[4] == 0 || n_switch == 0 || n_stall == 0 ||
        n_ooo == 0 || n_oor == 0 || n_mixed == 0 || n_exact == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
