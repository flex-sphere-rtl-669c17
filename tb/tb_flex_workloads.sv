// tb_flex_workloads: sustained-rate test of the nine configurations of
// 2, 3 or 4 streams with 4-, 16- or 64-QAM (all streams of a problem use
// the same modulation).
//
// For each configuration a run of problems is streamed back to back into
// the full-size detector. Within a run the detector must take one problem
// every 8 cycles with no stall and deliver one result every 8 cycles, each
// equal to the reference model. The measured bits per cycle,
// M_T * log2(w) per 8 cycles, are converted to a data rate at a 283.3 MHz
// clock and compared with the expected table
//   M_T = 2: 141.6 / 283.3 / 424.9 Mbps   (4- / 16- / 64-QAM)
//   M_T = 3: 212.4 / 424.9 / 637.4 Mbps
//   M_T = 4: 283.3 / 566.6 / 849.9 Mbps
// (rates truncated to 0.1 Mbps). Symbol errors against the transmitted
// vector are counted and reported for the noisy runs.
module tb_flex_workloads;
  import flex_pkg::*;
  import flex_ref_pkg::*;
  localparam int NP = 24;
  localparam real FCLK_MHZ = 283.3;
  localparam real TABLE [3][3] = '{'{141.6, 283.3, 424.9}, '{212.4, 424.9, 637.4}, '{283.3, 566.6, 849.9}};

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

  int checks = 0, failures = 0, cyc = 0;
  int n_out = 0, first_out = 0, last_out = 0, sym_err = 0, syms_total = 0;
  prob_t pend [int];

  flex_sphere_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (9 * (NP * 8 + 400) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int     syms [M];
    longint ped;
    prob_t  p;
    p = pend[int'(out_id)];
    ref_detect(p, syms, ped);
    checks++;
    if (longint'(out_ped) != ped) failures++;
    for (int k = M + 1 - 2 * p.mt - 1; k < M; k++) begin
      checks++;
      if (int'(out_sym[k]) != syms[k]) failures++;
      if (int'(out_sym[k]) != p.s[k]) sym_err++;
      syms_total++;
    end
    if (n_out == 0) first_out = cyc;
    else begin
      checks++;
      if (cyc - last_out != F) begin
        failures++;
        $display("result spacing %0d cycles", cyc - last_out);
      end
    end
    last_out = cyc;
    n_out++;
  end

  initial begin
    in_valid = 1'b0;
    in_mt    = 3'd4;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 3; a++) begin
      for (int b = 0; b < 3; b++) begin
        int  mt, q, last_acc;
        real bits, rate;
        mt = a + 2;
        q  = (b == 0) ? 1 : (b == 1) ? 3 : 7;
        n_out = 0;
        sym_err = 0;
        syms_total = 0;
        last_acc = -1;
        for (int n = 0; n < NP; n++) begin
          prob_t p;
          p = gen_prob(mt, 60, 1'b1);
          for (int k = 0; k < M; k++) begin
            p.q[k] = q;
            p.s[k] = 2 * int'($urandom_range(q)) - q;
            p.y[k] = 0;
          end
          for (int k = 0; k < M; k++) begin
            for (int l = k; l < M; l++) p.y[k] += p.r[k][l] * p.s[l];
            p.y[k] += longint'($urandom_range(120)) - 60;
          end
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
            @(negedge clk);
            #1;
          end
          pend[n] = p;
          if (last_acc >= 0) begin
            checks++;
            if (cyc - last_acc != F) begin
              failures++;
              $display("M_T %0d q %0d: acceptance spacing %0d", mt, q, cyc - last_acc);
            end
          end
          last_acc = cyc;
          @(negedge clk);
          in_valid = 1'b0;
          repeat (F - 2) @(negedge clk);
        end
        while (n_out < NP) @(negedge clk);
        bits = real'(mt * 2 * $clog2(q + 1) * (NP - 1));
        rate = bits / real'(last_out - first_out) * FCLK_MHZ;
        checks++;
        if (rate < TABLE[a][b] - 1e-6 || rate >= TABLE[a][b] + 0.1) begin
          failures++;
          $display("rate mismatch");
        end
        $display("M_T %0d, %0d-QAM: %0.3f bits/cycle, %0.2f Mbps at %0.1f MHz (table %0.1f), symbol errors %0d of %0d",
                 mt, (q + 1) * (q + 1), bits / real'(last_out - first_out), rate, FCLK_MHZ,
                 TABLE[a][b], sym_err, syms_total);
        pend.delete();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
