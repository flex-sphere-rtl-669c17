// tb_flex_ber: bit-error-rate run of the full-size detector for four
// streams of 64-QAM over random Rayleigh channels.
//
// For every vector a 4x4 complex channel with independent standard normal
// real and imaginary parts is drawn, turned into the 8x8 real matrix in the
// adjacent real/imaginary order, and QR-decomposed (Gram-Schmidt, positive
// diagonal). R, y' = Q^T y and 1/R_ii are quantised to the detector's input
// formats. Noise is white Gaussian at the given SNR per receive antenna
// (signal power 4 x 42 per antenna for unnormalised 64-QAM). No channel
// ordering is applied. The detector's output is checked bit-exactly against
// the reference model, and bit errors against the transmitted bits (Gray
// mapping, 3 bits per real dimension) are reported per SNR. The run fails
// if the bit error rate does not fall as the SNR rises or if it exceeds
// 1e-3 at the highest SNR.
module tb_flex_ber;
  import flex_pkg::*;
  import flex_ref_pkg::*;
  localparam int NV   = 400;
  localparam int NSNR = 5;
  localparam real SNR_DB [NSNR] = '{15.0, 20.0, 25.0, 30.0, 35.0};
  localparam real PI = 3.14159265358979;

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

  int    checks = 0, failures = 0, n_out = 0, bit_err = 0;
  prob_t pend [int];
  real   ber [NSNR];

  flex_sphere_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NSNR * (NV * 8 + 400) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(32'hFFFFFF)) + 1.0) / 16777217.0;
    u2 = real'($urandom_range(32'hFFFFFF)) / 16777216.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic int gray_bits_diff(input int a, input int b);
    int ga, gb, d;
    ga = ((a + 7) / 2) ^ (((a + 7) / 2) >> 1);
    gb = ((b + 7) / 2) ^ (((b + 7) / 2) >> 1);
    d  = ga ^ gb;
    return (d & 1) + ((d >> 1) & 1) + ((d >> 2) & 1);
  endfunction

  function automatic longint quant(input real x, input int frac);
    longint v;
    v = longint'($floor(x * real'(1 << frac) + 0.5));
    if (v > 32767)  v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  // one received vector: channel, QR, noise, quantisation
  function automatic prob_t make_vec(input real snr_db);
    prob_t p;
    real   h [M][M];
    real   qm [M][M];
    real   r [M][M];
    real   y [M];
    real   sigma;
    p.mt = 4;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        real hr, hi;
        hr = gauss() * $sqrt(0.5);
        hi = gauss() * $sqrt(0.5);
        h[2*a][2*b]   = hr;  h[2*a][2*b+1]   = -hi;
        h[2*a+1][2*b] = hi;  h[2*a+1][2*b+1] = hr;
      end
    // modified Gram-Schmidt on the columns
    for (int c = 0; c < M; c++) begin
      real v [M];
      real nrm;
      for (int k = 0; k < M; k++) v[k] = h[k][c];
      for (int j = 0; j < c; j++) begin
        real d;
        d = 0.0;
        for (int k = 0; k < M; k++) d += qm[k][j] * v[k];
        r[j][c] = d;
        for (int k = 0; k < M; k++) v[k] -= d * qm[k][j];
      end
      nrm = 0.0;
      for (int k = 0; k < M; k++) nrm += v[k] * v[k];
      nrm = $sqrt(nrm);
      r[c][c] = nrm;
      for (int j = c + 1; j < M; j++) r[j][c] = 0.0;
      for (int k = 0; k < M; k++) qm[k][c] = v[k] / nrm;
    end
    for (int k = 0; k < M; k++) begin
      p.q[k] = 7;
      p.s[k] = 2 * int'($urandom_range(7)) - 7;
    end
    sigma = $sqrt(4.0 * 42.0 / $pow(10.0, snr_db / 10.0) / 2.0);
    for (int k = 0; k < M; k++) begin
      y[k] = gauss() * sigma;
      for (int l = 0; l < M; l++) y[k] += h[k][l] * real'(p.s[l]);
    end
    for (int k = 0; k < M; k++) begin
      real yq;
      yq = 0.0;
      for (int l = 0; l < M; l++) yq += qm[l][k] * y[l];
      p.y[k] = quant(yq, FR);
      for (int l = 0; l < M; l++) p.r[k][l] = quant(r[k][l], FR);
      p.rinv[k] = quant(1.0 / r[k][k], FRI);
    end
    return p;
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    int     syms [M];
    longint ped;
    prob_t  p;
    p = pend[int'(out_id)];
    ref_detect(p, syms, ped);
    checks++;
    if (longint'(out_ped) != ped) failures++;
    for (int k = 0; k < M; k++) begin
      checks++;
      if (int'(out_sym[k]) != syms[k]) failures++;
      bit_err += gray_bits_diff(int'(out_sym[k]), p.s[k]);
    end
    n_out++;
  end

  initial begin
    in_valid = 1'b0;
    in_mt    = 3'd4;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NSNR; t++) begin
      n_out   = 0;
      bit_err = 0;
      for (int n = 0; n < NV; n++) begin
        prob_t p;
        p = make_vec(SNR_DB[t]);
        @(negedge clk);
        for (int k = 0; k < M; k++) begin
          for (int l = 0; l < M; l++) in_r[k][l] = fx_t'(p.r[k][l]);
          in_rinv[k] = fx_t'(p.rinv[k]);
          in_y[k]    = fx_t'(p.y[k]);
          in_q[k]    = q_t'(p.q[k]);
        end
        in_id    = IDW'(n);
        in_valid = 1'b1;
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
        pend[n % 256] = p;
        @(negedge clk);
        in_valid = 1'b0;
        repeat (F - 2) @(negedge clk);
      end
      while (n_out < NV) @(negedge clk);
      ber[t] = real'(bit_err) / real'(NV * 24);
      $display("SNR %0.1f dB: %0d bit errors in %0d bits, BER %0.5f", SNR_DB[t], bit_err, NV * 24, ber[t]);
    end
    for (int t = 1; t < NSNR; t++) begin
      checks++;
      if (ber[t] > ber[t-1] && ber[t] > 0.0) failures++;
    end
    checks++;
    if (ber[NSNR-1] > 1e-3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
