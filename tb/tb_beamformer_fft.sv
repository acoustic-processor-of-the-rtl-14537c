// tb_beamformer_fft: plane waves across the 36-element array against a
// floating-point DFT of the zero-padded, weighted aperture.
//
// Each snapshot is x[n] = A exp(j 2 pi u n) for n = 0..35 with spatial
// frequency u, quantised to 15-bit integers. The expected beam b is
// X[b - 30] = sum_n w[n] x[n] exp(-j 2 pi (b - 30) n / 128), computed in
// real arithmetic. All 61 beams of every snapshot must agree to within a few
// LSB plus 1e-4 of the value (twiddle 1.0 is stored as 32767/32768), the strongest beam must be the one nearest u, and the time from the
// first accepted sample to the first beam must be 128 load clocks plus
// 7 x 64 butterfly clocks. Snapshots use uniform weights, then random weights
// written through the weight port. Last, a cosine-on-pedestal taper
// w[n] = 0.52 + 0.48 cos(pi (n - 17.5) / 36) is loaded and a broadside wave
// applied: the highest side lobe of the 61 beams must lie at the -18 dB level
// the sonar is designed for (-18.3 dB for this taper), as in the reference.
module tb_beamformer_fft;
  localparam int N = 36, NF = 128, NB = 61, DW = 24;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic weight_wr = 0;
  logic [5:0] weight_idx = '0;
  logic [15:0] weight_val = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last;
  logic signed [14:0] in_re = '0, in_im = '0;
  logic [5:0] out_beam;
  logic signed [DW-1:0] out_re, out_im;
  logic [31:0] frame_count;
  int checks = 0, failures = 0;
  real wts [N];
  real got_m [NB], ref_m [NB];   // beam magnitudes of the last snapshot
  int cyc = 0;

  beamformer_fft #(.NUM_CH(N), .NFFT(NF), .NBEAMS(NB), .DW(DW)) dut (.*);

  always #2 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Highest lobe outside the main lobe around beam 30, relative to beam 30.
  function automatic real side_lobe_db(real m [NB]);
    int lo = 30, hi = 30;
    real s = 0.0;
    while (hi < NB - 1 && m[hi + 1] < m[hi]) hi++;
    while (lo > 0 && m[lo - 1] < m[lo]) lo--;
    for (int b = 0; b < NB; b++)
      if ((b <= lo || b >= hi) && m[b] > s) s = m[b];
    return 20.0 * $log10(s / m[30]);
  endfunction

  task automatic run_snapshot(real u, real amp, bit stall_out);
    int xr [N], xi [N];
    real er [NB], ei [NB];
    int t_in, t_out, best, bestb;
    real bestm;
    for (int n = 0; n < N; n++) begin
      xr[n] = $rtoi($floor(amp * $cos(2.0 * PI * u * n) + 0.5));
      xi[n] = $rtoi($floor(amp * $sin(2.0 * PI * u * n) + 0.5));
    end
    for (int b = 0; b < NB; b++) begin
      er[b] = 0.0; ei[b] = 0.0;
      for (int n = 0; n < N; n++) begin
        real a = -2.0 * PI * (b - 30) * n / NF;
        er[b] += wts[n] * (xr[n] * $cos(a) - xi[n] * $sin(a));
        ei[b] += wts[n] * (xr[n] * $sin(a) + xi[n] * $cos(a));
      end
    end
    // feed: the handshake is decided at the falling edge, before the rising one
    t_in = -1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1; in_re = 15'(xr[n]); in_im = 15'(xi[n]);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      if (t_in < 0) t_in = cyc;
    end
    @(negedge clk) in_valid = 0;
    // collect
    while (!out_valid) @(negedge clk);
    t_out = cyc;
    check(t_out - t_in == 128 + 7 * 64, $sformatf("latency %0d clocks", t_out - t_in));
    bestm = -1.0; bestb = -1;
    for (int b = 0; b < NB; b++) begin
      real m;
      // a few LSB of rounding per stage, plus the twiddle scale 32767/32768
      real tol = 10.0 + 1.0e-4 * (fabs(er[b]) + fabs(ei[b]));
      out_ready = stall_out ? ($urandom % 2 == 0) : 1'b1;
      while (!out_ready) begin
        @(negedge clk);
        out_ready = ($urandom % 2 == 0);
      end
      check(out_valid && int'(out_beam) == b, $sformatf("beam index %0d", b));
      check(fabs(real'(out_re) - er[b]) < tol && fabs(real'(out_im) - ei[b]) < tol,
            $sformatf("u=%f beam %0d: (%0d,%0d) exp (%f,%f)", u, b, out_re, out_im, er[b], ei[b]));
      check(out_last == (b == NB - 1), "last flag");
      m = real'(out_re) * real'(out_re) + real'(out_im) * real'(out_im);
      got_m[b] = $sqrt(m);
      ref_m[b] = $sqrt(er[b] * er[b] + ei[b] * ei[b]);
      if (m > bestm) begin bestm = m; bestb = b; end
      @(negedge clk);
    end
    out_ready = 0;
    best = $rtoi($floor(u * NF + 0.5)) + 30;
    check(bestb == best, $sformatf("peak beam %0d exp %0d", bestb, best));
  endtask

  initial begin
    for (int n = 0; n < N; n++) wts[n] = 1.0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run_snapshot(0.0, 8000.0, 0);            // broadside
    run_snapshot(7.0 / NF, 8000.0, 1);       // on a line
    run_snapshot(-23.4 / NF, 8191.0, 0);     // between lines
    run_snapshot(29.8 / NF, 5000.0, 1);      // edge of the sector
    // random amplitude weights
    for (int n = 0; n < N; n++) begin
      automatic int v = 4096 + int'($urandom % 12289);
      @(negedge clk);
      weight_wr = 1; weight_idx = 6'(n); weight_val = 16'(v);
      wts[n] = v / 16384.0;
    end
    @(negedge clk) weight_wr = 0;
    run_snapshot(-11.0 / NF, 8000.0, 0);
    run_snapshot(3.3 / NF, 8191.0, 1);
    // side-lobe level with the cosine-on-pedestal taper
    for (int n = 0; n < N; n++) begin
      automatic real w = 0.52 + 0.48 * $cos(PI * (n - 17.5) / 36.0);
      automatic int v = $rtoi($floor(w * 16384.0 + 0.5));
      @(negedge clk);
      weight_wr = 1; weight_idx = 6'(n); weight_val = 16'(v);
      wts[n] = v / 16384.0;
    end
    @(negedge clk) weight_wr = 0;
    run_snapshot(0.0, 8000.0, 0);
    begin
      real sl_got, sl_ref;
      sl_got = side_lobe_db(got_m);
      sl_ref = side_lobe_db(ref_m);
      $display("highest side lobe %.2f dB (reference %.2f dB)", sl_got, sl_ref);
      check(sl_got < -18.0 && sl_got > -18.7, "side lobes at the -18 dB level");
      check(fabs(sl_got - sl_ref) < 0.05, "side-lobe level as in the reference");
    end
    check(frame_count == 32'd7, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
