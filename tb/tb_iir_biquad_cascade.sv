// tb_iir_biquad_cascade: frequency response of the time-shared Butterworth
// filters, measured with complex exponentials.
//
// A low-pass (8th order) and a high-pass (4th order) engine with three beam
// streams each get exp(j 2 pi f n / FS) at a different frequency per stream.
// After settling, |y| / A must match the response of a digital Butterworth
// filter designed by the bilinear transform,
//   low-pass  |H| = 1 / sqrt(1 + (tan(pi f/FS) / tan(pi fc/FS))^(2N))
//   high-pass |H| = 1 / sqrt(1 + (tan(pi fc/FS) / tan(pi f/FS))^(2N)),
// for the 4 ms and the 20 ms coefficient sets (a mode switch with clear in
// between). A zero input right after clear must give exactly zero.
module tb_iir_biquad_cascade;
  localparam int NS = 3, DW = 24;
  localparam real FS = 250.0e6 / (1440.0 * 6.0);
  localparam real PI = 3.14159265358979323846;
  localparam real A  = 1048576.0;
  logic clk = 0, rst_n = 0, clear = 0;
  acp_pkg::pulse_t mode = acp_pkg::PULSE_4MS;
  int checks = 0, failures = 0;

  logic lp_in_valid = 0, hp_in_valid = 0;
  logic [1:0] in_beam = '0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic lp_ready, hp_ready, lp_valid, hp_valid, lp_last, hp_last;
  logic [1:0] lp_beam, hp_beam;
  logic signed [DW-1:0] lp_re, lp_im, hp_re, hp_im;

  iir_biquad_cascade #(.NSEC(4), .HIGHPASS(1'b0), .FS(FS), .FC_4MS(5000.0), .FC_10MS(2000.0),
    .FC_20MS(1000.0), .NSTREAM(NS), .DW(DW)) lpf (
    .clk, .rst_n, .clear, .mode, .in_valid(lp_in_valid), .in_ready(lp_ready), .in_beam, .in_re, .in_im,
    .in_last(1'b0), .out_valid(lp_valid), .out_ready(1'b1), .out_beam(lp_beam),
    .out_re(lp_re), .out_im(lp_im), .out_last(lp_last));
  iir_biquad_cascade #(.NSEC(2), .HIGHPASS(1'b1), .FS(FS), .FC_4MS(100.0), .FC_10MS(40.0),
    .FC_20MS(20.0), .NSTREAM(NS), .DW(DW)) hpf (
    .clk, .rst_n, .clear, .mode, .in_valid(hp_in_valid), .in_ready(hp_ready), .in_beam, .in_re, .in_im,
    .in_last(1'b0), .out_valid(hp_valid), .out_ready(1'b1), .out_beam(hp_beam),
    .out_re(hp_re), .out_im(hp_im), .out_last(hp_last));

  always #2 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real bw_gain(real f, real fc, int order, bit hp);
    real r = $tan(PI * fabs(f) / FS) / $tan(PI * fc / FS);
    if (hp) r = 1.0 / r;
    return 1.0 / $sqrt(1.0 + r ** (2 * order));
  endfunction

  // last output magnitudes per stream, and their min/max over a window
  real lp_mag [NS], hp_mag [NS], lp_min [NS], lp_max [NS], hp_min [NS], hp_max [NS];
  bit  window = 0;
  always @(posedge clk) begin
    if (lp_valid) begin
      lp_mag[lp_beam] = $sqrt(real'(lp_re) ** 2 + real'(lp_im) ** 2) / A;
      if (window) begin
        if (lp_mag[lp_beam] < lp_min[lp_beam]) lp_min[lp_beam] = lp_mag[lp_beam];
        if (lp_mag[lp_beam] > lp_max[lp_beam]) lp_max[lp_beam] = lp_mag[lp_beam];
      end
    end
    if (hp_valid) begin
      hp_mag[hp_beam] = $sqrt(real'(hp_re) ** 2 + real'(hp_im) ** 2) / A;
      if (window) begin
        if (hp_mag[hp_beam] < hp_min[hp_beam]) hp_min[hp_beam] = hp_mag[hp_beam];
        if (hp_mag[hp_beam] > hp_max[hp_beam]) hp_max[hp_beam] = hp_mag[hp_beam];
      end
    end
  end

  // Hand one sample to both engines; each takes it when it is ready.
  task automatic send(int s, real re, real im);
    @(negedge clk);
    lp_in_valid = 1; hp_in_valid = 1; in_beam = 2'(s);
    in_re = DW'($rtoi(re)); in_im = DW'($rtoi(im));
    while (lp_in_valid || hp_in_valid) begin
      automatic bit la = lp_in_valid && lp_ready;
      automatic bit ha = hp_in_valid && hp_ready;
      @(posedge clk);
      #1;
      if (la) lp_in_valid = 0;
      if (ha) hp_in_valid = 0;
      if (lp_in_valid || hp_in_valid) @(negedge clk);
    end
  endtask

  task automatic tone_test(real f [NS], int nsamp, real lp_fc, real hp_fc);
    for (int s = 0; s < NS; s++) begin
      lp_min[s] = 1.0e9; lp_max[s] = 0.0; hp_min[s] = 1.0e9; hp_max[s] = 0.0;
    end
    window = 0;
    for (int n = 0; n < nsamp; n++) begin
      if (n == nsamp - 300) window = 1;
      for (int s = 0; s < NS; s++)
        send(s, A * $cos(2.0 * PI * f[s] * n / FS), A * $sin(2.0 * PI * f[s] * n / FS));
    end
    repeat (20) @(posedge clk);
    window = 0;
    for (int s = 0; s < NS; s++) begin
      real gl = bw_gain(f[s], lp_fc, 8, 0), gh = bw_gain(f[s], hp_fc, 4, 1);
      $display("f=%8.1f  low-pass %f..%f (exp %f)  high-pass %f..%f (exp %f)",
               f[s], lp_min[s], lp_max[s], gl, hp_min[s], hp_max[s], gh);
      check(fabs(lp_min[s] - gl) < 0.005 + 0.01 * gl && fabs(lp_max[s] - gl) < 0.005 + 0.01 * gl,
            $sformatf("low-pass gain at %f Hz", f[s]));
      check(fabs(hp_min[s] - gh) < 0.005 + 0.01 * gh && fabs(hp_max[s] - gh) < 0.005 + 0.01 * gh,
            $sformatf("high-pass gain at %f Hz", f[s]));
    end
  endtask

  task automatic do_clear();
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    // zero in, zero out from cleared states
    send(0, 0.0, 0.0);
    repeat (10) @(posedge clk);
    check(lp_mag[0] == 0.0 && hp_mag[0] == 0.0, "zero output after clear");
  endtask

  initial begin
    real f1 [NS] = '{1000.0, 5000.0, -9000.0};
    real f2 [NS] = '{20.0, 100.0, 2000.0};
    real f3 [NS] = '{400.0, 1000.0, -2500.0};
    real f4 [NS] = '{20.0, 200.0, 60.0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    mode = acp_pkg::PULSE_4MS;
    do_clear();
    tone_test(f1, 1500, 5000.0, 100.0);
    do_clear();
    tone_test(f2, 6000, 5000.0, 100.0);
    mode = acp_pkg::PULSE_20MS;
    do_clear();
    tone_test(f3, 2500, 1000.0, 20.0);
    do_clear();
    tone_test(f4, 8000, 1000.0, 20.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
