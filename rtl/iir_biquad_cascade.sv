// iir_biquad_cascade: time-shared Butterworth IIR filter for all beams.
//
// Filters the complex signal of every beam along time (one sample per beam
// and snapshot). The filter of order 2*NSEC is a cascade of NSEC second-order
// sections in transposed direct form II; the real and imaginary parts are
// filtered with the same coefficients. One engine serves all NSTREAM beams:
// the two state words of every section, lane and beam are kept in memories
// addressed by beam * NSEC + section, and one section is computed per clock, so a sample takes NSEC
// clocks. HIGHPASS selects a high-pass instead of a low-pass response.
//
// Three coefficient sets, chosen by mode (sounding pulse of 4, 10 or 20 ms),
// have cut-off frequencies FC_4MS, FC_10MS and FC_20MS at sample rate FS.
// They are computed at elaboration from the analogue Butterworth prototype
// with the bilinear transform and pre-warping, K = tan(pi*fc/FS):
//   section k (k = 0..NSEC-1), z = sin((2k+1)*pi/(4*NSEC)),
//   a0 = K^2 + 2zK + 1,  a1 = 2(K^2 - 1)/a0,  a2 = (K^2 - 2zK + 1)/a0,
//   low-pass:  b = (K^2/a0) * [1  2 1]   (unity gain at 0 Hz)
//   high-pass: b = (1/a0)   * [1 -2 1]   (unity gain at FS/2)
// Coefficients are signed Q2.30. Internally samples carry GUARD extra
// fraction bits; outputs are rounded back to DW bits and saturated.
//
// Interface: in_valid/in_ready with in_beam, in_re, in_im, in_last; the same
// on the output side. clear zeroes all filter states (start of a
// measurement): a per-beam flag makes the states read as zero until the beam
// has been filtered once. The mode is sampled with each input sample.
//
// Follows the document: Butterworth responses, an 8th-order low-pass with
// 5/2/1 kHz and a 4th-order high-pass (anti-reverberation) with 100/40/20 Hz
// for 4/10/20 ms pulses. Own choices: taking those bands as the -3 dB
// cut-off frequencies, the section structure, the number formats and the
// time-shared schedule.
module iir_biquad_cascade #(
  parameter int unsigned NSEC     = 4,
  parameter bit          HIGHPASS = 1'b0,
  parameter real         FS       = 250.0e6 / (1440.0 * 6.0),
  parameter real         FC_4MS   = 5000.0,
  parameter real         FC_10MS  = 2000.0,
  parameter real         FC_20MS  = 1000.0,
  parameter int unsigned NSTREAM  = 61,
  parameter int unsigned DW       = 24,
  parameter int unsigned GUARD    = 12
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  acp_pkg::pulse_t            mode,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [$clog2(NSTREAM)-1:0] in_beam,
  input  logic signed [DW-1:0]       in_re,
  input  logic signed [DW-1:0]       in_im,
  input  logic                       in_last,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [$clog2(NSTREAM)-1:0] out_beam,
  output logic signed [DW-1:0]       out_re,
  output logic signed [DW-1:0]       out_im,
  output logic                       out_last
);

  localparam int unsigned IW   = DW + GUARD + 12;  // internal width
  localparam int unsigned CFW  = 32;               // coefficient width
  localparam int unsigned CFR  = 30;               // coefficient fraction bits
  localparam int unsigned PW   = IW + CFW;
  localparam int unsigned SW   = $clog2(NSTREAM);
  localparam int unsigned KW   = (NSEC > 1) ? $clog2(NSEC) : 1;
  localparam real         PI   = 3.14159265358979323846;

  typedef logic signed [CFW-1:0] coef_t;
  typedef struct packed { coef_t b0, b1, b2, a1, a2; } sos_t;

  function automatic coef_t q30(real v);
    return coef_t'($rtoi($floor(v * (2.0 ** CFR) + 0.5)));
  endfunction

  function automatic sos_t design_sos(real fc, int k);
    real kk, z, a0, g;
    sos_t s;
    kk = $tan(PI * fc / FS);
    z  = $sin((2.0 * k + 1.0) * PI / (4.0 * NSEC));
    a0 = kk * kk + 2.0 * z * kk + 1.0;
    g  = HIGHPASS ? 1.0 / a0 : kk * kk / a0;
    s.b0 = q30(g);
    s.b1 = q30(HIGHPASS ? -2.0 * g : 2.0 * g);
    s.b2 = q30(g);
    s.a1 = q30(2.0 * (kk * kk - 1.0) / a0);
    s.a2 = q30((kk * kk - 2.0 * z * kk + 1.0) / a0);
    return s;
  endfunction

  // Entry set * NSEC + k holds section k of coefficient set 'set';
  // which = 0..4 selects b0, b1, b2, a1, a2.
  typedef coef_t coef_tab_t [3 * NSEC];

  function automatic coef_tab_t make_tab(int which);
    coef_tab_t r;
    for (int i = 0; i < 3 * NSEC; i++) begin
      sos_t sec_c = design_sos((i / NSEC == 0) ? FC_4MS : (i / NSEC == 1) ? FC_10MS : FC_20MS,
                               i % NSEC);
      r[i] = (which == 0) ? sec_c.b0 : (which == 1) ? sec_c.b1 : (which == 2) ? sec_c.b2 :
             (which == 3) ? sec_c.a1 : sec_c.a2;
    end
    return r;
  endfunction

  localparam coef_tab_t TAB_B0 = make_tab(0);
  localparam coef_tab_t TAB_B1 = make_tab(1);
  localparam coef_tab_t TAB_B2 = make_tab(2);
  localparam coef_tab_t TAB_A1 = make_tab(3);
  localparam coef_tab_t TAB_A2 = make_tab(4);

  typedef logic signed [IW-1:0] iw_t;

  localparam int unsigned DEPTH = NSTREAM * NSEC;
  localparam int unsigned AW    = $clog2(DEPTH);

  // Filter states, one word per (beam, section) and lane.
  iw_t             s1_re [DEPTH];
  iw_t             s1_im [DEPTH];
  iw_t             s2_re [DEPTH];
  iw_t             s2_im [DEPTH];
  logic [NSTREAM-1:0] fresh;   // beam has no valid state since clear
  iw_t             x [2];
  logic            busy, done;
  logic [KW-1:0]   sec;
  logic [SW-1:0]   beam_q;
  logic            last_q;
  logic [1:0]      set_q;

  sos_t c;
  wire [$clog2(3 * NSEC)-1:0] cidx = ($clog2(3 * NSEC))'(int'(set_q) * NSEC + int'(sec));
  assign c = '{b0: TAB_B0[cidx], b1: TAB_B1[cidx], b2: TAB_B2[cidx],
               a1: TAB_A1[cidx], a2: TAB_A2[cidx]};

  function automatic iw_t mulc(iw_t v, coef_t k);
    logic signed [PW-1:0] p;
    p = v * k;
    return iw_t'((p + (PW'(1) <<< (CFR - 1))) >>> CFR);
  endfunction

  wire [AW-1:0] saddr = AW'(int'(beam_q) * NSEC + int'(sec));

  iw_t y [2], n1 [2], n2 [2], st1 [2], st2 [2];
  always_comb begin
    st1[0] = fresh[beam_q] ? '0 : s1_re[saddr];
    st1[1] = fresh[beam_q] ? '0 : s1_im[saddr];
    st2[0] = fresh[beam_q] ? '0 : s2_re[saddr];
    st2[1] = fresh[beam_q] ? '0 : s2_im[saddr];
    for (int l = 0; l < 2; l++) begin
      y[l]  = mulc(x[l], c.b0) + st1[l];
      n1[l] = mulc(x[l], c.b1) - mulc(y[l], c.a1) + st2[l];
      n2[l] = mulc(x[l], c.b2) - mulc(y[l], c.a2);
    end
  end

  wire st_we = busy;

  always_ff @(posedge clk) begin
    if (st_we) begin
      s1_re[saddr] <= n1[0];
      s1_im[saddr] <= n1[1];
      s2_re[saddr] <= n2[0];
      s2_im[saddr] <= n2[1];
    end
  end

  function automatic logic signed [DW-1:0] to_out(iw_t v);
    iw_t r;
    r = (v + (iw_t'(1) <<< (GUARD - 1))) >>> GUARD;
    if (r > iw_t'((1 <<< (DW - 1)) - 1))   return {1'b0, {(DW-1){1'b1}}};
    if (r < -iw_t'(1 <<< (DW - 1)))        return {1'b1, {(DW-1){1'b0}}};
    return r[DW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      sec    <= '0;
      beam_q <= '0;
      last_q <= 1'b0;
      set_q  <= '0;
      x[0]   <= '0;
      x[1]   <= '0;
      out_re <= '0;
      out_im <= '0;
      fresh  <= '1;
    end else begin
      if (in_valid && in_ready) begin
        busy   <= 1'b1;
        sec    <= '0;
        beam_q <= in_beam;
        last_q <= in_last;
        set_q  <= (mode == acp_pkg::PULSE_4MS) ? 2'd0 : (mode == acp_pkg::PULSE_10MS) ? 2'd1 : 2'd2;
        x[0]   <= iw_t'(in_re) <<< GUARD;
        x[1]   <= iw_t'(in_im) <<< GUARD;
      end else if (busy) begin
        x[0] <= y[0];
        x[1] <= y[1];
        sec  <= sec + 1'b1;
        if (sec == KW'(NSEC - 1)) begin
          fresh[beam_q] <= 1'b0;
          busy   <= 1'b0;
          done   <= 1'b1;
          out_re <= to_out(y[0]);
          out_im <= to_out(y[1]);
        end
      end
      if (done && out_ready) done <= 1'b0;
    end
  end

  assign in_ready  = !busy && !done;
  assign out_valid = done;
  assign out_beam  = beam_q;
  assign out_last  = last_q;

endmodule
