// beamformer_fft: digital phase beamformer computed with a zero-padded FFT.
//
// Each snapshot of NUM_CH complex channel samples is weighted per channel
// (amplitude weighting for lower side lobes), padded with zeros to NFFT
// points and transformed with a radix-2 decimation-in-time FFT over the array
// aperture (spatial frequencies). Each FFT line is one beam direction; the
// NBEAMS lines around zero spatial frequency, lines -(NBEAMS-1)/2 ..
// +(NBEAMS-1)/2, are the beams of the sector and are streamed out in that
// order (beam 0 = line -30, beam 30 = line 0 = broadside, beam 60 = line +30).
// The phase shift between elements is linear in the beam index, so the beams
// are not exactly equally spaced in angle.
//
// Operation: LOAD accepts the NUM_CH samples (in_valid/in_ready, channel 0
// first) and stores the weighted samples in bit-reversed order, then writes
// zeros to the remaining NFFT-NUM_CH positions (one per clock), FFT runs log2(NFFT) stages of NFFT/2
// butterflies, one butterfly per clock (448 clocks for 128 points), OUT
// streams the beams (out_valid/out_ready). The working memory is a register
// array with two write and three read ports.
//
// Arithmetic: samples IN_W bits, weights unsigned Q2.14 (16384 = 1.0, all
// weights 1.0 after reset, loaded through weight_wr), twiddles signed
// Q1.(TW_W-1) computed at elaboration, data DW bits without scaling between
// stages (36 full-scale 14-bit inputs need 23 bits), products rounded.
//
// Follows the document: weighting of the quadrature samples, zero padding of
// the 36 samples to 128, FFT, 61 beams in the sector. Own choices: all number
// formats, the radix-2 in-place schedule, the weight reset value, the
// handshakes.
module beamformer_fft #(
  parameter int unsigned NUM_CH = acp_pkg::NUM_CH,
  parameter int unsigned NFFT   = 128,
  parameter int unsigned NBEAMS = 61,
  parameter int unsigned IN_W   = acp_pkg::SAMPLE_W + 1,
  parameter int unsigned DW     = 24,
  parameter int unsigned TW_W   = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // weights
  input  logic                         weight_wr,
  input  logic [$clog2(NUM_CH)-1:0]    weight_idx,
  input  logic [15:0]                  weight_val,
  // channel samples
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic signed [IN_W-1:0]       in_re,
  input  logic signed [IN_W-1:0]       in_im,
  // beams
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [$clog2(NBEAMS)-1:0]    out_beam,
  output logic signed [DW-1:0]         out_re,
  output logic signed [DW-1:0]         out_im,
  output logic                         out_last,
  output logic [31:0]                  frame_count
);

  localparam int unsigned LOGN = $clog2(NFFT);
  localparam int unsigned AW   = LOGN;
  localparam int unsigned BW   = $clog2(NBEAMS);
  localparam int unsigned CW   = $clog2(NUM_CH);
  localparam int          HALF_BEAMS = (NBEAMS - 1) / 2;
  localparam real         PI   = 3.14159265358979323846;
  localparam int          TW_ONE = (1 << (TW_W - 1)) - 1;

  typedef logic signed [TW_W-1:0] tw_t;

  typedef tw_t tw_rom_t [NFFT/2];

  // Twiddle tables, rounded to TW_W bits: cos/sin(2*pi*k/NFFT).
  function automatic tw_rom_t make_rom(bit use_sin);
    tw_rom_t r;
    for (int k = 0; k < NFFT/2; k++) begin
      real a = 2.0 * PI * k / NFFT;
      r[k] = tw_t'($rtoi($floor(TW_ONE * (use_sin ? $sin(a) : $cos(a)) + 0.5)));
    end
    return r;
  endfunction
  function automatic logic [AW-1:0] bitrev(logic [AW-1:0] a);
    for (int i = 0; i < AW; i++) bitrev[i] = a[AW-1-i];
  endfunction

  localparam tw_rom_t COS_ROM = make_rom(1'b0);
  localparam tw_rom_t SIN_ROM = make_rom(1'b1);

  typedef enum logic [1:0] {B_IDLE, B_LOAD, B_FFT, B_OUT} bstate_t;

  bstate_t                 state;
  logic signed [DW-1:0]    mem_re [NFFT];
  logic signed [DW-1:0]    mem_im [NFFT];
  logic [15:0]             weights [NUM_CH];
  logic [AW:0]             lcnt;     // load position 0..NFFT
  logic [AW-2:0]           bf;
  logic [$clog2(LOGN)-1:0] stage;
  logic [BW-1:0]           ocnt;

  // ---- weighting of the incoming sample ----
  wire [CW-1:0]             wch   = CW'(lcnt);
  wire signed [16:0]        wgt   = {1'b0, weights[wch]};
  wire signed [IN_W+16:0]   pr_re = in_re * wgt;
  wire signed [IN_W+16:0]   pr_im = in_im * wgt;
  wire signed [DW-1:0]      w_re  = DW'((pr_re + (1 <<< 13)) >>> 14);
  wire signed [DW-1:0]      w_im  = DW'((pr_im + (1 <<< 13)) >>> 14);

  // ---- butterfly addressing ----
  logic [AW-1:0] i0, i1, span;
  logic [AW-2:0] twi;
  always_comb begin
    span = AW'(1) << stage;
    i0   = AW'((AW'(bf) >> stage) << (stage + 1)) | (AW'(bf) & (span - 1'b1));
    i1   = i0 | span;
    twi  = (AW-1)'((AW'(bf) & (span - 1'b1)) << (LOGN - 1 - int'(stage)));
  end

  localparam int PW = DW + TW_W + 1;
  wire signed [DW-1:0]   a_re = mem_re[i0], a_im = mem_im[i0];
  wire signed [DW-1:0]   b_re = mem_re[i1], b_im = mem_im[i1];
  wire signed [TW_W-1:0] wc = COS_ROM[twi], ws = SIN_ROM[twi];
  // t = b * (wc - j ws)
  wire signed [PW-1:0]   t_re_f = b_re * wc + b_im * ws;
  wire signed [PW-1:0]   t_im_f = b_im * wc - b_re * ws;
  wire signed [DW-1:0]   t_re = DW'((t_re_f + (PW'(1) <<< (TW_W - 2))) >>> (TW_W - 1));
  wire signed [DW-1:0]   t_im = DW'((t_im_f + (PW'(1) <<< (TW_W - 2))) >>> (TW_W - 1));

  // Positions NUM_CH..NFFT-1 are filled with zeros without waiting for input.
  wire load_pad  = (lcnt >= (AW+1)'(NUM_CH));
  wire load_step = load_pad || in_valid;

  // ---- output line of beam ocnt ----
  wire [AW-1:0] out_line = AW'(int'(ocnt) - HALF_BEAMS);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CH; c++) weights[c] <= 16'd16384;
    end else if (weight_wr && int'(weight_idx) < NUM_CH) begin
      weights[weight_idx] <= weight_val;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= B_IDLE;
      lcnt        <= '0;
      bf          <= '0;
      stage       <= '0;
      ocnt        <= '0;
      frame_count <= '0;
    end else begin
      unique case (state)
        B_IDLE: begin
          lcnt  <= '0;
          state <= B_LOAD;
        end
        B_LOAD: if (load_step) begin
          lcnt <= lcnt + 1'b1;
          if (lcnt == (AW+1)'(NFFT - 1)) begin
            state <= B_FFT;
            bf    <= '0;
            stage <= '0;
          end
        end
        B_FFT: begin
          bf <= bf + 1'b1;
          if (bf == '1) begin
            stage <= stage + 1'b1;
            if (stage == ($bits(stage))'(LOGN - 1)) begin
              state <= B_OUT;
              ocnt  <= '0;
            end
          end
        end
        B_OUT: if (out_ready) begin
          ocnt <= ocnt + 1'b1;
          if (ocnt == BW'(NBEAMS - 1)) begin
            state       <= B_IDLE;
            frame_count <= frame_count + 1'b1;
          end
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  // Working memory: port 0 writes the loaded sample or the upper butterfly
  // output, port 1 the lower butterfly output.
  always_ff @(posedge clk) begin
    if (state == B_LOAD && load_step) begin
      mem_re[bitrev(AW'(lcnt))] <= load_pad ? '0 : w_re;
      mem_im[bitrev(AW'(lcnt))] <= load_pad ? '0 : w_im;
    end else if (state == B_FFT) begin
      mem_re[i0] <= a_re + t_re;
      mem_im[i0] <= a_im + t_im;
    end
  end
  always_ff @(posedge clk) begin
    if (state == B_FFT) begin
      mem_re[i1] <= a_re - t_re;
      mem_im[i1] <= a_im - t_im;
    end
  end

  assign in_ready  = (state == B_LOAD) && !load_pad;
  assign out_valid = (state == B_OUT);
  assign out_beam  = ocnt;
  assign out_re    = mem_re[out_line];
  assign out_im    = mem_im[out_line];
  assign out_last  = (state == B_OUT) && (ocnt == BW'(NBEAMS - 1));

  initial assert (NFFT == (1 << LOGN) && NUM_CH <= NFFT && NBEAMS <= NFFT && NBEAMS % 2 == 1)
    else $error("unsupported beamformer size");

endmodule
