// acoustic_processor: acoustic processor of a mine countermeasure sonar.
//
// Data path, in the order the samples travel:
//   madc_controller   36 converters with common CLK and STC, 4x carrier
//                     sampling, 14-bit samples shifted out over SPI into the
//                     serial-parallel register, only marked samples kept
//   sample_fifo       MADC -> DSP board FIFO (LVDS link in between)
//   frame_assembler   72 FIFO words -> 36 complex channel samples
//   beamformer_fft    amplitude weighting, zero padding to 128, FFT, 61 beams
//   iir_biquad_cascade (x2)  8th-order Butterworth low-pass, then 4th-order
//                     Butterworth high-pass (anti-reverberation); cut-offs
//                     follow the sounding pulse length
//   beam_magnitude    sqrt(I^2 + Q^2) per beam
//   measure_ctrl      measurement cycle, writes results to the RAM
//   dual_port_ram     512K x 36 result buffer
//   vme_interface     VMEbus Slave (A16/D32 registers, A32/D32 RAM, BLT) and
//                     Interrupter (results ready)
//
// The signal processing that the board runs on its DSP processor is built
// here as a hardware pipeline with the same steps; the processor itself, its
// SDRAM and flash, the opto-couplers, LVDS and bus buffers and the converters
// are outside this RTL. All blocks run on one clock, nominally 250 MHz (4 ns),
// which makes the 5.76 us conversion period 1440 clocks; a snapshot (six
// conversions) takes 8640 clocks and the pipeline needs about 2300 of them
// per snapshot.
//
// Ports: the converter lines (adc_clk, adc_stc, one serial data line per
// channel), the VMEbus lines behind the bus buffers (data split into
// d_in / d_out with d_oe) and a few monitoring counters. The dual-port RAM's
// port A is only written by the pipeline; its read data are not used.
module acoustic_processor #(
  parameter int unsigned NUM_CH        = acp_pkg::NUM_CH,
  parameter int unsigned SAMPLE_PERIOD = acp_pkg::SAMPLE_PERIOD,
  parameter int unsigned FIFO_DEPTH    = 1024,
  parameter int unsigned RAM_AW        = 19,
  parameter logic [15:0] A16_BASE      = 16'hC000,
  parameter logic [31:0] A32_BASE      = 32'h0800_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  // converters
  output logic              adc_clk,
  output logic              adc_stc,
  input  logic [NUM_CH-1:0] adc_sdo,
  // VMEbus
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,
  input  logic              vme_write_n,
  input  logic              vme_lword_n,
  input  logic              vme_iack_n,
  input  logic              vme_iackin_n,
  output logic              vme_iackout_n,
  input  logic [5:0]        vme_am,
  input  logic [31:1]       vme_addr,
  input  logic [31:0]       vme_d_in,
  output logic [31:0]       vme_d_out,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  output logic [7:1]        vme_irq_n,
  // monitoring
  output logic [31:0]       stat_snapshots,   // snapshots beamformed since reset
  output logic [15:0]       stat_resyncs,     // snapshot framing losses
  output logic [$clog2(FIFO_DEPTH):0] stat_fifo_level,
  output logic              stat_clipped      // last range exceeded the RAM
);

  localparam int unsigned DW     = 24;
  localparam int unsigned NBEAMS = 61;
  localparam int unsigned BW     = $clog2(NBEAMS);
  localparam int unsigned IN_W   = acp_pkg::SAMPLE_W + 1;
  localparam real         FS_BEAM = 250.0e6 / (real'(SAMPLE_PERIOD) * real'(acp_pkg::SEQ_LEN));

  // ---- MADC -> FIFO ----
  logic                madc_run, madc_busy, madc_ovf;
  logic [31:0]         conv_count;
  logic                fifo_wr, fifo_full, fifo_rd, fifo_empty, fifo_ovf;
  acp_pkg::fifo_word_t fifo_wdata, fifo_rdata;

  // The MADC card offers CARD_CH inputs; the array may not use more.
  if (NUM_CH > acp_pkg::CARD_CH) begin : g_card_check
    $error("NUM_CH exceeds the channels of the MADC card");
  end

  madc_controller #(.NUM_CH(NUM_CH), .SAMPLE_PERIOD(SAMPLE_PERIOD)) u_madc (
    .clk, .rst_n, .run(madc_run),
    .adc_clk, .adc_stc, .adc_sdo,
    .fifo_wr, .fifo_wdata, .fifo_full,
    .busy(madc_busy), .overflow(madc_ovf), .conv_count
  );

  sample_fifo #(.WIDTH(acp_pkg::FIFO_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(fifo_wr), .wr_data(fifo_wdata), .full(fifo_full),
    .rd_en(fifo_rd), .rd_data(fifo_rdata), .empty(fifo_empty),
    .count(stat_fifo_level), .overflow(fifo_ovf)
  );

  // ---- snapshot assembly and beamforming ----
  logic                   fa_valid, fa_ready;
  logic signed [IN_W-1:0] fa_re, fa_im;

  frame_assembler #(.NUM_CH(NUM_CH), .OUT_W(IN_W)) u_fa (
    .clk, .rst_n,
    .fifo_empty, .fifo_rdata, .fifo_rd,
    .out_valid(fa_valid), .out_ready(fa_ready), .out_re(fa_re), .out_im(fa_im),
    .out_last(), .resync_count(stat_resyncs)
  );

  logic                 weight_wr;
  logic [5:0]           weight_idx;
  logic [15:0]          weight_val;
  logic                 bf_valid, bf_ready, bf_last;
  logic [BW-1:0]        bf_beam;
  logic signed [DW-1:0] bf_re, bf_im;

  beamformer_fft #(.NUM_CH(NUM_CH), .NBEAMS(NBEAMS), .IN_W(IN_W), .DW(DW)) u_bf (
    .clk, .rst_n,
    .weight_wr, .weight_idx(weight_idx[$clog2(NUM_CH)-1:0]), .weight_val,
    .in_valid(fa_valid), .in_ready(fa_ready), .in_re(fa_re), .in_im(fa_im),
    .out_valid(bf_valid), .out_ready(bf_ready), .out_beam(bf_beam),
    .out_re(bf_re), .out_im(bf_im), .out_last(bf_last), .frame_count(stat_snapshots)
  );

  // ---- filters ----
  acp_pkg::pulse_t      pulse_mode;
  logic                 filt_clear;
  logic                 lp_valid, lp_ready, lp_last;
  logic [BW-1:0]        lp_beam;
  logic signed [DW-1:0] lp_re, lp_im;
  logic                 hp_valid, hp_ready, hp_last;
  logic [BW-1:0]        hp_beam;
  logic signed [DW-1:0] hp_re, hp_im;

  iir_biquad_cascade #(
    .NSEC(4), .HIGHPASS(1'b0), .FS(FS_BEAM),
    .FC_4MS(5000.0), .FC_10MS(2000.0), .FC_20MS(1000.0),
    .NSTREAM(NBEAMS), .DW(DW)
  ) u_lpf (
    .clk, .rst_n, .clear(filt_clear), .mode(pulse_mode),
    .in_valid(bf_valid), .in_ready(bf_ready), .in_beam(bf_beam),
    .in_re(bf_re), .in_im(bf_im), .in_last(bf_last),
    .out_valid(lp_valid), .out_ready(lp_ready), .out_beam(lp_beam),
    .out_re(lp_re), .out_im(lp_im), .out_last(lp_last)
  );

  iir_biquad_cascade #(
    .NSEC(2), .HIGHPASS(1'b1), .FS(FS_BEAM),
    .FC_4MS(100.0), .FC_10MS(40.0), .FC_20MS(20.0),
    .NSTREAM(NBEAMS), .DW(DW)
  ) u_hpf (
    .clk, .rst_n, .clear(filt_clear), .mode(pulse_mode),
    .in_valid(lp_valid), .in_ready(lp_ready), .in_beam(lp_beam),
    .in_re(lp_re), .in_im(lp_im), .in_last(lp_last),
    .out_valid(hp_valid), .out_ready(hp_ready), .out_beam(hp_beam),
    .out_re(hp_re), .out_im(hp_im), .out_last(hp_last)
  );

  // ---- amplitude and result buffer ----
  logic          mag_valid, mag_ready, mag_last;
  logic [BW-1:0] mag_beam;
  logic [DW-1:0] mag_data;

  beam_magnitude #(.DW(DW), .NSTREAM(NBEAMS)) u_mag (
    .clk, .rst_n,
    .in_valid(hp_valid), .in_ready(hp_ready), .in_beam(hp_beam),
    .in_re(hp_re), .in_im(hp_im), .in_last(hp_last),
    .out_valid(mag_valid), .out_ready(mag_ready), .out_beam(mag_beam),
    .out_mag(mag_data), .out_last(mag_last)
  );

  logic              start, ready_ack, meas_busy, ready, data_done;
  logic [19:0]       range_len, length;
  logic              ra_en, ra_we, rb_en, rb_we;
  logic [RAM_AW-1:0] ra_addr, rb_addr;
  logic [35:0]       ra_wdata, rb_wdata, rb_rdata;

  measure_ctrl #(.RAM_AW(RAM_AW), .DW(DW), .NSTREAM(NBEAMS)) u_ctrl (
    .clk, .rst_n, .start, .range_len, .ready_ack,
    .madc_run, .madc_busy, .madc_conv_count(conv_count), .filt_clear,
    .mag_valid, .mag_ready, .mag_beam, .mag_data, .mag_last,
    .ram_en(ra_en), .ram_we(ra_we), .ram_addr(ra_addr), .ram_wdata(ra_wdata),
    .busy(meas_busy), .ready, .data_done, .length, .clipped(stat_clipped)
  );

  dual_port_ram #(.WORDS(1 << RAM_AW), .WIDTH(36)) u_ram (
    .clk,
    .a_en(ra_en), .a_we(ra_we), .a_addr(ra_addr), .a_wdata(ra_wdata), .a_rdata(),
    .b_en(rb_en), .b_we(rb_we), .b_addr(rb_addr), .b_wdata(rb_wdata), .b_rdata(rb_rdata)
  );

  vme_interface #(.A16_BASE(A16_BASE), .A32_BASE(A32_BASE), .RAM_AW(RAM_AW)) u_vme (
    .clk, .rst_n,
    .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n), .lword_n(vme_lword_n),
    .iack_n(vme_iack_n), .iackin_n(vme_iackin_n), .iackout_n(vme_iackout_n),
    .am(vme_am), .addr(vme_addr), .d_in(vme_d_in), .d_out(vme_d_out), .d_oe(vme_d_oe),
    .dtack_n(vme_dtack_n), .irq_n(vme_irq_n),
    .ram_en(rb_en), .ram_we(rb_we), .ram_addr(rb_addr), .ram_wdata(rb_wdata), .ram_rdata(rb_rdata),
    .st_ready(ready), .st_busy(meas_busy), .st_fifo_ovf(fifo_ovf), .st_madc_ovf(madc_ovf),
    .st_length(length), .data_done,
    .start, .pulse_mode, .range_len, .ready_ack,
    .weight_wr, .weight_idx, .weight_val
  );

endmodule
