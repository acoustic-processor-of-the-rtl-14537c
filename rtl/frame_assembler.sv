// frame_assembler: turns the FIFO sample stream into quadrature snapshots.
//
// The MADC controller writes 12 words per conversion, six conversions per
// snapshot: conversion t marks channel 3g + t/2 of every group g = 0..11, the
// even conversion giving the first and the odd one the second sample of the
// channel's pair. The pair is a quarter carrier period apart, so with
// s(t) = A cos(wt + phi) the first sample is A cos(phi) and the second
// -A sin(phi); the complex sample is taken as I = first, Q = -second.
// The pairs are then mixed down to baseband: the carrier advances pi/2 per
// conversion, so a snapshot is 3*pi (sign flip) after the previous one and
// the m-th channel of a group is sampled m*pi after the first. Multiplying
// by (-1)^(snapshot + m) removes both, and a wave from broadside at the
// carrier frequency gives the same constant complex value in every channel.
//
// The assembler pops the FIFO (first-word fall-through) whenever it holds a
// word and its snapshot buffer is free, places each word by its position after
// the last sof word, and when all 72 words are in, streams the 36 complex
// channel samples, channel 0 first, to the beamformer over a valid/ready
// handshake (out_last on channel 35). Words before the first sof, and a
// snapshot broken by an early sof, are discarded (resync counter).
//
// Follows the document: three-channel groups, two conversions per channel,
// quadrature pairs. Own choices: the I/Q sign convention, the mixing to baseband, the handshake and
// the resynchronisation rule. The quarter-period time offset between the
// channels of a group is not compensated.
module frame_assembler #(
  parameter int unsigned NUM_CH   = acp_pkg::NUM_CH,
  parameter int unsigned SAMPLE_W = acp_pkg::SAMPLE_W,
  parameter int unsigned OUT_W    = SAMPLE_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // FIFO read side
  input  logic                    fifo_empty,
  input  acp_pkg::fifo_word_t     fifo_rdata,
  output logic                    fifo_rd,
  // snapshot stream
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im,
  output logic                    out_last,
  output logic [15:0]             resync_count
);

  localparam int unsigned GS    = acp_pkg::GROUP_SIZE;
  localparam int unsigned NGRP  = NUM_CH / GS;
  localparam int unsigned WORDS = NUM_CH * acp_pkg::PAIR_LEN;   // 72
  localparam int unsigned WCW   = $clog2(WORDS + 1);
  localparam int unsigned CW    = $clog2(NUM_CH);

  logic signed [OUT_W-1:0] buf_re [NUM_CH];
  logic signed [OUT_W-1:0] buf_im [NUM_CH];
  logic [WCW-1:0]          wcnt;     // words of the current snapshot
  logic                    synced;
  logic                    full_q;   // snapshot complete, being streamed
  logic [CW-1:0]           ocnt;
  logic                    fpar;     // snapshot parity, flips every snapshot

  // Position of word w of a snapshot: conversion t = w / NGRP, group g = w % NGRP.
  function automatic int unsigned chan_of(int unsigned w);
    int unsigned t = w / NGRP;
    int unsigned g = w % NGRP;
    return g * GS + t / 2;
  endfunction

  // Group member m = t/2 is sampled 2m conversions (m half carrier periods)
  // after the first member: its carrier phase is offset by m*pi.
  function automatic logic sign_of(int unsigned w);
    return logic'(((w / NGRP) / 2) % 2);
  endfunction


  wire take = !fifo_empty && !full_q;
  wire cur_par = (fifo_rdata.sof && !synced) ? 1'b0 : fpar;
  assign fifo_rd = take;

  wire signed [OUT_W-1:0] sample = OUT_W'(signed'(fifo_rdata.data[SAMPLE_W-1:0]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt         <= '0;
      fpar         <= 1'b0;
      synced       <= 1'b0;
      full_q       <= 1'b0;
      ocnt         <= '0;
      resync_count <= '0;
      for (int c = 0; c < NUM_CH; c++) begin
        buf_re[c] <= '0;
        buf_im[c] <= '0;
      end
    end else begin
      if (take) begin
        if (fifo_rdata.sof || synced) begin
          automatic int unsigned w = fifo_rdata.sof ? 0 : int'(wcnt);
          automatic logic [$clog2(NUM_CH)-1:0] c = $clog2(NUM_CH)'(chan_of(w));
          if (fifo_rdata.sof && synced && wcnt != '0) resync_count <= resync_count + 1'b1;
          if (fifo_rdata.sof && !synced) fpar <= 1'b0;
          if (((w / NGRP) % 2 == 1) != fifo_rdata.q) begin
            // I/Q position disagrees with the word's tag: wait for next sof.
            synced       <= 1'b0;
            wcnt         <= '0;
            resync_count <= resync_count + 1'b1;
          end else begin
            synced <= 1'b1;
              // Carrier phase at this sample: pi/2 per conversion.
            if (fifo_rdata.q) buf_im[c] <= (cur_par ^ sign_of(w)) ? sample : -sample;
            else              buf_re[c] <= (cur_par ^ sign_of(w)) ? -sample : sample;
            if (w == WORDS - 1) begin
              fpar   <= ~fpar;
              wcnt   <= '0;
              full_q <= 1'b1;
              ocnt   <= '0;
            end else begin
              wcnt <= WCW'(w + 1);
            end
          end
        end
      end
      if (full_q && out_ready) begin
        ocnt <= ocnt + 1'b1;
        if (ocnt == CW'(NUM_CH - 1)) full_q <= 1'b0;
      end
    end
  end

  assign out_valid = full_q;
  assign out_re    = buf_re[ocnt];
  assign out_im    = buf_im[ocnt];
  assign out_last  = full_q && (ocnt == CW'(NUM_CH - 1));

endmodule
