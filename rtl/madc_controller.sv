// madc_controller: controller of the multichannel A/D converter card.
//
// All converters share one serial clock (adc_clk) and one start-of-conversion
// strobe (adc_stc), so every channel is sampled at the same instant; the
// phase relations between channels are preserved. One conversion is started
// every SAMPLE_PERIOD clocks (1440 clocks of 4 ns = 5.76 us, 173.6 kHz, four
// times the carrier frequency) while run is high.
//
// Each conversion: STC pulse, wait for the converters, clock 14 bits out of
// every converter into the serial-parallel shift register, load the ID
// markers, then empty the register through channel 1 in NUM_CH steps. Only
// samples whose marker is set are written to the DSP FIFO.
//
// Marker sequence: the channels form groups of three (1-3, 4-6, ...). In
// conversions 0 and 1 of the six-conversion sequence the first channel of
// each group is marked, in 2 and 3 the second, in 4 and 5 the third, then the
// sequence repeats. The two conversions of a pair are a quarter carrier period
// apart and form an in-phase / quadrature pair. So every conversion delivers
// 12 words, and every six conversions (1.5 carrier periods) one quadrature
// pair per channel.
//
// FIFO word: {sof, q, data}; sof marks the first word of a six-conversion
// sequence, q the second conversion of a pair. When the FIFO is full a marked
// sample is dropped and the sticky overflow flag is set (cleared when a new
// run starts).
//
// Follows the document: common CLK/STC, 14-bit samples, three-channel groups
// with two conversions per channel, marker-based selection, channel-1 readout.
// Own choices: the group membership (consecutive channels), MSB-first SPI
// with the converter updating its output on the rising adc_clk edge and the
// controller sampling on the falling edge, the timing parameters below, the
// framing bits and the overflow behaviour.
module madc_controller #(
  parameter int unsigned NUM_CH        = acp_pkg::NUM_CH,
  parameter int unsigned SAMPLE_W      = acp_pkg::SAMPLE_W,
  parameter int unsigned SAMPLE_PERIOD = acp_pkg::SAMPLE_PERIOD,
  parameter int unsigned STC_CYCLES    = 10,   // STC pulse width
  parameter int unsigned CONV_CYCLES   = 250,  // converter busy time after STC
  parameter int unsigned SCLK_HALF     = 25    // half period of adc_clk in clocks
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,          // sample while high
  // converter side (shared by all channels)
  output logic              adc_clk,
  output logic              adc_stc,
  input  logic [NUM_CH-1:0] adc_sdo,
  // DSP FIFO write side
  output logic              fifo_wr,
  output acp_pkg::fifo_word_t fifo_wdata,
  input  logic              fifo_full,
  // status
  output logic              busy,
  output logic              overflow,
  output logic [31:0]       conv_count     // conversions since run started
);

  localparam int unsigned PCNT_W = $clog2(SAMPLE_PERIOD);
  localparam int unsigned WAIT_W = $clog2(CONV_CYCLES + STC_CYCLES + 1);
  localparam int unsigned HALF_W = $clog2(SCLK_HALF + 1);

  typedef enum logic [2:0] {S_IDLE, S_STC, S_CONV, S_SPI, S_LOAD, S_DUMP, S_REST} state_t;

  state_t                 state;
  logic [PCNT_W-1:0]      pcnt;       // position inside the conversion period
  logic [WAIT_W-1:0]      wcnt;
  logic [HALF_W-1:0]      hcnt;
  logic [$clog2(SAMPLE_W+1)-1:0] bcnt;
  logic [$clog2(NUM_CH+1)-1:0]   dcnt;
  logic [2:0]             seq;        // 0..5 position in the sampling sequence
  logic                   first_word;
  logic                   sclk_q;

  logic                   bit_en, id_load, advance;
  logic [NUM_CH-1:0]      id_vec;
  logic [SAMPLE_W-1:0]    sr_data;
  logic                   sr_id;

  // Marker of channel c (0-based): its position in the group equals seq/2.
  always_comb begin
    for (int c = 0; c < NUM_CH; c++) id_vec[c] = ((c % acp_pkg::GROUP_SIZE) == int'(seq[2:1]));
  end

  assign bit_en  = (state == S_SPI) && sclk_q && (hcnt == HALF_W'(SCLK_HALF - 1));
  assign id_load = (state == S_LOAD);
  assign advance = (state == S_DUMP);

  sample_shift_register #(.NUM_CH(NUM_CH), .SAMPLE_W(SAMPLE_W)) u_sr (
    .clk, .rst_n,
    .bit_en, .sdi(adc_sdo),
    .id_load, .id_in(id_vec),
    .advance, .out_data(sr_data), .out_id(sr_id)
  );

  wire period_end = (pcnt == PCNT_W'(SAMPLE_PERIOD - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pcnt       <= '0;
      wcnt       <= '0;
      hcnt       <= '0;
      bcnt       <= '0;
      dcnt       <= '0;
      seq        <= '0;
      first_word <= 1'b0;
      sclk_q     <= 1'b0;
      overflow   <= 1'b0;
      conv_count <= '0;
    end else begin
      pcnt <= (state == S_IDLE || period_end) ? '0 : pcnt + 1'b1;
      unique case (state)
        S_IDLE: if (run) begin
          state      <= S_STC;
          seq        <= '0;
          overflow   <= 1'b0;
          conv_count <= '0;
          wcnt       <= '0;
        end
        S_STC: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == WAIT_W'(STC_CYCLES - 1)) begin
            state <= S_CONV;
            wcnt  <= '0;
          end
        end
        S_CONV: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == WAIT_W'(CONV_CYCLES - 1)) begin
            state <= S_SPI;
            hcnt  <= '0;
            bcnt  <= '0;
          end
        end
        S_SPI: begin
          hcnt <= hcnt + 1'b1;
          if (hcnt == HALF_W'(SCLK_HALF - 1)) begin
            hcnt   <= '0;
            sclk_q <= ~sclk_q;
            if (sclk_q) begin
              bcnt <= bcnt + 1'b1;
              if (bcnt == ($bits(bcnt))'(SAMPLE_W - 1)) state <= S_LOAD;
            end
          end
        end
        S_LOAD: begin
          state      <= S_DUMP;
          dcnt       <= '0;
          first_word <= (seq == 3'd0);
        end
        S_DUMP: begin
          dcnt <= dcnt + 1'b1;
          if (sr_id) begin
            first_word <= 1'b0;
            if (fifo_full) overflow <= 1'b1;
          end
          if (dcnt == ($bits(dcnt))'(NUM_CH - 1)) state <= S_REST;
        end
        S_REST: if (period_end) begin
          conv_count <= conv_count + 1'b1;
          seq        <= (seq == 3'(acp_pkg::SEQ_LEN - 1)) ? '0 : seq + 1'b1;
          wcnt       <= '0;
          state      <= run ? S_STC : S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign adc_clk          = sclk_q;
  assign adc_stc          = (state == S_STC);
  assign fifo_wr          = advance && sr_id && !fifo_full;
  assign fifo_wdata.sof   = first_word;
  assign fifo_wdata.q     = seq[0];
  assign fifo_wdata.data  = sr_data;
  assign busy             = (state != S_IDLE);

  // The whole conversion must fit into one sampling period.
  initial assert (STC_CYCLES + CONV_CYCLES + 2 * SCLK_HALF * SAMPLE_W + NUM_CH + 2 < SAMPLE_PERIOD)
    else $error("conversion does not fit into SAMPLE_PERIOD");

endmodule
