// acp_pkg: constants and types shared by the acoustic processor blocks.
//
// The array is read through 36 conversion channels of 14 bits each. The
// converters sample at four times the carrier frequency; in every group of
// three neighbouring channels one channel is marked per pair of conversion
// cycles, so a full quadrature snapshot of all 36 channels takes six
// conversion cycles. With a 4 ns system clock one conversion period of
// 5.76 us is 1440 clocks (173.6 kHz). The 4 ns clock, the FIFO word layout
// and all register encodings are choices of this design.
package acp_pkg;

  localparam int unsigned NUM_CH       = 36;   // conversion channels in use
  localparam int unsigned CARD_CH      = 40;   // channels the MADC card offers
  localparam int unsigned SAMPLE_W     = 14;   // ADC resolution
  localparam int unsigned GROUP_SIZE   = 3;    // channels per sampling group
  localparam int unsigned PAIR_LEN     = 2;    // conversions per channel turn (I then Q)
  localparam int unsigned SEQ_LEN      = GROUP_SIZE * PAIR_LEN;  // 6 conversions per snapshot
  localparam int unsigned SAMPLE_PERIOD = 1440; // system clocks per conversion (5.76 us at 4 ns)

  // One word in the MADC -> DSP FIFO: a marked sample plus framing bits.
  typedef struct packed {
    logic                sof;   // first word of a six-conversion snapshot
    logic                q;     // 0: in-phase (first of pair), 1: quadrature
    logic [SAMPLE_W-1:0] data;  // two's complement sample
  } fifo_word_t;

  localparam int unsigned FIFO_W = $bits(fifo_word_t);

  // Sounding pulse lengths; they select the filter coefficient sets.
  typedef enum logic [1:0] {
    PULSE_4MS  = 2'd0,
    PULSE_10MS = 2'd1,
    PULSE_20MS = 2'd2
  } pulse_t;

  // VMEbus address modifiers (ANSI/IEEE 1014-1987).
  localparam logic [5:0] AM_A16_USER = 6'h29;
  localparam logic [5:0] AM_A16_SUP  = 6'h2D;
  localparam logic [5:0] AM_A32_USER = 6'h09;
  localparam logic [5:0] AM_A32_SUP  = 6'h0D;
  localparam logic [5:0] AM_A32_UBLT = 6'h0B;
  localparam logic [5:0] AM_A32_SBLT = 6'h0F;

endpackage
