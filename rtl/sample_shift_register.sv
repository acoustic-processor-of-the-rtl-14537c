// sample_shift_register: serial-parallel register bank of the MADC controller.
//
// One row per conversion channel, each holding a 14-bit sample and its ID
// marker. While a conversion is read out every row shifts in one SPI bit per
// bit strobe (MSB first), all rows in parallel. Afterwards the rows are
// emptied through row 0 (channel 1): each advance step presents row 0 at the
// output and moves every row k+1 into row k, so after NUM_CH steps all samples
// have passed the output in channel order. Row NUM_CH-1 refills with zero and
// a cleared marker.
//
// Interface: bit_en with sdi[] (one bit per channel), id_load with id_in[]
// (markers for this conversion), advance. out_data/out_id show row 0 and are
// valid in the cycle advance is high. One step per clock: with a 4 ns clock the
// 36 steps take 144 ns, well inside the 5.76 us conversion period.
//
// Follows the document: 14-bit rows plus ID, rows for channels 1..36, read
// out through channel 1 with row k taking the value of row k+1. Own choices:
// MSB-first bit order, zero refill of the last row, synchronous reset.
module sample_shift_register #(
  parameter int unsigned NUM_CH   = acp_pkg::NUM_CH,
  parameter int unsigned SAMPLE_W = acp_pkg::SAMPLE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bit_en,
  input  logic [NUM_CH-1:0]   sdi,
  input  logic                id_load,
  input  logic [NUM_CH-1:0]   id_in,
  input  logic                advance,
  output logic [SAMPLE_W-1:0] out_data,
  output logic                out_id
);

  typedef struct packed {
    logic [SAMPLE_W-1:0] data;
    logic                id;
  } row_t;

  row_t rows [NUM_CH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_CH; k++) rows[k] <= '0;
    end else if (advance) begin
      for (int k = 0; k < NUM_CH - 1; k++) rows[k] <= rows[k+1];
      rows[NUM_CH-1] <= '0;
    end else begin
      for (int k = 0; k < NUM_CH; k++) begin
        if (bit_en)  rows[k].data <= {rows[k].data[SAMPLE_W-2:0], sdi[k]};
        if (id_load) rows[k].id   <= id_in[k];
      end
    end
  end

  assign out_data = rows[0].data;
  assign out_id   = rows[0].id;

  // Bits are only shifted in while the bank is not being emptied.
  assert property (@(posedge clk) disable iff (!rst_n) !(advance && (bit_en || id_load)));

endmodule
