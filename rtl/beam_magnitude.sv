// beam_magnitude: amplitude of each filtered beam sample.
//
// Computes floor(sqrt(re^2 + im^2)), the value proportional to the beam
// pattern in the beam's direction. The sum of squares is formed when a sample
// is accepted; the square root is found bit by bit, most significant bit
// first, one result bit per clock (DW clocks per sample). valid/ready
// handshakes on both sides; beam index and last flag are passed along.
//
// Follows the document: the root of the sum of squares of the sine and cosine
// samples. Own choices: the exact integer square root and its sequential
// schedule.
module beam_magnitude #(
  parameter int unsigned DW      = 24,
  parameter int unsigned NSTREAM = 61
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [$clog2(NSTREAM)-1:0] in_beam,
  input  logic signed [DW-1:0]       in_re,
  input  logic signed [DW-1:0]       in_im,
  input  logic                       in_last,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [$clog2(NSTREAM)-1:0] out_beam,
  output logic [DW-1:0]              out_mag,
  output logic                       out_last
);

  localparam int unsigned SQW = 2 * DW;
  localparam int unsigned BCW = $clog2(DW);

  typedef enum logic [1:0] {M_IDLE, M_RUN, M_DONE} mstate_t;

  mstate_t              state;
  logic [SQW-1:0]       rem;     // sum of squares
  logic [DW-1:0]        root;
  logic [BCW-1:0]       bitn;
  logic [$clog2(NSTREAM)-1:0] beam_q;
  logic                 last_q;

  wire signed [SQW-1:0] sq_re = in_re * in_re;
  wire signed [SQW-1:0] sq_im = in_im * in_im;
  // (-2^(DW-1))^2 * 2 = 2^(2DW-1) still fits SQW unsigned bits.
  wire [SQW-1:0]        sumsq = unsigned'(sq_re) + unsigned'(sq_im);

  wire [DW-1:0]  trial    = root | (DW'(1) << bitn);
  wire [SQW-1:0] trial_sq = SQW'(trial) * SQW'(trial);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= M_IDLE;
      rem    <= '0;
      root   <= '0;
      bitn   <= '0;
      beam_q <= '0;
      last_q <= 1'b0;
    end else begin
      unique case (state)
        M_IDLE: if (in_valid) begin
          rem    <= sumsq;
          root   <= '0;
          bitn   <= BCW'(DW - 1);
          beam_q <= in_beam;
          last_q <= in_last;
          state  <= M_RUN;
        end
        M_RUN: begin
          if (trial_sq <= rem) root <= trial;
          if (bitn == '0) state <= M_DONE;
          else            bitn  <= bitn - 1'b1;
        end
        M_DONE: if (out_ready) state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  assign in_ready  = (state == M_IDLE);
  assign out_valid = (state == M_DONE);
  assign out_beam  = beam_q;
  assign out_mag   = root;
  assign out_last  = last_q;

endmodule
