// vme_interrupter: VMEbus interrupter of the DSP board FPGA.
//
// The signal processing side pulses raise when a measurement's results are
// complete in the dual-port RAM. The interrupter then pulls the request line
// IRQ<level>* low. In the interrupt acknowledge cycle (IACK* low, the level
// on A3..A1, the daisy chain IACKIN* low) it answers with its 8-bit
// status/ID vector on D7..D0 and DTACK*, and withdraws the request (release
// on acknowledge). An acknowledge for another level, or when nothing is
// pending, is passed down the chain on IACKOUT*. Level 0 disables requests.
// AS*, DS0* and IACKIN* are synchronised with two flip-flops.
//
// Follows the document: an Interrupter on the VMEbus through which the board
// tells the visualisation computers that data can be collected. D08(O)
// vectors, release on acknowledge and the daisy-chain details are those of
// the VMEbus specification as applied here.
module vme_interrupter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       raise,
  input  logic [2:0] level,
  input  logic [7:0] vector,
  output logic       pending,
  // VMEbus
  output logic [7:1] irq_n,
  input  logic       as_n,
  input  logic       ds0_n,
  input  logic       iack_n,
  input  logic       iackin_n,
  output logic       iackout_n,
  input  logic [3:1] addr,
  output logic [7:0] d_out,
  output logic       d_oe,
  output logic       dtack_n
);

  typedef enum logic [1:0] {I_IDLE, I_ANSWER, I_PASS} istate_t;

  logic [1:0] as_s, ds_s, ia_s;
  istate_t    state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      as_s <= 2'b11; ds_s <= 2'b11; ia_s <= 2'b11;
    end else begin
      as_s <= {as_s[0], as_n};
      ds_s <= {ds_s[0], ds0_n};
      ia_s <= {ia_s[0], iackin_n};
    end
  end

  wire as_l = !as_s[1];
  wire ds_l = !ds_s[1];
  wire ia_l = !ia_s[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= I_IDLE;
      pending   <= 1'b0;
      iackout_n <= 1'b1;
      d_out     <= '0;
      d_oe      <= 1'b0;
      dtack_n   <= 1'b1;
    end else begin
      if (raise && level != 3'd0) pending <= 1'b1;
      unique case (state)
        I_IDLE: if (as_l && ia_l && !iack_n) begin
          if (pending && addr == level && ds_l) begin
            d_out   <= vector;
            d_oe    <= 1'b1;
            dtack_n <= 1'b0;
            pending <= 1'b0;
            state   <= I_ANSWER;
          end else if (!(pending && addr == level)) begin
            iackout_n <= 1'b0;
            state     <= I_PASS;
          end
        end
        I_ANSWER: if (!ds_l) begin
          d_oe    <= 1'b0;
          dtack_n <= 1'b1;
          state   <= I_IDLE;
        end
        I_PASS: if (!as_l) begin
          iackout_n <= 1'b1;
          state     <= I_IDLE;
        end
        default: state <= I_IDLE;
      endcase
    end
  end

  always_comb begin
    irq_n = '1;
    if (pending && level != 3'd0) irq_n[level] = 1'b0;
  end

endmodule
