// measure_ctrl: measurement cycle control and result writer.
//
// A measurement is started by a pulse on start (from the CONTROL register).
// The controller clears the filter states, runs the MADC for exactly
// 6 * range_len conversions (range_len quadrature snapshots, the length of
// the watched range) and writes every beam amplitude of the processed
// snapshots, in arrival order, to consecutive words of the dual-port RAM from
// address 0. When the last beam of the last snapshot is written it pulses
// data_done (the VMEbus interrupt), sets ready and reports the number of
// words in length, so the whole range can be fetched as one block. ready is
// cleared by ready_ack or by the next start. Words beyond the end of the RAM
// are dropped (clipped is then set).
//
// RAM word: [29:24] beam index, [23:0] beam amplitude, other bits zero.
//
// Follows the document: the DSP starts the sampling, results of a whole range
// go to the dual-port RAM as one continuous block, an interrupt tells the
// visualisation computers to fetch them. Own choices: the start/stop rules,
// the word format and the clipping.
//
// The top six bits of ram_wdata are constant zero and ram_wdata carries the
// beam number and magnitude straight from the inputs: that is the result word.
module measure_ctrl #(
  parameter int unsigned RAM_AW  = 19,
  parameter int unsigned DW      = 24,
  parameter int unsigned NSTREAM = 61
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [19:0]                range_len,
  input  logic                       ready_ack,
  // MADC control
  output logic                       madc_run,
  input  logic                       madc_busy,
  input  logic [31:0]                madc_conv_count,
  output logic                       filt_clear,
  // beam amplitudes
  input  logic                       mag_valid,
  output logic                       mag_ready,
  input  logic [$clog2(NSTREAM)-1:0] mag_beam,
  input  logic [DW-1:0]              mag_data,
  input  logic                       mag_last,
  // dual-port RAM port A
  output logic                       ram_en,
  output logic                       ram_we,
  output logic [RAM_AW-1:0]          ram_addr,
  output logic [35:0]                ram_wdata,
  // status
  output logic                       busy,
  output logic                       ready,
  output logic                       data_done,
  output logic [19:0]                length,
  output logic                       clipped
);

  typedef enum logic [1:0] {C_IDLE, C_CLEAR, C_RUN} cstate_t;

  cstate_t     state;
  logic [19:0] frames_done;
  logic [19:0] frames_req;
  logic [RAM_AW:0] waddr;
  logic        run_q;      // MADC enable, dropped once the last conversion started

  wire [31:0] conv_req = 32'(frames_req) * 32'd6;
  wire        write    = mag_valid && (state == C_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= C_IDLE;
      frames_done <= '0;
      frames_req  <= 20'd1;
      waddr       <= '0;
      ready       <= 1'b0;
      data_done   <= 1'b0;
      length      <= '0;
      clipped     <= 1'b0;
      run_q       <= 1'b0;
    end else begin
      data_done <= 1'b0;
      if (madc_busy && (madc_conv_count >= conv_req - 32'd1)) run_q <= 1'b0;
      if (ready_ack) ready <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          state       <= C_CLEAR;
          frames_req  <= (range_len == '0) ? 20'd1 : range_len;
          frames_done <= '0;
          waddr       <= '0;
          ready       <= 1'b0;
          clipped     <= 1'b0;
        end
        C_CLEAR: begin
          state <= C_RUN;
          run_q <= 1'b1;
        end
        C_RUN: begin
          if (write) begin
            if (waddr[RAM_AW]) clipped <= 1'b1;
            else               waddr   <= waddr + 1'b1;
            if (mag_last) begin
              frames_done <= frames_done + 1'b1;
              if (frames_done + 1'b1 == frames_req) begin
                state     <= C_IDLE;
                ready     <= 1'b1;
                data_done <= 1'b1;
                length    <= 20'(waddr[RAM_AW] ? waddr : waddr + 1'b1);
              end
            end
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // Keep the MADC running until the conversion that completes the last
  // requested snapshot has started; it is not restarted while the pipeline
  // drains.
  assign madc_run   = run_q && !(madc_busy && (madc_conv_count >= conv_req - 32'd1));
  assign filt_clear = (state == C_CLEAR);
  assign mag_ready  = 1'b1;
  assign ram_en     = write && !waddr[RAM_AW];
  assign ram_we     = ram_en;
  assign ram_addr   = waddr[RAM_AW-1:0];
  assign ram_wdata  = {6'd0, 6'(mag_beam), DW'(mag_data)};
  assign busy       = (state != C_IDLE);

endmodule
