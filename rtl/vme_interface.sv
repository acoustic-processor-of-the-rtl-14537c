// vme_interface: VMEbus side of the DSP board FPGA.
//
// Joins the Slave (general registers in A16/D32, dual-port RAM in A32/D32
// with block transfers) and the Interrupter (data-ready interrupt) on one set
// of bus lines. Only one of the two answers a given cycle (the slave ignores
// IACK cycles), so their data, output enables and DTACK* are merged with a
// simple OR / AND. The bus buffers and the bidirectional data pins are outside;
// this block has separate input and output data with an output enable.
//
// Follows the document: the FPGA links the VMEbus, the DSP and the dual-port
// RAM and implements the Slave and Interrupter modules.
module vme_interface #(
  parameter logic [15:0] A16_BASE = 16'hC000,
  parameter logic [31:0] A32_BASE = 32'h0800_0000,
  parameter int unsigned RAM_AW   = 19
) (
  input  logic              clk,
  input  logic              rst_n,
  // VMEbus
  input  logic              as_n,
  input  logic [1:0]        ds_n,
  input  logic              write_n,
  input  logic              lword_n,
  input  logic              iack_n,
  input  logic              iackin_n,
  output logic              iackout_n,
  input  logic [5:0]        am,
  input  logic [31:1]       addr,
  input  logic [31:0]       d_in,
  output logic [31:0]       d_out,
  output logic              d_oe,
  output logic              dtack_n,
  output logic [7:1]        irq_n,
  // dual-port RAM port B
  output logic              ram_en,
  output logic              ram_we,
  output logic [RAM_AW-1:0] ram_addr,
  output logic [35:0]       ram_wdata,
  input  logic [35:0]       ram_rdata,
  // board side
  input  logic              st_ready,
  input  logic              st_busy,
  input  logic              st_fifo_ovf,
  input  logic              st_madc_ovf,
  input  logic [19:0]       st_length,
  input  logic              data_done,     // pulse: results complete, interrupt
  output logic              start,
  output acp_pkg::pulse_t   pulse_mode,
  output logic [19:0]       range_len,
  output logic              ready_ack,
  output logic              weight_wr,
  output logic [5:0]        weight_idx,
  output logic [15:0]       weight_val
);

  logic [31:0] s_dout;
  logic        s_doe, s_dtack_n;
  logic [7:0]  i_dout;
  logic        i_doe, i_dtack_n;
  logic [2:0]  irq_level;
  logic [7:0]  irq_vector;
  logic        irq_pending;

  vme_slave #(.A16_BASE(A16_BASE), .A32_BASE(A32_BASE), .RAM_AW(RAM_AW)) u_slave (
    .clk, .rst_n,
    .as_n, .ds_n, .write_n, .lword_n, .iack_n, .am, .addr, .d_in,
    .d_out(s_dout), .d_oe(s_doe), .dtack_n(s_dtack_n),
    .ram_en, .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .st_ready, .st_busy, .st_fifo_ovf, .st_madc_ovf, .st_irq_pending(irq_pending), .st_length,
    .start, .pulse_mode, .irq_level, .irq_vector, .range_len, .ready_ack,
    .weight_wr, .weight_idx, .weight_val
  );

  vme_interrupter u_irq (
    .clk, .rst_n,
    .raise(data_done), .level(irq_level), .vector(irq_vector), .pending(irq_pending),
    .irq_n, .as_n, .ds0_n(ds_n[0]), .iack_n, .iackin_n, .iackout_n,
    .addr(addr[3:1]), .d_out(i_dout), .d_oe(i_doe), .dtack_n(i_dtack_n)
  );

  assign d_out   = (s_doe ? s_dout : 32'd0) | (i_doe ? {24'd0, i_dout} : 32'd0);
  assign d_oe    = s_doe | i_doe;
  assign dtack_n = s_dtack_n & i_dtack_n;

endmodule
