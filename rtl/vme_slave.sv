// vme_slave: VMEbus slave of the DSP board FPGA.
//
// Two address windows are decoded:
//  * A16/D32 (AM 29h, 2Dh), base A16_BASE, 256 bytes: the board's general
//    registers;
//  * A32/D32 (AM 09h, 0Dh single cycles, 0Bh, 0Fh block transfer BLT), base
//    A32_BASE, 2 MB: the dual-port RAM, one 32-bit word per 4 bytes.
// Only 32-bit transfers (both data strobes and LWORD* low) are answered. In a
// BLT cycle AS* stays low and every further data strobe addresses the next
// word. Bus inputs are synchronised with two flip-flops; DTACK* is driven low
// once the data are valid (reads) or taken (writes) and released when the data
// strobes go high. Reads of the RAM take one extra clock for the synchronous
// RAM port. Only the low 32 bits of a RAM word are visible on the bus; writes
// clear the top four bits.
//
// Register map (A16 offsets):
//   00h STATUS  RO  [0] data ready, [1] measurement busy, [2] sample FIFO
//                   overflow, [3] MADC overflow, [4] interrupt request
//                   pending, [31:16] board code ACB0h
//   04h CONTROL RW  [2:1] sounding pulse (0: 4 ms, 1: 10 ms, 2: 20 ms);
//                   writing [0]=1 starts a measurement
//   08h IRQ     RW  [2:0] interrupt level (0 = off), [15:8] status/ID vector
//   0Ch RANGE   RW  [19:0] snapshots per measurement (range length)
//   10h LENGTH  RO  [19:0] result words in the RAM from the last measurement
//   14h ACK     WO  any write clears data ready
//   18h WEIGHT  WO  [21:16] channel, [15:0] amplitude weight of that channel
//
// The top four bits of each RAM word are not visible from the bus (D32), and
// RAM write data are the bus data passed straight through.
//
// Follows the document: the Slave function, A16/D32 register access, A32/D32
// RAM access and BLT cycles. The register map, board code, base addresses and
// the handshake timing are choices of this design.
module vme_slave #(
  parameter logic [15:0] A16_BASE = 16'hC000,
  parameter logic [31:0] A32_BASE = 32'h0800_0000,
  parameter int unsigned RAM_AW   = 19
) (
  input  logic               clk,
  input  logic               rst_n,
  // VMEbus (behind the bus buffers)
  input  logic               as_n,
  input  logic [1:0]         ds_n,
  input  logic               write_n,
  input  logic               lword_n,
  input  logic               iack_n,
  input  logic [5:0]         am,
  input  logic [31:1]        addr,
  input  logic [31:0]        d_in,
  output logic [31:0]        d_out,
  output logic               d_oe,
  output logic               dtack_n,
  // dual-port RAM, port B
  output logic               ram_en,
  output logic               ram_we,
  output logic [RAM_AW-1:0]  ram_addr,
  output logic [35:0]        ram_wdata,
  input  logic [35:0]        ram_rdata,
  // register side
  input  logic               st_ready,
  input  logic               st_busy,
  input  logic               st_fifo_ovf,
  input  logic               st_madc_ovf,
  input  logic               st_irq_pending,
  input  logic [19:0]        st_length,
  output logic               start,        // one-clock pulse
  output acp_pkg::pulse_t    pulse_mode,
  output logic [2:0]         irq_level,
  output logic [7:0]         irq_vector,
  output logic [19:0]        range_len,
  output logic               ready_ack,    // one-clock pulse
  output logic               weight_wr,    // one-clock pulse
  output logic [5:0]         weight_idx,
  output logic [15:0]        weight_val
);

  typedef enum logic [1:0] {V_IDLE, V_WAIT, V_ACK, V_REL} vstate_t;

  logic [1:0] as_s, ds0_s, ds1_s;
  logic       as_l, ds_l;
  vstate_t    state;
  logic       is_ram, is_write, is_blt;
  logic [5:0] reg_off;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      as_s <= 2'b11; ds0_s <= 2'b11; ds1_s <= 2'b11;
    end else begin
      as_s  <= {as_s[0], as_n};
      ds0_s <= {ds0_s[0], ds_n[0]};
      ds1_s <= {ds1_s[0], ds_n[1]};
    end
  end
  assign as_l = !as_s[1];
  assign ds_l = !ds0_s[1] && !ds1_s[1];

  wire am_a16  = (am == acp_pkg::AM_A16_USER) || (am == acp_pkg::AM_A16_SUP);
  wire am_blt  = (am == acp_pkg::AM_A32_UBLT) || (am == acp_pkg::AM_A32_SBLT);
  wire am_a32  = (am == acp_pkg::AM_A32_USER) || (am == acp_pkg::AM_A32_SUP) || am_blt;
  wire hit_a16 = am_a16 && (addr[15:8] == A16_BASE[15:8]);
  wire hit_a32 = am_a32 && (addr[31:RAM_AW+2] == A32_BASE[31:RAM_AW+2]);
  wire d32     = !lword_n && !addr[1];

  logic [31:0] reg_rdata;
  always_comb begin
    unique case (reg_off)
      6'h00:   reg_rdata = {16'hACB0, 11'd0, st_irq_pending, st_madc_ovf, st_fifo_ovf, st_busy, st_ready};
      6'h01:   reg_rdata = {29'd0, pulse_mode, 1'b0};
      6'h02:   reg_rdata = {16'd0, irq_vector, 5'd0, irq_level};
      6'h03:   reg_rdata = {12'd0, range_len};
      6'h04:   reg_rdata = {12'd0, st_length};
      default: reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= V_IDLE;
      is_ram     <= 1'b0;
      is_write   <= 1'b0;
      is_blt     <= 1'b0;
      reg_off    <= '0;
      ram_addr   <= '0;
      d_out      <= '0;
      d_oe       <= 1'b0;
      dtack_n    <= 1'b1;
      pulse_mode <= acp_pkg::PULSE_4MS;
      irq_level  <= '0;
      irq_vector <= '0;
      range_len  <= 20'd1;
      start      <= 1'b0;
      ready_ack  <= 1'b0;
      weight_wr  <= 1'b0;
      weight_idx <= '0;
      weight_val <= '0;
    end else begin
      start     <= 1'b0;
      ready_ack <= 1'b0;
      weight_wr <= 1'b0;
      unique case (state)
        V_IDLE: if (is_blt) begin
          // Continuation of a block transfer: the next strobe with AS* held low.
          if (!as_l)     is_blt <= 1'b0;
          else if (ds_l) state  <= V_WAIT;
        end else if (as_l && ds_l && iack_n && d32 && (hit_a16 || hit_a32)) begin
          is_ram   <= hit_a32;
          is_blt   <= hit_a32 && am_blt;
          is_write <= !write_n;
          reg_off  <= addr[7:2];
          ram_addr <= addr[RAM_AW+1:2];
          state    <= hit_a32 ? V_WAIT : V_ACK;
        end
        V_WAIT: state <= V_ACK;        // RAM read latency
        V_ACK: begin
          if (is_write) begin
            if (!is_ram) begin
              unique case (reg_off)
                6'h01: begin
                  pulse_mode <= acp_pkg::pulse_t'(d_in[2:1]);
                  start      <= d_in[0];
                end
                6'h02: begin
                  irq_level  <= d_in[2:0];
                  irq_vector <= d_in[15:8];
                end
                6'h03: range_len <= d_in[19:0];
                6'h05: ready_ack <= 1'b1;
                6'h06: begin
                  weight_wr  <= 1'b1;
                  weight_idx <= d_in[21:16];
                  weight_val <= d_in[15:0];
                end
                default: ;
              endcase
            end
          end else begin
            d_out <= is_ram ? ram_rdata[31:0] : reg_rdata;
            d_oe  <= 1'b1;
          end
          dtack_n <= 1'b0;
          state   <= V_REL;
        end
        V_REL: if (!ds_l) begin
          dtack_n <= 1'b1;
          d_oe    <= 1'b0;
          if (is_blt) ram_addr <= ram_addr + 1'b1;
          state <= V_IDLE;
        end
        default: state <= V_IDLE;
      endcase
    end
  end

  // The RAM is read in the clock after the cycle is decoded and written when
  // the data are taken.
  assign ram_en    = (state == V_WAIT) || (state == V_ACK && is_ram && is_write);
  assign ram_we    = (state == V_ACK) && is_ram && is_write;
  assign ram_wdata = {4'd0, d_in};

  // DTACK* is only asserted while the master holds the address strobe.
  assert property (@(posedge clk) disable iff (!rst_n) (state == V_ACK) |-> as_l);

endmodule
