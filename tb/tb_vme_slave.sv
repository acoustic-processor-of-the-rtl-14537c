// tb_vme_slave: a VMEbus master model drives the slave, which is connected to
// the full-size dual-port RAM.
//
// Checked: A16/D32 register writes and reads (IRQ, RANGE, CONTROL with the
// start pulse and pulse mode, ACK and WEIGHT pulses, STATUS with the board
// code and status inputs); A32/D32 single writes and reads, compared with the
// RAM contents; BLT block writes and reads of 16 words; and that the slave
// stays silent (no DTACK*) for another A16 base, another address modifier,
// a D16 transfer and an interrupt acknowledge cycle.
module tb_vme_slave;
  localparam logic [15:0] A16B = 16'hC000;
  localparam logic [31:0] A32B = 32'h0800_0000;
  logic clk = 0, rst_n = 0;
  logic as_n = 1, write_n = 1, lword_n = 1, iack_n = 1;
  logic [1:0] ds_n = 2'b11;
  logic [5:0] am = '0;
  logic [31:1] addr = '0;
  logic [31:0] d_in = '0, d_out;
  logic d_oe, dtack_n;
  logic ram_en, ram_we;
  logic [18:0] ram_addr;
  logic [35:0] ram_wdata, ram_rdata;
  logic st_ready = 0, st_busy = 0, st_fifo_ovf = 0, st_madc_ovf = 0, st_irq_pending = 0;
  logic [19:0] st_length = '0;
  logic start, ready_ack, weight_wr;
  acp_pkg::pulse_t pulse_mode;
  logic [2:0] irq_level;
  logic [7:0] irq_vector;
  logic [19:0] range_len;
  logic [5:0] weight_idx;
  logic [15:0] weight_val;
  int checks = 0, failures = 0;
  int starts = 0, acks = 0, wwrites = 0;
  logic [5:0] last_widx;
  logic [15:0] last_wval;

  vme_slave #(.A16_BASE(A16B), .A32_BASE(A32B), .RAM_AW(19)) dut (.*);
  dual_port_ram #(.WORDS(1 << 19), .WIDTH(36)) ram (
    .clk, .a_en(1'b0), .a_we(1'b0), .a_addr('0), .a_wdata('0), .a_rdata(),
    .b_en(ram_en), .b_we(ram_we), .b_addr(ram_addr), .b_wdata(ram_wdata), .b_rdata(ram_rdata));

  always #2 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && start) starts <= starts + 1;
    if (rst_n && ready_ack) acks <= acks + 1;
    if (rst_n && weight_wr) begin
      wwrites   <= wwrites + 1;
      last_widx <= weight_idx;
      last_wval <= weight_val;
    end
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // wait for DTACK* to go low; ok = 0 after 40 clocks without it
  task automatic wait_dtack(output bit ok);
    ok = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      if (!dtack_n) begin ok = 1; return; end
    end
  endtask

  task automatic release_strobes(bit keep_as);
    ds_n = 2'b11;
    if (!keep_as) as_n = 1;
    for (int i = 0; i < 40 && !dtack_n; i++) @(negedge clk);
  endtask

  task automatic vme_cycle(logic [5:0] m, logic [31:0] a, bit wr, logic [31:0] wd,
                           bit d16, output logic [31:0] rd, output bit ok);
    @(negedge clk);
    am = m; addr = a[31:1]; write_n = !wr; lword_n = d16; iack_n = 1; d_in = wd;
    @(negedge clk) as_n = 0;
    @(negedge clk) ds_n = 2'b00;
    wait_dtack(ok);
    rd = d_out;
    if (ok && !wr) check(d_oe, "data driven during read");
    release_strobes(0);
  endtask

  task automatic wr32(logic [5:0] m, logic [31:0] a, logic [31:0] wd);
    logic [31:0] rd; bit ok;
    vme_cycle(m, a, 1, wd, 0, rd, ok);
    check(ok, $sformatf("DTACK on write %h", a));
  endtask

  task automatic rd32(logic [5:0] m, logic [31:0] a, output logic [31:0] rd);
    bit ok;
    vme_cycle(m, a, 0, '0, 0, rd, ok);
    check(ok, $sformatf("DTACK on read %h", a));
  endtask

  task automatic blt(logic [31:0] a, bit wr, inout logic [31:0] data [16]);
    bit ok;
    @(negedge clk);
    am = acp_pkg::AM_A32_UBLT; addr = a[31:1]; write_n = !wr; lword_n = 0; iack_n = 1;
    @(negedge clk) as_n = 0;
    for (int i = 0; i < 16; i++) begin
      d_in = data[i];
      @(negedge clk) ds_n = 2'b00;
      wait_dtack(ok);
      check(ok, $sformatf("DTACK in block transfer, beat %0d", i));
      if (!wr) data[i] = d_out;
      release_strobes(1);
    end
    as_n = 1;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    logic [31:0] rd;
    bit ok;
    logic [31:0] blk [16], back [16];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    // registers
    wr32(acp_pkg::AM_A16_USER, 32'h0000_C008, 32'h0000_5A05);
    rd32(acp_pkg::AM_A16_SUP, 32'h0000_C008, rd);
    check(rd == 32'h0000_5A05 && irq_level == 3'd5 && irq_vector == 8'h5A, "IRQ register");
    wr32(acp_pkg::AM_A16_USER, 32'h0000_C00C, 32'h0001_2345);
    rd32(acp_pkg::AM_A16_USER, 32'h0000_C00C, rd);
    check(rd == 32'h0001_2345 && range_len == 20'h12345, "RANGE register");
    wr32(acp_pkg::AM_A16_USER, 32'h0000_C004, 32'h0000_0005);
    rd32(acp_pkg::AM_A16_USER, 32'h0000_C004, rd);
    check(rd == 32'h0000_0004 && pulse_mode == acp_pkg::PULSE_20MS && starts == 1, $sformatf("CONTROL and start: %h %0d %0d", rd, pulse_mode, starts));
    wr32(acp_pkg::AM_A16_USER, 32'h0000_C014, 32'h0);
    check(acks == 1, "ACK pulse");
    wr32(acp_pkg::AM_A16_USER, 32'h0000_C018, 32'h0023_4321);
    check(wwrites == 1 && last_widx == 6'h23 && last_wval == 16'h4321, "WEIGHT write");
    st_ready = 1; st_fifo_ovf = 1; st_length = 20'hABCDE;
    rd32(acp_pkg::AM_A16_USER, 32'h0000_C000, rd);
    check(rd == 32'hACB0_0005, $sformatf("STATUS %h", rd));
    rd32(acp_pkg::AM_A16_USER, 32'h0000_C010, rd);
    check(rd == 32'h000A_BCDE, "LENGTH");
    // single A32 accesses
    for (int i = 0; i < 20; i++) begin
      automatic logic [18:0] wa = (i == 0) ? 19'h7FFFF : 19'($urandom);
      automatic logic [31:0] v = $urandom;
      wr32(acp_pkg::AM_A32_USER, A32B + {11'd0, wa, 2'b00}, v);
      check(ram.mem[wa] == {4'd0, v}, "RAM holds written word");
      rd32(acp_pkg::AM_A32_SUP, A32B + {11'd0, wa, 2'b00}, rd);
      check(rd == v, "A32 read back");
    end
    // block transfers
    for (int i = 0; i < 16; i++) blk[i] = $urandom;
    blt(A32B + 32'h100, 1, blk);
    for (int i = 0; i < 16; i++) check(ram.mem[64 + i] == {4'd0, blk[i]}, $sformatf("BLT word %0d in RAM", i));
    for (int i = 0; i < 16; i++) back[i] = '0;
    blt(A32B + 32'h100, 0, back);
    for (int i = 0; i < 16; i++) check(back[i] == blk[i], $sformatf("BLT read %0d", i));
    // cycles the slave must ignore
    vme_cycle(acp_pkg::AM_A16_USER, 32'h0000_D008, 0, '0, 0, rd, ok);
    check(!ok, "other A16 base ignored");
    vme_cycle(6'h39, A32B, 0, '0, 0, rd, ok);
    check(!ok, "A24 modifier ignored");
    vme_cycle(acp_pkg::AM_A32_USER, A32B, 0, '0, 1, rd, ok);
    check(!ok, "D16 transfer ignored");
    vme_cycle(acp_pkg::AM_A32_USER, 32'h1000_0000, 0, '0, 0, rd, ok);
    check(!ok, "other A32 window ignored");
    @(negedge clk) iack_n = 0; am = acp_pkg::AM_A16_USER; addr = 31'h6004; lword_n = 0;
    @(negedge clk) as_n = 0;
    @(negedge clk) ds_n = 2'b00;
    wait_dtack(ok);
    check(!ok, "IACK cycle ignored by the slave");
    release_strobes(0);
    iack_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
