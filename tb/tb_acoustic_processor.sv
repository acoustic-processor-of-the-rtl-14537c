// tb_acoustic_processor: end-to-end run of the whole processor at its default
// size, driven over the VMEbus like a visualisation computer would.
//
// The 36 converter inputs see a tone burst at the carrier frequency
// (a quarter of the sampling rate) arriving as a plane wave: channel c sees
// A(t) cos(pi/2 * n + 2 pi u c) in conversion n, with spatial frequency u =
// k/128, so beam 30 + k should light up. Three measurements are made, one per
// sounding pulse setting (4, 10 and 20 ms filters), each with its own arrival
// angle and range length:
//   program IRQ level/vector, amplitude weights, RANGE and CONTROL (start);
//   wait for the interrupt request and acknowledge it (vector check);
//   read STATUS and LENGTH, fetch the whole result block with BLT cycles;
//   check every word's beam field, that the strongest beam during the burst
//   is beam 30 + k, and that the beams far from it stay well below the peak;
//   clear data-ready through the ACK register.
// Counted, and required to happen: conversions (6 per snapshot), marked
// samples (12 per conversion) and shift-register steps (36 per conversion),
// snapshots beamformed, zero-padding steps, filter mode changes, weight loads,
// register and BLT transfers, acknowledged interrupts.
module tb_acoustic_processor;
  localparam int N = 36, NB = 61, PERIOD = 1440;
  localparam real PI = 3.14159265358979323846;
  localparam logic [31:0] A32B = 32'h0800_0000;
  localparam logic [31:0] A16B = 32'h0000_C000;

  logic clk = 0, rst_n = 0;
  logic adc_clk, adc_stc;
  logic [N-1:0] adc_sdo;
  logic as_n = 1, write_n = 1, lword_n = 1, iack_n = 1, iackin_n = 1, iackout_n;
  logic [1:0] ds_n = 2'b11;
  logic [5:0] am = '0;
  logic [31:1] addr = '0;
  logic [31:0] d_in = '0, d_out;
  logic d_oe, dtack_n;
  logic [7:1] irq_n;
  logic [31:0] stat_snapshots;
  logic [15:0] stat_resyncs;
  logic [10:0] stat_fifo_level;
  logic stat_clipped;
  logic [13:0] value [N];
  int checks = 0, failures = 0;

  acoustic_processor dut (
    .clk, .rst_n, .adc_clk, .adc_stc, .adc_sdo,
    .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_lword_n(lword_n),
    .vme_iack_n(iack_n), .vme_iackin_n(iackin_n), .vme_iackout_n(iackout_n),
    .vme_am(am), .vme_addr(addr), .vme_d_in(d_in), .vme_d_out(d_out), .vme_d_oe(d_oe),
    .vme_dtack_n(dtack_n), .vme_irq_n(irq_n),
    .stat_snapshots, .stat_resyncs, .stat_fifo_level, .stat_clipped);

  adc_bank_model #(.NUM_CH(N), .SAMPLE_W(14)) adcs (
    .stc(adc_stc), .sclk(adc_clk), .value(value), .sdo(adc_sdo));

  always #2 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- signal source ----------------
  int  conv_n = 0;          // conversions since the measurement started
  real u_wave = 0.0;        // spatial frequency of the wave
  int  burst_from = 0, burst_to = 0;
  function automatic logic [13:0] adc_value(int n, int c);
    real a = (n >= burst_from && n < burst_to) ? 6000.0 : 0.0;
    real v = a * $cos(PI / 2.0 * n + 2.0 * PI * u_wave * c);
    return 14'($rtoi($floor(v + 0.5)));
  endfunction
  task automatic present(int n);
    for (int c = 0; c < N; c++) value[c] = adc_value(n, c);
  endtask
  always @(posedge adc_stc) begin
    #1;
    conv_n++;
    present(conv_n);
  end

  // ---------------- mechanism counters ----------------
  int n_conv = 0, n_marked = 0, n_shift = 0, n_pad = 0, n_mode_change = 0;
  int n_weight = 0, n_reg = 0, n_blt = 0, n_iack = 0;
  acp_pkg::pulse_t last_mode = acp_pkg::PULSE_4MS;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_madc.state == 3'd1 && dut.u_madc.wcnt == '0) n_conv <= n_conv + 1;
    if (dut.u_madc.fifo_wr) n_marked <= n_marked + 1;
    if (dut.u_madc.advance) n_shift <= n_shift + 1;
    if (dut.u_bf.state == 2'd1 && dut.u_bf.load_pad) n_pad <= n_pad + 1;
    if (dut.pulse_mode != last_mode) begin
      n_mode_change <= n_mode_change + 1;
      last_mode <= dut.pulse_mode;
    end
    if (dut.weight_wr) n_weight <= n_weight + 1;
  end

  // ---------------- VMEbus master ----------------
  task automatic wait_dtack(output bit ok);
    ok = 0;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      if (!dtack_n) begin ok = 1; return; end
    end
  endtask

  task automatic release_strobes(bit keep_as);
    ds_n = 2'b11;
    if (!keep_as) as_n = 1;
    for (int i = 0; i < 60 && !dtack_n; i++) @(negedge clk);
  endtask

  task automatic reg_access(logic [7:0] off, bit wr, logic [31:0] wd, output logic [31:0] rd);
    bit ok;
    @(negedge clk);
    am = acp_pkg::AM_A16_USER; addr = 31'((A16B + 32'(off)) >> 1); write_n = !wr; lword_n = 0;
    iack_n = 1; d_in = wd;
    @(negedge clk) as_n = 0;
    @(negedge clk) ds_n = 2'b00;
    wait_dtack(ok);
    rd = d_out;
    check(ok, $sformatf("register %h answered", off));
    release_strobes(0);
    n_reg++;
  endtask

  task automatic reg_wr(logic [7:0] off, logic [31:0] wd);
    logic [31:0] rd;
    reg_access(off, 1, wd, rd);
  endtask

  task automatic reg_rd(logic [7:0] off, output logic [31:0] rd);
    reg_access(off, 0, '0, rd);
  endtask

  // block read of n words starting at word address wa
  task automatic blt_read(int wa, int n, ref logic [31:0] buffer [$]);
    bit ok;
    @(negedge clk);
    am = acp_pkg::AM_A32_UBLT; addr = 31'((A32B + 4 * wa) >> 1); write_n = 1; lword_n = 0;
    iack_n = 1;
    @(negedge clk) as_n = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk) ds_n = 2'b00;
      wait_dtack(ok);
      check(ok, "BLT beat answered");
      buffer.push_back(d_out);
      release_strobes(1);
      n_blt++;
    end
    as_n = 1;
    repeat (3) @(negedge clk);
  endtask

  task automatic iack(logic [2:0] lv, output logic [7:0] vec, output bit ok);
    @(negedge clk) iack_n = 0; addr = {28'd0, lv};
    @(negedge clk) as_n = 0;
    @(negedge clk) ds_n = 2'b10; iackin_n = 0;
    wait_dtack(ok);
    vec = d_out[7:0];
    ds_n = 2'b11; iackin_n = 1; as_n = 1;
    repeat (6) @(negedge clk);
    iack_n = 1;
    if (ok) n_iack++;
  endtask

  // ---------------- one measurement ----------------
  task automatic measurement(acp_pkg::pulse_t mode, int k, int range, int b_from, int b_to);
    logic [31:0] rd;
    logic [31:0] res [$];
    logic [7:0] vec;
    bit ok;
    int snaps0 = stat_snapshots;
    int conv0 = n_conv, mark0 = n_marked, shift0 = n_shift;
    time t0;
    u_wave = real'(k) / 128.0;
    burst_from = b_from; burst_to = b_to;
    conv_n = 0;
    present(0);
    reg_wr(8'h0C, 32'(range));
    reg_wr(8'h04, {29'd0, 2'(mode), 1'b1});
    t0 = $time;
    // wait for the interrupt
    while (irq_n[2]) @(negedge clk);
    reg_rd(8'h00, rd);
    check(rd[31:16] == 16'hACB0 && rd[0] && !rd[1] && rd[4],
          $sformatf("STATUS %h: ready, not busy, interrupt pending", rd));
    check(rd[3:2] == 2'b00, "no FIFO or MADC overflow");
    iack(3'd2, vec, ok);
    check(ok && vec == 8'h77, $sformatf("interrupt vector %h", vec));
    check(irq_n == 7'h7F, "request withdrawn");
    reg_rd(8'h00, rd);
    check(!rd[4], "no interrupt pending after acknowledge");
    reg_rd(8'h10, rd);
    check(rd == 32'(range * NB), $sformatf("LENGTH %0d", rd));
    check(n_conv - conv0 == 6 * range, $sformatf("%0d conversions", n_conv - conv0));
    check(n_marked - mark0 == 12 * 6 * range, "12 marked samples per conversion");
    check(n_shift - shift0 == 36 * 6 * range, "36 register steps per conversion");
    check(int'(stat_snapshots) - snaps0 == range, "snapshots beamformed");
    // fetch the block in 64-word BLT cycles
    for (int w = 0; w < range * NB; w += 64)
      blt_read(w, (range * NB - w < 64) ? range * NB - w : 64, res);
    check(res.size() == range * NB, "whole block read");
    begin
      int beam_ok = 1;
      int peak_snap_ok = 0, burst_snaps = 0;
      for (int i = 0; i < res.size(); i++)
        if (int'(res[i][29:24]) != i % NB) beam_ok = 0;
      check(beam_ok == 1, "beam index field of every word");
      // snapshots fully inside the burst (arrival plus filter settling)
      for (int s = 0; s < range; s++) begin
        int c0 = 6 * s;
        if (c0 >= b_from + 30 && c0 + 6 <= b_to) begin
          int best = 0;
          int far_max = 0;
          for (int b = 0; b < NB; b++) begin
            int m = int'(res[s * NB + b][23:0]);
            if (m > int'(res[s * NB + best][23:0])) best = b;
          end
          for (int b = 0; b < NB; b++)
            if (b < 30 + k - 6 || b > 30 + k + 6)
              if (int'(res[s * NB + b][23:0]) > far_max) far_max = int'(res[s * NB + b][23:0]);
          burst_snaps++;
          if (best == 30 + k && far_max * 4 < int'(res[s * NB + best][23:0])) peak_snap_ok++;
          else $display("snapshot %0d: peak beam %0d (exp %0d), far %0d peak %0d", s, best,
                        30 + k, far_max, res[s * NB + best][23:0]);
        end
      end
      check(burst_snaps > 0 && peak_snap_ok == burst_snaps,
            $sformatf("peak at beam %0d in %0d of %0d burst snapshots", 30 + k, peak_snap_ok, burst_snaps));
      // before the burst: silence
      check(res[0][23:0] == 0 && res[NB + 30][23:0] == 0, "silence before the echo");
    end
    reg_wr(8'h14, 32'd0);
    reg_rd(8'h00, rd);
    check(!rd[0], "data ready cleared");
    $display("measurement mode %0d: %0d snapshots, %0d ns", mode, range, $time - t0);
  endtask

  initial begin
    logic [31:0] rd;
    for (int c = 0; c < N; c++) value[c] = '0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    reg_wr(8'h08, 32'h0000_7702);               // interrupt level 2, vector 77h
    reg_rd(8'h08, rd);
    check(rd == 32'h0000_7702, "IRQ register");
    // cosine-on-pedestal amplitude weights: 0.5 + 0.5 cos(pi (c - 17.5) / 36)
    for (int c = 0; c < N; c++) begin
      automatic real w = 0.5 + 0.5 * $cos(PI * (c - 17.5) / 36.0);
      reg_wr(8'h18, {10'd0, 6'(c), 16'($rtoi(w * 16384.0))});
    end
    measurement(acp_pkg::PULSE_4MS, 7, 24, 24, 132);
    measurement(acp_pkg::PULSE_20MS, -12, 20, 30, 120);
    measurement(acp_pkg::PULSE_10MS, 0, 16, 18, 96);
    check(stat_resyncs == 0, "no framing loss");
    check(!stat_clipped, "no RAM clipping");
    $display("conversions %0d, marked samples %0d, register steps %0d, zero-pad steps %0d",
             n_conv, n_marked, n_shift, n_pad);
    $display("mode changes %0d, weight loads %0d, register cycles %0d, BLT beats %0d, IACK %0d",
             n_mode_change, n_weight, n_reg, n_blt, n_iack);
    check(n_conv > 0 && n_marked > 0 && n_shift > 0, "sampling mechanisms exercised");
    check(n_pad == int'(stat_snapshots) * (128 - 36), "zero padding 92 points per snapshot");
    check(n_mode_change >= 2, "filter mode switched");
    check(n_weight == N, "weights loaded");
    check(n_reg > 0 && n_blt > 0 && n_iack == 3, "VMEbus register, BLT and interrupt cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
