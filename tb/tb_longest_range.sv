// tb_longest_range: the longest measurement the result buffer can hold, on
// the full-size processor.
//
// 512K words at 61 beams per snapshot hold 8594 whole snapshots. One
// measurement of 8595 snapshots (20 ms pulse setting, uniform weights) is run:
// the processor must write exactly 524288 words, raise the clipped flag,
// report LENGTH = 524288 and raise its interrupt after 8595 x 8640 clocks plus
// the pipeline drain. A tone burst from beam 25 in the last 70 snapshots shows
// that the end of the buffer holds the end of the echo: the block around the
// end is fetched with BLT cycles and its beam fields and peak beam checked,
// as are the first (silent) words. A short second measurement then checks
// that the clipped flag and LENGTH start afresh.
module tb_longest_range;
  localparam int N = 36, NB = 61;
  localparam int WORDS = 1 << 19;
  localparam int RANGE = WORDS / NB + 1;          // 8595
  localparam int SNAP_CLK = 6 * 1440;
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
  longint cyc = 0;

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
  always @(posedge clk) cyc++;

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- signal source: burst from beam 25 at the end ----------------
  localparam int K = -5;
  localparam int BURST_FROM = 6 * (RANGE - 70);
  int conv_n = 0;
  function automatic logic [13:0] adc_value(int n, int c);
    real a = (n >= BURST_FROM) ? 5000.0 : 0.0;
    return 14'($rtoi($floor(a * $cos(PI / 2.0 * n + 2.0 * PI * K * c / 128.0) + 0.5)));
  endfunction
  always @(posedge adc_stc) begin
    #1;
    conv_n++;
    for (int c = 0; c < N; c++) value[c] = adc_value(conv_n, c);
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
  endtask

  task automatic reg_wr(logic [7:0] off, logic [31:0] wd);
    logic [31:0] rd;
    reg_access(off, 1, wd, rd);
  endtask

  task automatic reg_rd(logic [7:0] off, output logic [31:0] rd);
    reg_access(off, 0, '0, rd);
  endtask

  task automatic blt_read(int wa, int n, ref logic [31:0] buffer [$]);
    bit ok;
    @(negedge clk);
    am = acp_pkg::AM_A32_UBLT; addr = 31'((A32B + 32'(4 * wa)) >> 1); write_n = 1; lword_n = 0;
    iack_n = 1;
    @(negedge clk) as_n = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk) ds_n = 2'b00;
      wait_dtack(ok);
      check(ok, "BLT beat answered");
      buffer.push_back(d_out);
      release_strobes(1);
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
  endtask

  initial begin
    logic [31:0] rd;
    logic [31:0] head [$], tail [$];
    logic [7:0] vec;
    bit ok;
    longint t0, t1;
    int first_tail, peak_ok, burst_snaps;
    for (int c = 0; c < N; c++) value[c] = '0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    reg_wr(8'h08, 32'h0000_5A03);                  // level 3, vector 5Ah
    reg_wr(8'h0C, 32'(RANGE));
    reg_wr(8'h04, {29'd0, 2'(acp_pkg::PULSE_20MS), 1'b1});
    t0 = cyc;
    while (irq_n[3]) @(negedge clk);
    t1 = cyc;
    $display("measurement of %0d snapshots took %0d clocks", RANGE, t1 - t0);
    check(t1 - t0 >= longint'(RANGE) * SNAP_CLK && t1 - t0 < longint'(RANGE) * SNAP_CLK + 20000,
          $sformatf("duration %0d clocks for %0d snapshots", t1 - t0, RANGE));
    iack(3'd3, vec, ok);
    check(ok && vec == 8'h5A, $sformatf("interrupt vector %h", vec));
    check(stat_clipped, "buffer overflow flagged");
    check(int'(stat_snapshots) == RANGE, "all snapshots beamformed");
    reg_rd(8'h10, rd);
    check(rd == 32'(WORDS), $sformatf("LENGTH %0d", rd));
    // the first snapshot: silence
    blt_read(0, NB, head);
    for (int b = 0; b < NB; b++)
      check(int'(head[b][29:24]) == b && head[b][23:0] == 0, "first snapshot silent");
    // the last 40 whole snapshots and the partial one at the end
    first_tail = (WORDS / NB - 40) * NB;
    for (int w = first_tail; w < WORDS; w += 64)
      blt_read(w, (WORDS - w < 64) ? WORDS - w : 64, tail);
    check(tail.size() == WORDS - first_tail, "tail of the buffer read");
    peak_ok = 0; burst_snaps = 0;
    for (int i = 0; i < tail.size(); i++)
      if (int'(tail[i][29:24]) != (first_tail + i) % NB) begin
        check(0, $sformatf("beam field of word %0d", first_tail + i));
        break;
      end
    check(int'(tail[tail.size() - 1][29:24]) == (WORDS - 1) % NB, "last stored word is beam 53");
    for (int s = 0; s < 40; s++) begin
      int best = 0;
      for (int b = 0; b < NB; b++)
        if (tail[s * NB + b][23:0] > tail[s * NB + best][23:0]) best = b;
      burst_snaps++;
      if (best == 30 + K) peak_ok++;
    end
    check(peak_ok == burst_snaps, $sformatf("peak at beam %0d in %0d of %0d snapshots", 30 + K,
          peak_ok, burst_snaps));
    reg_wr(8'h14, 32'd0);
    // a short measurement afterwards starts from a clean state
    reg_wr(8'h0C, 32'd3);
    reg_wr(8'h04, {29'd0, 2'(acp_pkg::PULSE_4MS), 1'b1});
    while (irq_n[3]) @(negedge clk);
    iack(3'd3, vec, ok);
    reg_rd(8'h10, rd);
    check(rd == 32'(3 * NB), "LENGTH of the short measurement");
    check(!stat_clipped, "clipped flag cleared");
    check(stat_resyncs == 0, "no framing loss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
