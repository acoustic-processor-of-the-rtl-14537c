// tb_measure_ctrl: measurement cycles with a simple MADC model (a conversion
// every 20 clocks while run is high) and a beam source that emits 61 beam
// amplitudes after every six conversions.
//
// Checked for each measurement: exactly 6 * range_len conversions, one
// filter-clear pulse, consecutive RAM words from address 0 holding
// {beam, amplitude}, one data_done pulse after the last word, ready until
// acknowledged, the word count in length. A 256-word RAM makes the third
// measurement (5 snapshots = 305 words) overflow it: the words beyond the end
// are dropped and clipped is set.
module tb_measure_ctrl;
  localparam int AW = 8, NB = 61;
  logic clk = 0, rst_n = 0;
  logic start = 0, ready_ack = 0;
  logic [19:0] range_len = 20'd3;
  logic madc_run, madc_busy = 0, filt_clear;
  logic [31:0] madc_conv_count = '0;
  logic mag_valid = 0, mag_ready, mag_last = 0;
  logic [5:0] mag_beam = '0;
  logic [23:0] mag_data = '0;
  logic ram_en, ram_we, busy, ready, data_done, clipped;
  logic [AW-1:0] ram_addr;
  logic [35:0] ram_wdata;
  logic [19:0] length;
  int checks = 0, failures = 0;
  int convs = 0, clears = 0, dones = 0, nwr = 0, nsnap_out = 0;
  logic [35:0] ram [1 << AW];
  int wr_order_ok = 1;

  measure_ctrl #(.RAM_AW(AW), .DW(24), .NSTREAM(NB)) dut (.*);

  always #2 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [23:0] amp_of(int snap, int b);
    return 24'(snap * 1000 + b * 7 + 1);
  endfunction

  // MADC model
  initial begin
    forever begin
      @(posedge clk);
      if (madc_run && !madc_busy) begin
        madc_busy <= 1; madc_conv_count <= 0;
        forever begin
          repeat (20) @(posedge clk);
          madc_conv_count <= madc_conv_count + 1;
          convs++;
          if (!madc_run) break;
        end
        madc_busy <= 0;
      end
    end
  end

  // beam source: one snapshot of 61 beams after every sixth conversion
  int snap = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (convs > 0 && convs % 6 == 0 && convs / 6 > snap) begin
        snap++;
        for (int b = 0; b < NB; b++) begin
          @(negedge clk);
          mag_valid = 1; mag_beam = 6'(b); mag_data = amp_of(nsnap_out, b); mag_last = (b == NB - 1);
          @(negedge clk);
          mag_valid = 0; mag_last = 0;
        end
        nsnap_out++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (filt_clear) clears <= clears + 1;
    if (data_done) dones <= dones + 1;
    if (ram_en && ram_we) begin
      ram[ram_addr] <= ram_wdata;
      if (int'(ram_addr) != nwr) wr_order_ok = 0;
      nwr <= nwr + 1;
    end
  end

  task automatic measure(int r, bit expect_clip);
    int words = r * NB;
    int kept = (words > (1 << AW)) ? (1 << AW) : words;
    convs = 0; nwr = 0; nsnap_out = 0; snap = 0;
    clears = 0; dones = 0;
    @(negedge clk) range_len = 20'(r); start = 1;
    @(negedge clk) start = 0;
    while (!data_done) @(negedge clk);
    repeat (200) @(negedge clk);
    check(convs == 6 * r, $sformatf("%0d conversions for %0d snapshots", convs, r));
    check(clears == 1, "one filter clear");
    check(dones == 1, "one data_done pulse");
    check(nwr == kept && wr_order_ok, $sformatf("%0d words written in order", nwr));
    check(int'(length) == kept, $sformatf("length %0d", length));
    check(clipped == expect_clip, "clip flag");
    check(ready && !busy, "ready, idle");
    for (int i = 0; i < kept; i++)
      check(ram[i] == {6'd0, 6'(i % NB), amp_of(i / NB, i % NB)}, $sformatf("RAM word %0d", i));
    @(negedge clk) ready_ack = 1;
    @(negedge clk) ready_ack = 0;
    check(!ready, "ready cleared by acknowledge");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    check(!busy && !madc_run, "idle after reset");
    measure(3, 0);
    measure(1, 0);
    measure(5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
