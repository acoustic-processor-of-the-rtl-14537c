// tb_madc_controller: the controller with a model of the 36 converters.
//
// Every channel gets a different, known value in every conversion. The test
// checks the conversion period (1440 clocks between STC pulses), that each
// conversion delivers exactly the 12 marked samples of the three-channel
// group sequence in channel order with the right value, I/Q tag and start
// flag, that sampling stops when run falls, and that a full FIFO drops words
// and raises overflow.
module tb_madc_controller;
  localparam int N = 36, W = 14, PERIOD = 1440;
  logic clk = 0, rst_n = 0, run = 0;
  logic adc_clk, adc_stc, fifo_wr, fifo_full = 0, busy, overflow;
  logic [N-1:0] adc_sdo;
  acp_pkg::fifo_word_t fifo_wdata;
  logic [31:0] conv_count;
  logic [W-1:0] value [N];
  int checks = 0, failures = 0;
  int conv = -1;            // conversion whose samples are being read out
  int stc_time [$];
  acp_pkg::fifo_word_t got [$];
  int cyc = 0;

  madc_controller #(.NUM_CH(N)) dut (.*);
  adc_bank_model #(.NUM_CH(N), .SAMPLE_W(W)) adcs (
    .stc(adc_stc), .sclk(adc_clk), .value(value), .sdo(adc_sdo));

  always #2 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (40 * PERIOD) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] sample_of(int n, int c);
    return W'((c * 311 + n * 1237 + 5) ^ (c << 7));
  endfunction

  // Present the values of conversion n+1 right after STC of conversion n.
  always @(posedge adc_stc) begin
    stc_time.push_back(cyc);
    conv++;
    #1;
    for (int c = 0; c < N; c++) value[c] = sample_of(conv + 1, c);
  end

  always @(posedge clk) if (fifo_wr) got.push_back(fifo_wdata);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    automatic int nconv = 14;
    for (int c = 0; c < N; c++) value[c] = sample_of(0, c);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk) run = 1;
    // check conversions one by one
    for (int n = 0; n < nconv; n++) begin
      automatic int p = (n % 6) / 2;
      wait (conv == n + 1 || (n == nconv - 1 && conv == n));
      if (n == nconv - 1) begin
        repeat (PERIOD) @(posedge clk);
      end
      check(got.size() == 12, $sformatf("conv %0d: %0d words", n, got.size()));
      for (int g = 0; g < 12 && got.size() > 0; g++) begin
        automatic acp_pkg::fifo_word_t w = got.pop_front();
        automatic int c = 3 * g + p;
        check(w.data === sample_of(n, c), $sformatf("conv %0d ch %0d: %h exp %h", n, c, w.data, sample_of(n, c)));
        check(w.q === 1'(n % 2), "q tag");
        check(w.sof === (n % 6 == 0 && g == 0), "sof flag");
      end
      got.delete();
      if (n == nconv - 2) begin
        @(negedge clk) run = 0;   // the conversion in progress is the last
      end
    end
    repeat (3 * PERIOD) @(posedge clk);
    check(stc_time.size() == nconv, $sformatf("%0d conversions after run fell", stc_time.size()));
    for (int i = 1; i < stc_time.size(); i++)
      check(stc_time[i] - stc_time[i-1] == PERIOD, "conversion period 1440 clocks");
    check(!busy && conv_count == 32'(nconv), "idle with conversion count");
    check(!overflow, "no overflow");
    // FIFO full: nothing written, overflow set
    got.delete();
    fifo_full = 1;
    @(negedge clk) run = 1;
    wait (conv == nconv + 1);
    @(negedge clk) run = 0;
    repeat (2 * PERIOD) @(posedge clk);
    check(got.size() == 0, "no writes into a full FIFO");
    check(overflow, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
