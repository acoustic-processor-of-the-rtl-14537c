// tb_frame_assembler: feeds FIFO words in the MADC order (12 marked words per
// conversion, six conversions per snapshot) and checks the complex channel
// samples: I = first sample, Q = -second sample, both multiplied by
// (-1)^(snapshot + position in group). Words before the first start flag are
// ignored, and a snapshot cut short by a new start flag is dropped and
// counted as a resynchronisation. The output side stalls at random.
module tb_frame_assembler;
  localparam int N = 36, W = 14, OW = 15;
  logic clk = 0, rst_n = 0;
  logic fifo_empty, fifo_rd, out_valid, out_ready = 0, out_last;
  acp_pkg::fifo_word_t fifo_rdata;
  logic signed [OW-1:0] out_re, out_im;
  logic [15:0] resync_count;
  int checks = 0, failures = 0;
  acp_pkg::fifo_word_t q [$];
  int exp_re [$], exp_im [$];

  frame_assembler #(.NUM_CH(N)) dut (.*);

  assign fifo_empty = (q.size() == 0);
  assign fifo_rdata = (q.size() > 0) ? q[0] : '0;
  always @(posedge clk) if (fifo_rd && q.size() > 0) void'(q.pop_front());
  always @(negedge clk) out_ready = ($urandom % 4) != 0;

  always #2 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Queue one snapshot; words_cut > 0 stops it after that many words.
  task automatic put_snapshot(int snap, bit expect_out, int words_cut = 0);
    int s1 [N], s2 [N];
    int nw = 0;
    for (int c = 0; c < N; c++) begin
      s1[c] = int'($urandom % 16384) - 8192;
      s2[c] = int'($urandom % 16384) - 8192;
    end
    for (int t = 0; t < 6; t++)
      for (int g = 0; g < 12; g++) begin
        acp_pkg::fifo_word_t w;
        int c = 3 * g + t / 2;
        if (words_cut > 0 && nw == words_cut) return;
        w.sof  = (t == 0 && g == 0);
        w.q    = 1'(t % 2);
        w.data = W'(w.q ? s2[c] : s1[c]);
        q.push_back(w);
        nw++;
      end
    if (expect_out)
      for (int c = 0; c < N; c++) begin
        int sg = ((snap + c % 3) % 2) ? -1 : 1;
        exp_re.push_back(sg * s1[c]);
        exp_im.push_back(-sg * s2[c]);
      end
  endtask

  int nout = 0, nlast = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (exp_re.size() == 0) begin
      checks++; failures++; $display("FAIL: unexpected output");
    end else begin
      automatic int er = exp_re.pop_front(), ei = exp_im.pop_front();
      check(int'(out_re) == er && int'(out_im) == ei,
            $sformatf("out %0d: (%0d,%0d) exp (%0d,%0d)", nout, out_re, out_im, er, ei));
      check(out_last == ((nout % N) == N - 1), "last flag");
      if (out_last) nlast++;
      nout++;
    end
  end

  initial begin
    acp_pkg::fifo_word_t junk;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // stray words before the first start flag
    for (int i = 0; i < 5; i++) begin
      junk.sof = 0; junk.q = 1'(i % 2); junk.data = W'($urandom);
      q.push_back(junk);
    end
    put_snapshot(0, 1);
    put_snapshot(1, 1);
    put_snapshot(2, 0, 30);   // broken: dropped
    put_snapshot(0, 1);       // parity counts completed snapshots only
    put_snapshot(1, 1);
    wait (exp_re.size() == 0 && q.size() == 0);
    repeat (200) @(posedge clk);
    check(nlast == 4, $sformatf("%0d snapshots out", nlast));
    check(resync_count == 16'd1, $sformatf("resync count %0d", resync_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
