// tb_sample_fifo: random pushes and pops against a queue model, including
// runs into full (refused writes set overflow) and empty.
module tb_sample_fifo;
  localparam int W = 16, D = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty, overflow;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [W-1:0] q [$];

  sample_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #2 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    automatic bit exp_ovf = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 4000; i++) begin
      automatic int phase = (i / 500) % 2;   // alternate between filling and draining
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(rd_data === q[0], $sformatf("head %h exp %h", rd_data, q[0]));
      check(overflow == exp_ovf, "overflow flag");
      if (full) fulls++;
      if (empty) empties++;
      wr_en   = ($urandom % 100) < (phase ? 70 : 30);
      rd_en   = ($urandom % 100) < (phase ? 30 : 70);
      wr_data = W'($urandom);
      begin
        automatic int sz = q.size();
        @(posedge clk);
        if (rd_en && sz > 0) void'(q.pop_front());
        if (wr_en) begin
          if (sz < D) q.push_back(wr_data);
          else exp_ovf = 1;
        end
      end
    end
    check(fulls > 0 && empties > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
