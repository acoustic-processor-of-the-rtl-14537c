// tb_beam_magnitude: random and extreme complex samples; the result r must
// satisfy r^2 <= re^2 + im^2 < (r+1)^2 (exact integer square root), beam index
// and last flag must pass through, and the result must follow the accepting
// clock edge by DW + 1 edges (one result bit per clock).
module tb_beam_magnitude;
  localparam int DW = 24;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 0, out_last;
  logic [5:0] in_beam = '0, out_beam;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic [DW-1:0] out_mag;
  int checks = 0, failures = 0, cyc = 0;

  beam_magnitude #(.DW(DW), .NSTREAM(61)) dut (.*);

  always #2 clk = ~clk;
  always @(posedge clk) cyc++;
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

  task automatic one(longint re, longint im, int beam, bit last);
    longint s = re * re + im * im;
    longint r;
    int t0;
    @(negedge clk);
    in_valid = 1; in_re = DW'(re); in_im = DW'(im); in_beam = 6'(beam); in_last = last;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    t0 = cyc;
    #1 in_valid = 0;
    @(negedge clk);
    while (!out_valid) @(negedge clk);
    out_ready = ($urandom % 2 == 0);
    while (!out_ready) begin @(negedge clk); out_ready = ($urandom % 2 == 0); end
    r = longint'(out_mag);
    check(r * r <= s && (r + 1) * (r + 1) > s, $sformatf("sqrt(%0d^2+%0d^2) = %0d", re, im, r));
    check(int'(out_beam) == beam && out_last == last, "beam index and last flag");
    @(posedge clk);
    #1 out_ready = 0;
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    one(0, 0, 0, 0);
    one(-(1 << 23), -(1 << 23), 60, 1);
    one((1 << 23) - 1, 0, 5, 0);
    one(3, 4, 7, 0);
    for (int i = 0; i < 500; i++) begin
      automatic int sh = $urandom % 24;
      one(longint'($signed(DW'($urandom))) >>> sh, longint'($signed(DW'($urandom))) >>> sh,
          int'($urandom % 61), 1'($urandom));
    end
    // latency with the output ready
    @(negedge clk);
    out_ready = 1; in_valid = 1; in_re = 100; in_im = 100;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    t0 = cyc;
    #1 in_valid = 0;
    while (!out_valid) @(posedge clk);
    check(cyc - t0 == DW + 1, $sformatf("latency %0d", cyc - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
