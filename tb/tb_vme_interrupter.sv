// tb_vme_interrupter: request and acknowledge on the VMEbus.
//
// A raise at level 3 must pull IRQ3* (and no other line) low; an acknowledge
// cycle for level 3 with IACKIN* low must return the 8-bit vector with
// DTACK* and withdraw the request. An acknowledge for another level, or with
// nothing pending, must be passed on through IACKOUT* without DTACK*.
// Level 0 must not request at all. Then 40 random level/vector pairs are
// requested, first acknowledged at a wrong level, then at the right one.
module tb_vme_interrupter;
  logic clk = 0, rst_n = 0, raise = 0, pending;
  logic [2:0] level = 3'd3;
  logic [7:0] vector = 8'hA5, d_out;
  logic [7:1] irq_n;
  logic as_n = 1, ds0_n = 1, iack_n = 1, iackin_n = 1, iackout_n, d_oe, dtack_n;
  logic [3:1] addr = '0;
  int checks = 0, failures = 0;

  vme_interrupter dut (.*);

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

  // acknowledge cycle for level lv; reports DTACK*, IACKOUT* and the data
  task automatic iack_cycle(logic [2:0] lv, output bit got_dtack, output bit passed,
                            output logic [7:0] data);
    got_dtack = 0; passed = 0; data = '0;
    @(negedge clk) iack_n = 0; addr = lv;
    @(negedge clk) as_n = 0;
    @(negedge clk) ds0_n = 0; iackin_n = 0;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      if (!dtack_n && !got_dtack) begin got_dtack = 1; data = d_out; end
      if (!iackout_n) passed = 1;
    end
    ds0_n = 1; iackin_n = 1; as_n = 1;
    repeat (6) @(negedge clk);
    check(dtack_n && iackout_n && !d_oe, "bus released after the cycle");
    iack_n = 1;
  endtask

  initial begin
    bit dt, ps;
    logic [7:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(negedge clk);
    check(irq_n == 7'h7F && !pending, "no request after reset");
    @(negedge clk) raise = 1;
    @(negedge clk) raise = 0;
    @(negedge clk);
    check(irq_n == 7'b1111011 && pending, $sformatf("IRQ3 requested: %b", irq_n));
    iack_cycle(3'd5, dt, ps, v);
    check(!dt && ps, "other level passed down the chain");
    check(irq_n == 7'b1111011, "request still pending");
    iack_cycle(3'd3, dt, ps, v);
    check(dt && !ps && v == 8'hA5, $sformatf("vector %h on acknowledge", v));
    check(irq_n == 7'h7F && !pending, "request withdrawn");
    iack_cycle(3'd3, dt, ps, v);
    check(!dt && ps, "nothing pending: passed on");
    // level 7, new vector
    level = 3'd7; vector = 8'h3C;
    @(negedge clk) raise = 1;
    @(negedge clk) raise = 0;
    @(negedge clk);
    check(irq_n == 7'b0111111, "IRQ7 requested");
    iack_cycle(3'd7, dt, ps, v);
    check(dt && v == 8'h3C, "vector at level 7");
    // level 0 disables
    level = 3'd0;
    @(negedge clk) raise = 1;
    @(negedge clk) raise = 0;
    repeat (2) @(negedge clk);
    check(irq_n == 7'h7F && !pending, "level 0 never requests");
    for (int t = 0; t < 40; t++) begin
      automatic logic [2:0] lv = 3'(1 + $urandom % 7);
      automatic logic [2:0] other = 3'(1 + (int'(lv) + $urandom % 6) % 7);
      level = lv; vector = 8'($urandom);
      @(negedge clk) raise = 1;
      @(negedge clk) raise = 0;
      @(negedge clk);
      check(irq_n == ~(7'(1) << (lv - 1)), $sformatf("IRQ%0d alone requested: %b", lv, irq_n));
      iack_cycle(other, dt, ps, v);
      check(!dt && ps, $sformatf("level %0d acknowledge passed on", other));
      iack_cycle(lv, dt, ps, v);
      check(dt && !ps && v == vector, $sformatf("vector %h at level %0d", v, lv));
      check(irq_n == 7'h7F, "request withdrawn");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
