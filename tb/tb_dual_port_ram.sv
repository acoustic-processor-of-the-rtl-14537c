// tb_dual_port_ram: random writes and reads on both ports of the full-size
// 512K x 36 buffer against a model, spread over the whole address range,
// including the top and bottom words and the one-clock read latency.
module tb_dual_port_ram;
  localparam int AW = 19, W = 36;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] model [int];
  int addrs [$];

  dual_port_ram #(.WORDS(1 << AW), .WIDTH(W)) dut (.*);

  always #2 clk = ~clk;
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

  initial begin
    addrs.push_back(0); addrs.push_back((1 << AW) - 1);
    for (int i = 0; i < 62; i++) addrs.push_back($urandom % (1 << AW));
    // write every address once, alternating ports
    foreach (addrs[i]) begin
      automatic logic [W-1:0] v = {$urandom, $urandom};
      @(negedge clk);
      a_en = 0; b_en = 0; a_we = 0; b_we = 0;
      if (i % 2 == 0) begin a_en = 1; a_we = 1; a_addr = AW'(addrs[i]); a_wdata = v; end
      else            begin b_en = 1; b_we = 1; b_addr = AW'(addrs[i]); b_wdata = v; end
      model[addrs[i]] = v;
    end
    @(negedge clk); a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    // read back on both ports at once, from different addresses
    for (int i = 0; i < 200; i++) begin
      automatic int ia = addrs[$urandom % addrs.size()];
      automatic int ib = addrs[$urandom % addrs.size()];
      @(negedge clk);
      a_en = 1; a_addr = AW'(ia); b_en = 1; b_addr = AW'(ib);
      @(negedge clk);
      a_en = 0; b_en = 0;
      check(a_rdata === model[ia], $sformatf("port A read %0h", ia));
      check(b_rdata === model[ib], $sformatf("port B read %0h", ib));
    end
    // a port holds its read data while disabled
    begin
      automatic logic [W-1:0] held = a_rdata;
      repeat (3) @(negedge clk);
      check(a_rdata === held, "read data held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
