// tb_sample_shift_register: shifts random samples and markers into all 36
// rows over the serial inputs, then empties the bank and checks that the
// rows leave through channel 1 in channel order with their markers, and that
// emptied rows read as zero.
module tb_sample_shift_register;
  localparam int N = 36, W = 14;
  logic clk = 0, rst_n = 0;
  logic bit_en = 0, id_load = 0, advance = 0;
  logic [N-1:0] sdi = '0, id_in = '0;
  logic [W-1:0] out_data;
  logic out_id;
  int checks = 0, failures = 0;

  sample_shift_register #(.NUM_CH(N), .SAMPLE_W(W)) dut (.*);

  always #2 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] val [N];
  logic [N-1:0] ids;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int round = 0; round < 4; round++) begin
      for (int c = 0; c < N; c++) val[c] = W'($urandom);
      ids = {$urandom, $urandom};
      // serial load, MSB first
      for (int b = W - 1; b >= 0; b--) begin
        @(negedge clk);
        for (int c = 0; c < N; c++) sdi[c] = val[c][b];
        bit_en = 1;
        @(negedge clk);
        bit_en = 0;
      end
      @(negedge clk); id_in = ids; id_load = 1;
      @(negedge clk); id_load = 0;
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        check(out_data === val[c], $sformatf("round %0d ch %0d data %h exp %h", round, c, out_data, val[c]));
        check(out_id === ids[c], $sformatf("round %0d ch %0d id", round, c));
        advance = 1;
        @(negedge clk);
        advance = 0;
      end
      @(negedge clk);
      check(out_data === '0 && out_id === 1'b0, "bank empty after readout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
