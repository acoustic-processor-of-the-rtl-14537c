// dual_port_ram: result buffer shared by the signal processor and the VMEbus.
//
// 512K words of 36 bits, large enough for the processed data of the longest
// measurement range, so the visualisation computers can fetch a whole range
// as one continuous block. Port A belongs to the signal processing side,
// port B to the VMEbus interface. Each port reads and writes synchronously:
// read data appear one clock after en with we low. A write and a read of the
// same word in the same clock on different ports return the old word. The two
// ports share one clock here; the board part is an asynchronous dual-port
// SRAM.
//
// Follows the document: 512K x 36 organisation, two ports (DSP and VMEbus).
// Own choices: synchronous single-clock ports and the read-during-write rule.
module dual_port_ram #(
  parameter int unsigned WORDS = 512 * 1024,
  parameter int unsigned WIDTH = 36
) (
  input  logic                     clk,
  // port A (signal processing)
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(WORDS)-1:0] a_addr,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  // port B (VMEbus)
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(WORDS)-1:0] b_addr,
  input  logic [WIDTH-1:0]         b_wdata,
  output logic [WIDTH-1:0]         b_rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

endmodule
