// sram_model: behavioural model of the board's byte-wide asynchronous SRAM
// (512 kB), for simulation only.
//
// Reads are asynchronous: while oe_n is low, dout shows mem[addr] in the
// same clock. A write takes place at the rising clock edge when we_n is low,
// an idealisation of the chip's write-enable pulse. Counts reads cycles and
// writes so testbenches can check the access pattern. Unread cells start at 0.
module sram_model #(
  parameter int unsigned AW = 19
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    din,
  output logic [7:0]    dout,
  input  logic          we_n,
  input  logic          oe_n
);
  logic [7:0] mem [2**AW];
  int unsigned writes = 0;

  initial foreach (mem[i]) mem[i] = '0;

  assign dout = oe_n ? 8'h00 : mem[addr];

  always @(posedge clk) begin
    if (!we_n) begin
      mem[addr] <= din;
      writes++;
    end
  end

  // A read and a write must never be requested together.
  always @(posedge clk) assert (we_n || oe_n) else $error("SRAM read and write at once");
endmodule
