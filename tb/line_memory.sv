// line_memory: behavioural model of an external synchronous SRAM seen through its
// controller as one line per address (the snapshot memories). Write when we; read data
// appears one clock after re. Not synthesizable hardware of the design: testbench only.
module line_memory #(
  parameter int W  = 576,
  parameter int AW = 17
) (
  input  logic          clk,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [2**AW];
  initial rdata = '0;
  always @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
