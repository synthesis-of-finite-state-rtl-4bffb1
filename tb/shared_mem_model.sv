// shared_mem_model: behavioural model of the shared memory for simulation.
// The design does not include the memory; this single-port model stands in for
// it: 2**ADDR_W words of DATA_W bits, written at the rising clock edge when en
// and we are high, read combinationally (rdata = word at addr). Its contents
// start at zero.
module shared_mem_model #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  initial foreach (mem[i]) mem[i] = '0;

  always @(posedge clk)
    if (en && we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
