// mem_switch: data path of the shared-memory access unit.
//
// Connects the bus of one processor at a time to the single port of the
// shared memory, under control of the controller's state lines. Processor 1
// is connected in states B and D, processor 2 in states C and F; in the idle
// states A and E no processor is connected and the memory port is disabled.
// The connected processor's address, write data and write enable pass to the
// memory; the memory's read data is returned to the connected processor only
// (the other sees zero). gnt1 / gnt2 tell each processor it is connected.
//
// The document states only that the connection is given to one processor at
// a time; the bus signals, their widths and the mapping of states to grants
// (read off the state table: B and D are held while X stays high, C and F
// while Y stays high) are choices of this design. Purely combinational: the
// grant follows the controller state of the current cycle.
module mem_switch
  import fsm_cdp_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  state_lines_t       st,
  // processor 1
  input  logic [ADDR_W-1:0]  p1_addr,
  input  logic [DATA_W-1:0]  p1_wdata,
  input  logic               p1_we,
  output logic [DATA_W-1:0]  p1_rdata,
  output logic               gnt1,
  // processor 2
  input  logic [ADDR_W-1:0]  p2_addr,
  input  logic [DATA_W-1:0]  p2_wdata,
  input  logic               p2_we,
  output logic [DATA_W-1:0]  p2_rdata,
  output logic               gnt2,
  // shared memory port
  output logic               mem_en,
  output logic               mem_we,
  output logic [ADDR_W-1:0]  mem_addr,
  output logic [DATA_W-1:0]  mem_wdata,
  input  logic [DATA_W-1:0]  mem_rdata
);

  always_comb begin
    gnt1      = st.b | st.d;
    gnt2      = st.c | st.f;
    mem_en    = gnt1 | gnt2;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    if (gnt1) begin
      mem_we    = p1_we;
      mem_addr  = p1_addr;
      mem_wdata = p1_wdata;
    end else if (gnt2) begin
      mem_we    = p2_we;
      mem_addr  = p2_addr;
      mem_wdata = p2_wdata;
    end
    p1_rdata = gnt1 ? mem_rdata : '0;
    p2_rdata = gnt2 ? mem_rdata : '0;
  end

  // The memory is never connected to both processors.
  always_comb begin
    assert (!(gnt1 && gnt2) || $isunknown(st))
      else $error("mem_switch: both processors granted");
  end

endmodule
