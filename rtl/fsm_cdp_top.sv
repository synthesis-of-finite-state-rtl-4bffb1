// fsm_cdp_top: control unit for access to one memory shared between two
// processors, in both of its syntheses side by side.
//
// Processor 1 requests the memory with x, processor 2 with y. A six-state
// Moore controller grants the memory to one processor at a time; on
// simultaneous requests the processor holding priority wins and the priority
// passes to the other (controller / data path split: the controller's state
// lines are the control signals of the data path, a bus switch).
//
// Two complete units are built from the same requests and processor buses,
// as the document evaluates them together:
//   unit A: ctrl_decoder (3 flip-flops + 3x8 decoder) driving mem_switch
//   unit B: ctrl_onehot  (6 flip-flops, one per state) driving mem_switch
// Each unit has its own shared-memory port (a_mem_*, b_mem_*), its own grant
// and read-data outputs, and its state lines brought out. The two units
// behave identically cycle for cycle; unit B's state lines come straight from
// flip-flops.
//
// The memory itself is outside this module. Timing: requests are sampled at
// the rising clock edge; grants and the memory port follow the state
// combinationally, so a processor is connected from the edge after its
// request until the edge after it drops the request. init is an active-high
// asynchronous initialisation to state A. Widths are parameters (the document
// gives none).
module fsm_cdp_top
  import fsm_cdp_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic               clk,
  input  logic               init,
  input  logic               x,
  input  logic               y,
  input  logic [ADDR_W-1:0]  p1_addr,
  input  logic [DATA_W-1:0]  p1_wdata,
  input  logic               p1_we,
  input  logic [ADDR_W-1:0]  p2_addr,
  input  logic [DATA_W-1:0]  p2_wdata,
  input  logic               p2_we,
  // unit A (decoder controller)
  output state_lines_t       a_st,
  output logic [2:0]         a_code,
  output logic               a_gnt1,
  output logic               a_gnt2,
  output logic [DATA_W-1:0]  a_p1_rdata,
  output logic [DATA_W-1:0]  a_p2_rdata,
  output logic               a_mem_en,
  output logic               a_mem_we,
  output logic [ADDR_W-1:0]  a_mem_addr,
  output logic [DATA_W-1:0]  a_mem_wdata,
  input  logic [DATA_W-1:0]  a_mem_rdata,
  // unit B (one-hot controller)
  output state_lines_t       b_st,
  output logic               b_gnt1,
  output logic               b_gnt2,
  output logic [DATA_W-1:0]  b_p1_rdata,
  output logic [DATA_W-1:0]  b_p2_rdata,
  output logic               b_mem_en,
  output logic               b_mem_we,
  output logic [ADDR_W-1:0]  b_mem_addr,
  output logic [DATA_W-1:0]  b_mem_wdata,
  input  logic [DATA_W-1:0]  b_mem_rdata
);

  // ---------------- unit A ----------------
  ctrl_decoder u_ctrl_a (
    .clk  (clk),
    .init (init),
    .x    (x),
    .y    (y),
    .st   (a_st),
    .code (a_code)
  );

  mem_switch #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_dp_a (
    .st        (a_st),
    .p1_addr   (p1_addr),
    .p1_wdata  (p1_wdata),
    .p1_we     (p1_we),
    .p1_rdata  (a_p1_rdata),
    .gnt1      (a_gnt1),
    .p2_addr   (p2_addr),
    .p2_wdata  (p2_wdata),
    .p2_we     (p2_we),
    .p2_rdata  (a_p2_rdata),
    .gnt2      (a_gnt2),
    .mem_en    (a_mem_en),
    .mem_we    (a_mem_we),
    .mem_addr  (a_mem_addr),
    .mem_wdata (a_mem_wdata),
    .mem_rdata (a_mem_rdata)
  );

  // ---------------- unit B ----------------
  ctrl_onehot u_ctrl_b (
    .clk  (clk),
    .init (init),
    .x    (x),
    .y    (y),
    .st   (b_st)
  );

  mem_switch #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_dp_b (
    .st        (b_st),
    .p1_addr   (p1_addr),
    .p1_wdata  (p1_wdata),
    .p1_we     (p1_we),
    .p1_rdata  (b_p1_rdata),
    .gnt1      (b_gnt1),
    .p2_addr   (p2_addr),
    .p2_wdata  (p2_wdata),
    .p2_we     (p2_we),
    .p2_rdata  (b_p2_rdata),
    .gnt2      (b_gnt2),
    .mem_en    (b_mem_en),
    .mem_we    (b_mem_we),
    .mem_addr  (b_mem_addr),
    .mem_wdata (b_mem_wdata),
    .mem_rdata (b_mem_rdata)
  );

endmodule
