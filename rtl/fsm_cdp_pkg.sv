// fsm_cdp_pkg: types and constants shared by the shared-memory access controller.
//
// The controller is a six-state Moore machine (states A..F). Both controller
// implementations present their state as six one-hot "state lines", which are
// also the machine's Moore outputs and the data path's control signals. The
// decoder-based implementation additionally keeps a 3-bit state code G2 G1 G0;
// the code assignment A=000 .. F=101 is the one implied by the document's state
// table (the next-state columns G2 G1 G0 match these codes).
package fsm_cdp_pkg;

  // 3-bit state code of the decoder-based controller (G2 is the MSB).
  typedef enum logic [2:0] {
    ST_A = 3'b000,  // idle, processor 1 has priority
    ST_B = 3'b001,  // processor 1 connected, no contention
    ST_C = 3'b010,  // processor 2 connected, priority returns to processor 1
    ST_D = 3'b011,  // processor 1 connected, priority passes to processor 2
    ST_E = 3'b100,  // idle, processor 2 has priority
    ST_F = 3'b101   // processor 2 connected, no contention
  } state_code_e;

  // One line per state; exactly one is high in a legal state.
  typedef struct packed {
    logic a;
    logic b;
    logic c;
    logic d;
    logic e;
    logic f;
  } state_lines_t;

endpackage
