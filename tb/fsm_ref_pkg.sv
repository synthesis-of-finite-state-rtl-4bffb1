// fsm_ref_pkg: reference model for the testbenches of the shared-memory access
// controller. The next-state function is a direct transcription of the state
// transition table (16 rows, 'x' meaning "either value"), kept separate from
// the RTL's gate equations so that the two can be compared. States are
// numbered 0..5 for A..F.
package fsm_ref_pkg;

  localparam int NROWS = 16;

  // Row r: present state, x pattern, y pattern (2 = don't care), next state.
  localparam int ROW_PS [NROWS] = '{0,0,0,0, 1,1, 2,2, 3,3, 4,4,4,4, 5,5};
  localparam int ROW_X  [NROWS] = '{0,0,1,1, 0,1, 2,2, 0,1, 0,0,1,1, 2,2};
  localparam int ROW_Y  [NROWS] = '{0,1,0,1, 2,2, 0,1, 2,2, 0,1,0,1, 0,1};
  localparam int ROW_NS [NROWS] = '{0,2,1,3, 0,1, 0,2, 4,3, 4,5,3,2, 4,5};

  // Index of the table row that applies, -1 if none (illegal state).
  function automatic int ref_row(int ps, bit x, bit y);
    for (int r = 0; r < NROWS; r++)
      if (ROW_PS[r] == ps && (ROW_X[r] == 2 || ROW_X[r] == int'(x)) &&
          (ROW_Y[r] == 2 || ROW_Y[r] == int'(y)))
        return r;
    return -1;
  endfunction

  function automatic int ref_next(int ps, bit x, bit y);
    int r;
    r = ref_row(ps, x, y);
    return (r < 0) ? 0 : ROW_NS[r];
  endfunction

  // State lines {A,B,C,D,E,F} of state s (A is the MSB).
  function automatic logic [5:0] ref_lines(int s);
    return 6'b100000 >> s;
  endfunction

  // The document's test sequence: requests (x, y) at the clock edges
  // 0, 5, ..., 65 ns of a 200 MHz clock.
  localparam bit SEQ_X [14] = '{0,1,1,0,0,0,1,1,0,0,0,1,1,0};
  localparam bit SEQ_Y [14] = '{0,0,0,1,1,0,1,1,1,0,1,1,1,1};

endpackage
