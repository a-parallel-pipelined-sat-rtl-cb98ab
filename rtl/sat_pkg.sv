// sat_pkg: types shared by the parallel pipelined SAT solver.
//
// A variable is held in two bits. The four values are chosen so that merging
// the views of two pipes is a plain bitwise OR: undecided (00) OR'd with a
// value gives that value, and 0 (01) OR'd with 1 (10) gives conflicting (11).
// The two-bit code and OR merge follow the solver's description; the exact bit
// assignment, the word formats and the bus commands are this design's choice.
//
// Words move B variables at a time: a pipe word travels round a pipe's ring
// of clause modules, a merge word travels up the merge tree, and a bus word is
// broadcast from the control unit to every pipe's variable memory.
package sat_pkg;

  typedef enum logic [1:0] {
    VAL_U = 2'b00,   // undecided
    VAL_0 = 2'b01,   // assigned 0
    VAL_1 = 2'b10,   // assigned 1
    VAL_C = 2'b11    // conflicting
  } val_e;

  // Header of a word travelling round a pipe (one pass = NUM_VARS/B words).
  typedef struct packed {
    logic        valid;
    logic        first;     // word 0 of the first pass of an iteration: clause modules clear their state
    logic        last;      // last word of a pass
    logic [15:0] idx;       // word index within the set
    logic        conflict;  // some clause found all its literals false
    logic        pending;   // some clause can imply a variable that has already passed it
  } pipe_hdr_t;

  // Broadcast commands from the control unit to all variable memories.
  typedef enum logic [1:0] {
    BUS_NOP    = 2'd0,
    BUS_LOAD   = 2'd1,      // overwrite word idx with data
    BUS_MERGE  = 2'd2,      // overwrite word idx with merged data, note any change
    BUS_DECIDE = 2'd3       // set variable dvar to dval
  } bus_cmd_e;

  // One literal of a clause: the variable it names and whether it is negated.
  typedef struct packed {
    logic        en;        // slot in use
    logic        neg;       // literal is NOT var
    logic [15:0] var_idx;
  } lit_t;

  // Value a literal's variable must take for the literal to be true.
  function automatic logic [1:0] lit_true_val(input logic neg);
    return neg ? VAL_0 : VAL_1;
  endfunction

endpackage
