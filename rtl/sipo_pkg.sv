// Shared types of the digit-level serial-in parallel-out (SIPO) multipliers.
// Both multipliers run the same three-state sequence: IDLE until an operand B is
// loaded, RUN while operand A arrives one digit per accepted cycle, DONE once every
// digit has been accumulated and the parallel product is on the output.
package sipo_pkg;
  typedef enum logic [1:0] {
    SIPO_IDLE = 2'd0,
    SIPO_RUN  = 2'd1,
    SIPO_DONE = 2'd2
  } sipo_state_e;
endpackage
