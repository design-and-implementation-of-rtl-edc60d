// rb_pkg: types shared by the redundant-basis (RB) GF(2^m) multipliers.
// The only shared type is the state of the digit-serial multiplier's sequencer:
//   RB_IDLE  waiting for start; the last product stays on the output
//   RB_RUN   the P + Q clock cycles in which the digits stream through the PPGU chain
//   RB_DONE  one cycle in which done is high and the product is valid
package rb_pkg;
  typedef enum logic [1:0] {
    RB_IDLE = 2'd0,
    RB_RUN  = 2'd1,
    RB_DONE = 2'd2
  } rb_state_e;
endpackage
