// sa_pkg -- types shared by the shift-and-add multiplier.
//
// sa_state_e is the state of the shift-and-add controller: IDLE waits for a
// start request (the product of the last operation stays on the outputs),
// RUN performs one add-and-shift step per clock cycle.
package sa_pkg;
  typedef enum logic {
    SA_IDLE = 1'b0,
    SA_RUN  = 1'b1
  } sa_state_e;
endpackage
