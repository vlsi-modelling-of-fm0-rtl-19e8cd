// encoder_pkg: types shared by the FM0/Manchester line encoders.
//
// mode_e is the Mode input of every encoder. Its values follow the mux
// input numbering of the circuit: input 0 of the mode multiplexer carries
// the FM0 path and input 1 the Manchester path.
package encoder_pkg;

  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic {
    MODE_FM0        = 1'b0,  // bi-phase space code
    MODE_MANCHESTER = 1'b1   // X xor CLK
  } mode_e;

endpackage
