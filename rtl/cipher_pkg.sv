// cipher_pkg: types shared by the stream-cipher cores.
//
// Every core in this library runs the same life cycle: it is loaded with a
// key and an IV, clocks its state a fixed number of rounds with the output fed
// back (key initialization, no keystream leaves the core), and then produces
// keystream on request. The phase enum below names those states; the Grain-128a
// controller adds phases for its optional authentication.
package cipher_pkg;

  // Life cycle of a keystream core.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,   // no key loaded
    PH_INIT = 2'd1,   // key initialization rounds, output fed back
    PH_RUN  = 2'd2,   // keystream generation
    PH_DONE = 2'd3    // keystream exhausted (Trivium length limit)
  } phase_e;

  // Phases of the Grain-128a controller.
  typedef enum logic [2:0] {
    A_IDLE    = 3'd0,  // no key loaded
    A_INIT    = 3'd1,  // pre-output generator runs its 256 initialization rounds
    A_PREAUTH = 3'd2,  // first 64 pre-output bits fill accumulator and shift register
    A_RUN     = 3'd3,  // keystream: plain mode, or first half of a word in MAC mode
    A_RUN_HI  = 3'd4,  // MAC mode: second half of the pre-output, message accepted here
    A_TAG     = 3'd5   // MAC mode: tag computed, stream closed
  } a_phase_e;

endpackage
