// counter_pkg: state assignment of the asynchronous count-to-three counter.
//
// The counter has six stable states, two per input pulse. They are encoded
// on the state variables {q1, q2, q3} so that every transition changes one
// variable only, which keeps the asynchronous realizations free of races.
// The output of the counter is q1: it is high in states 5 and 6. The
// encoding is the document's.
package counter_pkg;

  typedef enum logic [2:0] {
    ST1 = 3'b000,   // in low,  waiting for the first pulse
    ST2 = 3'b001,   // in high, first pulse
    ST3 = 3'b011,   // in low,  after the first pulse
    ST4 = 3'b010,   // in high, second pulse
    ST5 = 3'b110,   // in low,  after the second pulse, out high
    ST6 = 3'b100    // in high, third pulse, out high
  } cnt_state_e;

endpackage
