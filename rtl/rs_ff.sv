// rs_ff: level-sensitive set/reset flip-flop, the feedback element of every
// circuit in this design.
//
// The state follows the characteristic equation Q = S + !R.q: S forces the
// state to 1, R forces it to 0, and with both low the state is held. The
// circuits that use this flip-flop are designed so that S and R are never
// high together (the constraint S.R = 0); should it happen anyway, S wins, as
// the equation says. There is no clock: the flip-flop reacts to its inputs as
// soon as they change, so it is a transparent latch and synthesizes to one.
//
// An assertion reports any violation of S.R = 0 in simulation.
//
// Interface: s, r (active high), rst (asynchronous clear, dominant over s and
// r), q and its complement q_n.
//
// The characteristic equation and the S.R = 0 rule are the document's. The
// clear input is this design's addition: the source circuits have no reset,
// and a known starting state is needed both in silicon and in simulation.
// The tools report a latch here; that is the intended circuit.
module rs_ff (
  input  logic rst,
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n
);

  always_latch begin
    if (rst)
      q = 1'b0;
    else if (s || r)
      q = s;
  end

  assign q_n = ~q;

  // The usage rule of the flip-flop: set and reset are never requested
  // together. Deferred, so that it judges settled values only.
  always_comb begin
    a_set_reset_exclusive: assert final (rst || !(s && r))
      else $error("rs_ff: S and R high together");
  end

endmodule
