// t_ff_nc: non-clocked toggle flip-flop.
//
// Two rs_ff latches. While T is low the master (y1) loads the complement of
// the slave: it is set by !T.!y2 and reset by !T.y2. While T is high the
// slave (y2) copies the master: set by T.y1, reset by T.!y1. This is a D
// flip-flop whose clock is T and whose D input is its own inverted output,
// with next-state equations Y1 = !T.!y2 + T.y1 and Y2 = !T.y2 + T.y1. The
// output y2 therefore changes once for every rising edge of T.
//
// Interface: t_n (the toggle input, active low, as drawn at the circuit's
// input: T = !t_n), rst (clears both latches), q / q_n (slave, y2) and y1
// (master).
//
// Structure and equations are the document's; the clear input and the
// master output are this design's choices. The latches and the loops
// through them are intended.
module t_ff_nc (
  input  logic rst,
  input  logic t_n,
  output logic q,
  output logic q_n,
  output logic y1
);

  logic t;
  logic s1, r1, s2, r2;
  logic y1_n;

  assign t  = ~t_n;
  assign s1 = t_n & q_n;
  assign r1 = t_n & q;
  assign s2 = y1 & t;
  assign r2 = y1_n & t;

  rs_ff u_master (.rst(rst), .s(s1), .r(r1), .q(y1), .q_n(y1_n));
  rs_ff u_slave  (.rst(rst), .s(s2), .r(r2), .q(q),  .q_n(q_n));

endmodule
