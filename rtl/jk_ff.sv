// jk_ff: clocked master-slave JK flip-flop.
//
// Two rs_ff latches. While the clock C is low the master (q1) is set by
// J.!C.!q2 and reset by K.!C.q2, that is J can only set it while the output
// is 0 and K can only clear it while the output is 1. While C is high the
// slave (q2) copies the master: set by C.q1, reset by C.!q1. Next-state
// equations: Q1 = q1.!q2 + C.q1 + q1.!K + !C.J.!q2 and Q2 = !C.q2 + C.q1.
// At a rising edge of C the output is thus set (J), cleared (K), toggled
// (J and K) or held (neither), according to J and K while C was low.
//
// Interface: j, k, c_n (clock, active low as drawn: C = !c_n), rst (clears
// both latches), q / q_n (slave) and y1 (master).
//
// Structure and equations are the document's; the clear input and the
// master output are this design's choices. The latches and the loops
// through them are intended.
module jk_ff (
  input  logic rst,
  input  logic j,
  input  logic k,
  input  logic c_n,
  output logic q,
  output logic q_n,
  output logic y1
);

  logic c;
  logic s1, r1, s2, r2;
  logic y1_n;

  assign c  = ~c_n;
  assign s1 = j & c_n & q_n;
  assign r1 = k & c_n & q;
  assign s2 = y1 & c;
  assign r2 = y1_n & c;

  rs_ff u_master (.rst(rst), .s(s1), .r(r1), .q(y1), .q_n(y1_n));
  rs_ff u_slave  (.rst(rst), .s(s2), .r(r2), .q(q),  .q_n(q_n));

endmodule
