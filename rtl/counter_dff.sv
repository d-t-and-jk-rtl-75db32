// counter_dff: asynchronous counter that counts three input pulses, built
// from one transition D flip-flop and one RS flip-flop.
//
// The counter has no clock. Its six stable states (see counter_pkg) are held
// on three state variables: q1 and q2 live in a d_ff, q1 being its slave
// (output) and q2 its master, and q3 lives in an rs_ff. The inputs of the
// flip-flops are:
//   C  = !in.!q3             (the D flip-flop's clock, applied as c_n = !C)
//   D  = !in + !q1.q2
//   S3 = in.!q1.!q2,  R3 = in.q2
// The output out = q1 rises when the input falls after the second pulse and
// falls when it falls after the third, after which the count starts over.
//
// This works only because the state assignment meets the D flip-flop's
// constraints: its slave must go to 0 whenever master and slave are both 0
// and to 1 whenever both are 1, which this state table satisfies with
// q1 = slave and q2 = master.
//
// Interface: in (the pulse input), rst (asynchronous clear to state 1),
// out, and state ({q1,q2,q3}, for observation).
// Timing: fundamental mode. The input may change again only after the
// circuit has settled; each input edge moves the state by exactly one step.
//
// The state table, the flip-flop choice, C, S3 and R3 are the document's.
// The D equation has the extra factor !q1 on q2: without it the state after
// the second pulse (110) never leaves when the third pulse arrives, against
// the state table. The clear input is this design's addition. The latches
// and the loops through them are intended.
module counter_dff
  import counter_pkg::*;
(
  input  logic       rst,
  input  logic       in,
  output logic       out,
  output cnt_state_e state
);

  logic q1, q2, q3;
  logic c_n, d, s3, r3;

  assign c_n = in | q3;
  assign d   = ~in | (~q1 & q2);
  assign s3  = in & ~q1 & ~q2;
  assign r3  = in & q2;

  d_ff  u_dff (.rst(rst), .d(d), .c_n(c_n), .q(q1), .q_n(), .y1(q2));
  rs_ff u_rs3 (.rst(rst), .s(s3), .r(r3), .q(q3), .q_n());

  assign out   = q1;
  assign state = cnt_state_e'({q1, q2, q3});

endmodule
