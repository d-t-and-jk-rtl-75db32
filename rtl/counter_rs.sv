// counter_rs: asynchronous counter that counts three input pulses, built
// from three RS flip-flops.
//
// Each state variable of the six-state table (see counter_pkg) is held in an
// rs_ff whose set and reset inputs are read off the state table with the RS
// characteristic equation Q = S + !R.q under the rule S.R = 0:
//   S1 = !in.q2.!q3,  R1 = !in.!q2
//   S2 = !in.q3,      R2 = in.q1
//   S3 = in.!q1.!q2,  R3 = in.q2
// The output out = q1 is high from the fall of the input after the second
// pulse to its fall after the third.
//
// Interface: in, rst (asynchronous clear to state 1), out, and state
// ({q1,q2,q3}). Timing: fundamental mode, as for counter_dff.
//
// The state table and the equations for q1 and q3 are the document's; the
// set and reset equations of q2 were derived here by the same method. The
// clear input is this design's addition. The latches and the loops through
// them are intended.
module counter_rs
  import counter_pkg::*;
(
  input  logic       rst,
  input  logic       in,
  output logic       out,
  output cnt_state_e state
);

  logic q1, q2, q3;
  logic s1, r1, s2, r2, s3, r3;

  assign s1 = ~in & q2 & ~q3;
  assign r1 = ~in & ~q2;
  assign s2 = ~in & q3;
  assign r2 = in & q1;
  assign s3 = in & ~q1 & ~q2;
  assign r3 = in & q2;

  rs_ff u_rs1 (.rst(rst), .s(s1), .r(r1), .q(q1), .q_n());
  rs_ff u_rs2 (.rst(rst), .s(s2), .r(r2), .q(q2), .q_n());
  rs_ff u_rs3 (.rst(rst), .s(s3), .r(r3), .q(q3), .q_n());

  assign out   = q1;
  assign state = cnt_state_e'({q1, q2, q3});

endmodule
