// t_ff_clk: clocked toggle flip-flop.
//
// Two rs_ff latches. While the clock C is low and T is high the master (q1)
// loads the complement of the slave: set by T.!C.!q2, reset by T.!C.q2.
// While C is high the slave (q2) copies the master: set by C.q1, reset by
// C.!q1. Next-state equations: Q1 = !C.T.!q2 + C.q1 + !T.q1 (+ q1.!q2 as a
// hazard cover) and Q2 = !C.q2 + C.q1. The output toggles at a rising edge
// of C when T was high while C was low, and holds otherwise.
//
// Interface: t, c_n (clock, active low as drawn: C = !c_n), rst (clears both
// latches), q / q_n (slave) and y1 (master).
//
// Structure and equations are the document's; the clear input and the
// master output are this design's choices. The latches and the loops
// through them are intended.
module t_ff_clk (
  input  logic rst,
  input  logic t,
  input  logic c_n,
  output logic q,
  output logic q_n,
  output logic y1
);

  logic c;
  logic s1, r1, s2, r2;
  logic y1_n;

  assign c  = ~c_n;
  assign s1 = t & c_n & q_n;
  assign r1 = t & c_n & q;
  assign s2 = y1 & c;
  assign r2 = y1_n & c;

  rs_ff u_master (.rst(rst), .s(s1), .r(r1), .q(y1), .q_n(y1_n));
  rs_ff u_slave  (.rst(rst), .s(s2), .r(r2), .q(q),  .q_n(q_n));

endmodule
