// d_ff: transition (master-slave) D flip-flop for asynchronous design.
//
// Two rs_ff latches in series. While the clock C is low the master (y1)
// follows D: it is set by D.!C and reset by !D.!C. While C is high the slave
// (y2) copies the master: it is set by y1.C and reset by !y1.C. Together this
// gives the next-state equations Y1 = !C.D + C.y1 and Y2 = !C.y2 + C.y1, so
// the output changes only when C rises, to the value D had just before.
//
// Interface: d, c_n (the clock, active low, as it is drawn at the input of
// the circuit: C = !c_n), rst (clears both latches), q / q_n (slave) and
// y1 (the master state). The master state is brought out on purpose: the
// asynchronous counter built from this flip-flop uses it as a state variable.
//
// Timing: no clock edge in the synchronous sense; D must be stable while C
// rises (a change of D while C is low simply re-steers the master).
//
// Structure and equations are the document's; the clear input and the
// exposed master output are this design's choices. The latches and the
// loops through them are intended.
module d_ff (
  input  logic rst,
  input  logic d,
  input  logic c_n,
  output logic q,
  output logic q_n,
  output logic y1
);

  logic c;
  logic s1, r1, s2, r2;
  logic y1_n;

  assign c  = ~c_n;
  assign s1 = d & c_n;
  assign r1 = ~d & c_n;
  assign s2 = y1 & c;
  assign r2 = y1_n & c;

  rs_ff u_master (.rst(rst), .s(s1), .r(r1), .q(y1), .q_n(y1_n));
  rs_ff u_slave  (.rst(rst), .s(s2), .r(r2), .q(q),  .q_n(q_n));

endmodule
