// async_ff_top: the asynchronous circuits of this design side by side.
//
// Two realizations of the same count-to-three counter (counter_dff, with a
// transition D flip-flop and an RS flip-flop, and counter_rs, with three RS
// flip-flops) run from one pulse input, so that their outputs and states can
// be compared directly. Next to them stand the three other transition
// flip-flops (non-clocked T, clocked T and JK), each with its own inputs and
// outputs (including the master state y1, for observation); they are separate building blocks and are not wired to the
// counters. A single asynchronous clear, rst, resets everything.
//
// All ports are plain signals. There is no clock; every block is a
// fundamental-mode circuit (inputs change only after it has settled).
// The grouping is this design's choice.
module async_ff_top
  import counter_pkg::*;
(
  input  logic       rst,
  // counters
  input  logic       cnt_in,
  output logic       cnt_d_out,
  output cnt_state_e cnt_d_state,
  output logic       cnt_rs_out,
  output cnt_state_e cnt_rs_state,
  // non-clocked T flip-flop
  input  logic       tnc_t_n,
  output logic       tnc_q,
  output logic       tnc_q_n,
  output logic       tnc_y1,
  // clocked T flip-flop
  input  logic       tc_t,
  input  logic       tc_c_n,
  output logic       tc_q,
  output logic       tc_q_n,
  output logic       tc_y1,
  // JK flip-flop
  input  logic       jk_j,
  input  logic       jk_k,
  input  logic       jk_c_n,
  output logic       jk_q,
  output logic       jk_q_n,
  output logic       jk_y1
);

  counter_dff u_cnt_d  (.rst(rst), .in(cnt_in), .out(cnt_d_out),  .state(cnt_d_state));
  counter_rs  u_cnt_rs (.rst(rst), .in(cnt_in), .out(cnt_rs_out), .state(cnt_rs_state));

  t_ff_nc  u_tnc (.rst(rst), .t_n(tnc_t_n), .q(tnc_q), .q_n(tnc_q_n), .y1(tnc_y1));
  t_ff_clk u_tc  (.rst(rst), .t(tc_t), .c_n(tc_c_n), .q(tc_q), .q_n(tc_q_n), .y1(tc_y1));
  jk_ff    u_jk  (.rst(rst), .j(jk_j), .k(jk_k), .c_n(jk_c_n), .q(jk_q), .q_n(jk_q_n), .y1(jk_y1));

endmodule
