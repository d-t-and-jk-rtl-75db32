// tb_async_ff_top: end-to-end test of async_ff_top.
//
// Three activities run concurrently against the top, each with its own
// reference model:
//   * the shared pulse input of the two counters is pulsed; both counters
//     must follow the six-state flow table in lockstep and give one output
//     pulse per three input pulses (counted: count wraps);
//   * the non-clocked T flip-flop is toggled and must change once per
//     rising edge of T (counted: toggles);
//   * the clocked T and JK flip-flops receive random inputs and clock
//     pulses and must match the behaviour of a clocked T and JK flip-flop
//     at each rising clock edge (counted: T toggle and hold, JK set, reset,
//     toggle and hold).
// Every mechanism listed must have happened at least once, and a clear in
// the middle of the run must bring everything back to 0. The top runs with
// no parameter changes (it has none), so this is also the full-size test.
module tb_async_ff_top;
  import counter_pkg::*;

  logic rst;
  logic cnt_in, cnt_d_out, cnt_rs_out;
  cnt_state_e cnt_d_state, cnt_rs_state;
  logic tnc_t_n, tnc_q, tnc_q_n, tnc_y1;
  logic tc_t, tc_c_n, tc_q, tc_q_n, tc_y1;
  logic jk_j, jk_k, jk_c_n, jk_q, jk_q_n, jk_y1;

  int checks = 0, failures = 0;
  int n_wrap = 0, n_tnc_toggle = 0, n_tc_toggle = 0, n_tc_hold = 0;
  int n_jk_set = 0, n_jk_reset = 0, n_jk_toggle = 0, n_jk_hold = 0, n_clear = 0;

  async_ff_top dut (.*);

  logic [2:0]  code   [6] = '{3'b000, 3'b001, 3'b011, 3'b010, 3'b110, 3'b100};
  int unsigned next_0 [6] = '{1, 3, 3, 5, 5, 1};
  int unsigned next_1 [6] = '{2, 2, 4, 4, 6, 6};

  int unsigned st, pulses;
  logic tnc_ref, tc_ref, jk_ref;

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL at %0t: %s got %0b expected %0b", $time, what, got, exp);
    end
  endtask

  task automatic check_counters();
    checks++;
    if (cnt_d_state !== code[st-1] || cnt_rs_state !== code[st-1] ||
        cnt_d_out !== (st >= 5) || cnt_rs_out !== (st >= 5)) begin
      failures++;
      $display("FAIL at %0t: counters %b/%b expected state %0d", $time,
               cnt_d_state, cnt_rs_state, st);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    cnt_in = 1'b0; tnc_t_n = 1'b1;
    tc_t = 1'b0; tc_c_n = 1'b1;
    jk_j = 1'b0; jk_k = 1'b0; jk_c_n = 1'b1;
    #10;
    rst = 1'b0;
    st = 1; pulses = 0;
    tnc_ref = 1'b0; tc_ref = 1'b0; jk_ref = 1'b0;
    #10;
    check_counters();

    for (int i = 0; i < 400; i++) begin
      logic tj, tk, tt;
      // Mid-run clear of the whole design.
      if (i == 200) begin
        rst = 1'b1; #10; rst = 1'b0; #10;
        st = 1; pulses = 0;
        tnc_ref = 1'b0; tc_ref = 1'b0; jk_ref = 1'b0;
        n_clear++;
        check_counters();
        expect_bit(tnc_q, 1'b0, "tnc after clear");
        expect_bit(tc_q,  1'b0, "tc after clear");
        expect_bit(jk_q,  1'b0, "jk after clear");
      end

      // Phase A: clocks low, new data, pulse inputs rise.
      tt = 1'($urandom_range(0, 1));
      tj = 1'($urandom_range(0, 1));
      tk = 1'($urandom_range(0, 1));
      tc_t = tt; jk_j = tj; jk_k = tk;
      #7;
      cnt_in = 1'b1;
      tnc_t_n = 1'b0;
      #10;
      st = next_1[st-1];
      tnc_ref = ~tnc_ref;
      n_tnc_toggle++;
      check_counters();
      expect_bit(tnc_q, tnc_ref, "tnc toggle on T rising");
      expect_bit(tnc_q_n, ~tnc_ref, "tnc complement");

      // Phase B: rising clock edge of the clocked T and JK flip-flops.
      tc_c_n = 1'b0; jk_c_n = 1'b0;
      #10;
      if (tt) begin tc_ref = ~tc_ref; n_tc_toggle++; end else n_tc_hold++;
      unique case ({tj, tk})
        2'b00: n_jk_hold++;
        2'b01: begin n_jk_reset++; jk_ref = 1'b0; end
        2'b10: begin n_jk_set++;   jk_ref = 1'b1; end
        2'b11: begin n_jk_toggle++; jk_ref = ~jk_ref; end
      endcase
      expect_bit(tc_q, tc_ref, "clocked T at clock edge");
      expect_bit(jk_q, jk_ref, "JK at clock edge");
      expect_bit(tc_y1, tc_ref, "clocked T master copied");
      expect_bit(jk_y1, jk_ref, "JK master copied");

      // Phase C: inputs change while the clocks are high: nothing moves.
      tc_t = ~tc_t; jk_j = ~jk_j; jk_k = ~jk_k;
      #10;
      expect_bit(tc_q, tc_ref, "clocked T holds while C high");
      expect_bit(jk_q, jk_ref, "JK holds while C high");
      // The masters catch any 1 on T, J or K while the clock is low, so
      // these inputs return to 0 before the clock falls.
      tc_t = 1'b0; jk_j = 1'b0; jk_k = 1'b0;
      #5;

      // Phase D: clocks and pulse inputs fall.
      tc_c_n = 1'b1; jk_c_n = 1'b1;
      cnt_in = 1'b0;
      tnc_t_n = 1'b1;
      #10;
      st = next_0[st-1];
      pulses++;
      check_counters();
      expect_bit(cnt_d_out, pulses % 3 == 2, "counter output against pulse count");
      expect_bit(tnc_q, tnc_ref, "tnc holds on T falling");
      expect_bit(tc_q, tc_ref, "clocked T holds on C falling");
      expect_bit(jk_q, jk_ref, "JK holds on C falling");
      if (pulses % 3 == 0) n_wrap++;
    end

    if (n_wrap == 0)       begin failures++; $display("FAIL: counter never wrapped"); end
    if (n_tnc_toggle == 0) begin failures++; $display("FAIL: T never toggled"); end
    if (n_tc_toggle == 0 || n_tc_hold == 0) begin failures++; $display("FAIL: clocked T toggle/hold missing"); end
    if (n_jk_set == 0 || n_jk_reset == 0 || n_jk_toggle == 0 || n_jk_hold == 0)
      begin failures++; $display("FAIL: a JK case is missing"); end
    if (n_clear == 0)      begin failures++; $display("FAIL: clear never applied"); end
    $display("counter wraps=%0d, T toggles=%0d, clocked T toggle/hold=%0d/%0d, JK set/reset/toggle/hold=%0d/%0d/%0d/%0d, clears=%0d",
             n_wrap, n_tnc_toggle, n_tc_toggle, n_tc_hold, n_jk_set, n_jk_reset, n_jk_toggle, n_jk_hold, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
