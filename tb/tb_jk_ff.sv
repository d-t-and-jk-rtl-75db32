// tb_jk_ff: self-checking test of the clocked JK flip-flop.
//
// The reference is the next-state map over {q1, q2} and C, J, K: while C is
// low the master may be set by J only when the slave is 0 and cleared by K
// only when the slave is 1, otherwise it holds; while C is high the slave
// copies the master. Random single-input changes are applied and the
// circuit's master and slave are compared with the map after each. Set,
// reset, toggle and hold at the clock's rising edge must all occur.
module tb_jk_ff;

  logic rst, j, k, c_n, q, q_n, y1;
  int   checks = 0, failures = 0;
  int unsigned pick;
  int   n_set = 0, n_reset = 0, n_toggle = 0, n_hold = 0;

  jk_ff dut (.rst(rst), .j(j), .k(k), .c_n(c_n), .q(q), .q_n(q_n), .y1(y1));

  // C low: next0[{q1,q2}][{J,K}] = next {q1,q2}
  logic [1:0] next0 [4][4] = '{
    '{2'b00, 2'b00, 2'b10, 2'b10},   // 00: JK = 00, 01, 10, 11
    '{2'b01, 2'b01, 2'b01, 2'b01},   // 01
    '{2'b10, 2'b10, 2'b10, 2'b10},   // 10
    '{2'b11, 2'b01, 2'b11, 2'b01}    // 11
  };
  // C high: next1[{q1,q2}] = next {q1,q2}
  logic [1:0] next1 [4] = '{2'b00, 2'b00, 2'b11, 2'b11};
  logic [1:0] st;

  task automatic check(input string what);
    checks++;
    if ({y1, q} !== st || q_n !== ~q) begin
      failures++;
      $display("FAIL %s: C=%0b J=%0b K=%0b got %0b%0b expected %b", what, ~c_n, j, k, y1, q, st);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_q;
    logic jl, kl;   // J and K seen while C was last low
    rst = 1'b1; j = 1'b0; k = 1'b0; c_n = 1'b1;
    #10;
    rst = 1'b0;
    st = 2'b00;
    #10;
    check("after clear");
    jl = 1'b0; kl = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      prev_q = q;
      pick = $urandom_range(0, 2);
      unique case (pick)
        0: j = ~j;
        1: k = ~k;
        default: c_n = ~c_n;
      endcase
      #10;
      for (int n = 0; n < 4; n++) st = c_n ? next0[st][{j, k}] : next1[st];
      check("step");
      if (c_n) begin jl = j; kl = k; end
      if (!c_n && prev_q !== q) begin
        if (jl && kl) n_toggle++;
        else if (jl) n_set++;
        else if (kl) n_reset++;
      end
      if (!c_n && prev_q === q && !jl && !kl) n_hold++;
    end
    if (n_set == 0 || n_reset == 0 || n_toggle == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL: set=%0d reset=%0d toggle=%0d hold=%0d, each must occur",
               n_set, n_reset, n_toggle, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
