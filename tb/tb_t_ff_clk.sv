// tb_t_ff_clk: self-checking test of the clocked T flip-flop.
//
// The reference is the flip-flop's next-state map over {q1, q2} and the
// inputs C, T. Random single-input changes (fundamental mode) are applied;
// after each the map is followed to a stable state and compared with the
// circuit's master and slave. Toggle and hold at the clock's rising edge
// must both occur.
module tb_t_ff_clk;

  logic rst, t, c_n, q, q_n, y1;
  int   checks = 0, failures = 0;
  int   n_toggle = 0, n_hold = 0;

  t_ff_clk dut (.rst(rst), .t(t), .c_n(c_n), .q(q), .q_n(q_n), .y1(y1));

  // next_map[{q1,q2}][{C,T}] = next {q1,q2}
  logic [1:0] next_map [4][4] = '{
    '{2'b00, 2'b10, 2'b00, 2'b00},   // 00
    '{2'b01, 2'b01, 2'b00, 2'b00},   // 01
    '{2'b10, 2'b10, 2'b11, 2'b11},   // 10
    '{2'b11, 2'b01, 2'b11, 2'b11}    // 11
  };
  logic [1:0] st;

  task automatic check(input string what);
    checks++;
    if ({y1, q} !== st || q_n !== ~q) begin
      failures++;
      $display("FAIL %s: C=%0b T=%0b got %0b%0b expected %b", what, ~c_n, t, y1, q, st);
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
    rst = 1'b1; t = 1'b0; c_n = 1'b1;
    #10;
    rst = 1'b0;
    st = 2'b00;
    #10;
    check("after clear");
    for (int i = 0; i < 600; i++) begin
      prev_q = q;
      if ($urandom_range(0, 1) == 0) t = ~t; else c_n = ~c_n;
      #10;
      for (int k = 0; k < 4; k++) st = next_map[st][{~c_n, t}];
      check("step");
      if (!c_n && prev_q !== q) n_toggle++;
      if (!c_n && prev_q === q) n_hold++;
    end
    if (n_toggle == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL: toggle or hold never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
