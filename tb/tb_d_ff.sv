// tb_d_ff: self-checking test of the transition D flip-flop.
//
// The reference is the flip-flop's four-state flow table, written here as a
// table of next states for each total state (state, C, D), with states
// 1..4 encoded on {master, slave} as 00, 01, 11, 10. After every single
// input change (fundamental mode) the table is followed until it reaches a
// stable state, and the circuit's master and slave are compared with it.
// It also checks that the output moves only while C is high.
module tb_d_ff;

  logic rst, d, c_n, q, q_n, y1;
  int   checks = 0, failures = 0;
  int   n_load = 0, n_transfer = 0;

  d_ff dut (.rst(rst), .d(d), .c_n(c_n), .q(q), .q_n(q_n), .y1(y1));

  // Flow table: next[state-1][{C,D}] is the next state (1..4).
  int unsigned next_tbl [4][4] = '{
    '{1, 4, 1, 1},   // state 1: CD = 00, 01, 10, 11
    '{2, 3, 1, 1},   // state 2
    '{2, 3, 3, 3},   // state 3
    '{1, 4, 3, 3}    // state 4
  };
  logic [1:0] enc [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  int unsigned st;

  function automatic int unsigned settle(int unsigned s0, logic cc, logic dd);
    int unsigned s = s0;
    for (int k = 0; k < 4; k++) s = next_tbl[s-1][{cc, dd}];
    return s;
  endfunction

  task automatic check(input string what);
    checks++;
    if ({y1, q} !== enc[st-1] || q_n !== ~q) begin
      failures++;
      $display("FAIL %s: C=%0b D=%0b got y1,q=%0b%0b expected state %0d (%b)",
               what, ~c_n, d, y1, q, st, enc[st-1]);
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
    logic prev_q, prev_y1;
    rst = 1'b1; d = 1'b0; c_n = 1'b1;
    #10;
    rst = 1'b0;
    st = 1;
    #10;
    check("after clear");
    for (int i = 0; i < 600; i++) begin
      prev_q = q; prev_y1 = y1;
      if ($urandom_range(0, 1) == 0) d = ~d; else c_n = ~c_n;
      #10;
      st = settle(st, ~c_n, d);
      check("step");
      if (c_n && q !== prev_q) begin
        checks++; failures++;
        $display("FAIL: output moved while C was low");
      end
      if (c_n && y1 !== prev_y1) n_load++;
      if (!c_n && q !== prev_q) n_transfer++;
    end
    if (n_load == 0 || n_transfer == 0) begin
      failures++;
      $display("FAIL: master load or slave transfer never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
