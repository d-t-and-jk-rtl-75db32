// tb_t_ff_nc: self-checking test of the non-clocked T flip-flop.
//
// The reference is the flip-flop's next-state map over {y1, y2} and T.
// After every change of T the map is followed to a stable state and the
// circuit's master and slave are compared with it; the test also checks
// that the output toggles exactly once per rising edge of T.
module tb_t_ff_nc;

  logic rst, t_n, q, q_n, y1;
  int   checks = 0, failures = 0;
  int   n_toggle = 0;

  t_ff_nc dut (.rst(rst), .t_n(t_n), .q(q), .q_n(q_n), .y1(y1));

  // next_map[{y1,y2}][T] = next {y1,y2}
  logic [1:0] next_map [4][2] = '{
    '{2'b10, 2'b00},   // 00
    '{2'b01, 2'b00},   // 01
    '{2'b10, 2'b11},   // 10
    '{2'b01, 2'b11}    // 11
  };
  logic [1:0] st;

  task automatic check(input string what);
    checks++;
    if ({y1, q} !== st || q_n !== ~q) begin
      failures++;
      $display("FAIL %s: T=%0b got %0b%0b expected %b", what, ~t_n, y1, q, st);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_q;
    rst = 1'b1; t_n = 1'b1;
    #10;
    rst = 1'b0;
    st = 2'b00;
    for (int k = 0; k < 4; k++) st = next_map[st][1'b0];
    #10;
    check("after clear");
    for (int i = 0; i < 200; i++) begin
      prev_q = q;
      t_n = ~t_n;
      #10;
      for (int k = 0; k < 4; k++) st = next_map[st][~t_n];
      check("step");
      checks++;
      if (!t_n) begin
        if (q !== ~prev_q) begin failures++; $display("FAIL: no toggle on T rising"); end
        else n_toggle++;
      end else if (q !== prev_q) begin
        failures++; $display("FAIL: output moved on T falling");
      end
    end
    if (n_toggle != 100) begin
      failures++;
      $display("FAIL: %0d toggles, expected 100", n_toggle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
