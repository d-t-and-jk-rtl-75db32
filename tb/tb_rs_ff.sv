// tb_rs_ff: self-checking test of the RS flip-flop.
//
// Drives random set/reset/hold patterns (never S and R together, the
// flip-flop's usage rule) and random clears, and after each change compares
// q and q_n with the characteristic map: 00 holds, 10 sets, 01 resets.
module tb_rs_ff;

  logic rst, s, r, q, q_n;
  int   checks = 0, failures = 0;
  int unsigned pick;
  int   n_set = 0, n_reset = 0, n_hold = 0;
  logic expected;

  rs_ff dut (.rst(rst), .s(s), .r(r), .q(q), .q_n(q_n));

  task automatic check(input string what);
    checks++;
    if (q !== expected || q_n !== ~expected) begin
      failures++;
      $display("FAIL %s: s=%0b r=%0b q=%0b q_n=%0b expected %0b", what, s, r, q, q_n, expected);
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
    rst = 1'b1; s = 1'b0; r = 1'b0;
    #10;
    expected = 1'b0;
    check("clear");
    rst = 1'b0;
    #10;
    check("hold after clear");
    for (int i = 0; i < 400; i++) begin
      pick = $urandom_range(0, 9);
      unique case (pick)
        0:          begin rst = 1'b1; s = 1'b0; r = 1'b0; expected = 1'b0; end
        1, 2, 3:    begin rst = 1'b0; s = 1'b1; r = 1'b0; expected = 1'b1; n_set++; end
        4, 5, 6:    begin rst = 1'b0; s = 1'b0; r = 1'b1; expected = 1'b0; n_reset++; end
        default:    begin rst = 1'b0; s = 1'b0; r = 1'b0; n_hold++; end
      endcase
      #10;
      check("step");
    end
    if (n_set == 0 || n_reset == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL: a set, reset or hold case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
