// tb_counter_rs: self-checking test of the count-to-three counter
// (counter_rs).
//
// The reference is the counter's six-state flow table: states 1..6 with
// their {q1,q2,q3} codes, the next state for input 0 and 1, and the output.
// The input is pulsed many times, with random high and low times and an
// occasional clear; after every input edge the circuit's state and output
// are compared with the table. The test also checks the timing the counter
// exists for: the output rises when the input falls after the second pulse
// and falls when it falls after the third, so every third pulse produces
// one output pulse.
module tb_counter_rs;
  import counter_pkg::*;

  logic       rst, in, out;
  cnt_state_e state;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_clear = 0;

  counter_rs dut (.rst(rst), .in(in), .out(out), .state(state));

  // Flow table, rows = states 1..6
  logic [2:0]  code   [6] = '{3'b000, 3'b001, 3'b011, 3'b010, 3'b110, 3'b100};
  int unsigned next_0 [6] = '{1, 3, 3, 5, 5, 1};
  int unsigned next_1 [6] = '{2, 2, 4, 4, 6, 6};
  logic        outp   [6] = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1};

  int unsigned st;
  int unsigned pulses;   // input pulses since the last clear

  task automatic check(input string what);
    checks++;
    if (state !== code[st-1] || out !== outp[st-1]) begin
      failures++;
      $display("FAIL %s: in=%0b got state=%b out=%0b expected state %0d (%b) out=%0b",
               what, in, state, out, st, code[st-1], outp[st-1]);
    end
  endtask

  task automatic wait_random();
    #($urandom_range(5, 40));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_out;
    rst = 1'b1; in = 1'b0;
    #10;
    rst = 1'b0;
    st = 1; pulses = 0;
    #10;
    check("after clear");
    for (int i = 0; i < 300; i++) begin
      if (i % 97 == 96) begin
        rst = 1'b1; #10; rst = 1'b0;
        st = 1; pulses = 0; n_clear++;
        #10;
        check("clear");
      end
      in = 1'b1;
      wait_random();
      st = next_1[st-1];
      check("in rose");
      prev_out = out;
      in = 1'b0;
      wait_random();
      st = next_0[st-1];
      pulses++;
      check("in fell");
      // Output against the pulse count: high after pulse 2 (mod 3) only.
      checks++;
      if (out !== (pulses % 3 == 2)) begin
        failures++;
        $display("FAIL: after %0d pulses out=%0b", pulses, out);
      end
      if (prev_out && !out) n_wrap++;
    end
    if (n_wrap < 90 || n_clear == 0) begin
      failures++;
      $display("FAIL: %0d output pulses completed, %0d clears", n_wrap, n_clear);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
