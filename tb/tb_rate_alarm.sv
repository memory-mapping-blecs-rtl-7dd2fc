// tb_rate_alarm: drives error patterns through one-second windows (20 cycles
// here) and compares the alarm, cycle by cycle, with a reference that counts
// the errors of the current window and applies the "more than 5 per second"
// rule with its hold until a quiet window.
module tb_rate_alarm;
  localparam int unsigned WIN = 20;
  logic clk = 0, rst_n = 0;
  logic sec_tick = 0, event_i = 0;
  logic alarm;
  int checks = 0, failures = 0;
  int cnt = 0;
  bit ref_alarm = 0;
  int n_raised = 0, n_cleared = 0;

  rate_alarm #(.LIMIT(5)) dut (.clk, .rst_n, .sec_tick, .event_i, .alarm);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // errors per window: below, at, above, far above the limit, then quiet
  int unsigned per_win [10] = '{0, 3, 5, 6, 0, 10, 7, 2, 5, 0};

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    foreach (per_win[w]) begin
      for (int c = 0; c < int'(WIN); c++) begin
        @(negedge clk);
        sec_tick = (c == int'(WIN) - 1);
        event_i  = (c < int'(per_win[w]) * 2) && (c % 2 == 0) && !sec_tick;
        @(posedge clk);
        // reference model
        if (sec_tick) begin
          ref_alarm = (cnt > 5);
          cnt = 0;
        end else begin
          if (event_i) cnt++;
          if (cnt > 5) ref_alarm = 1;
        end
        #1;
        checks++;
        if (alarm !== ref_alarm) begin
          failures++;
          $display("FAIL window %0d cycle %0d: alarm %0b expected %0b", w, c, alarm, ref_alarm);
        end
      end
    end
    // the sequence must both raise and clear the alarm
    checks++;
    if (!(per_win[3] > 5 && per_win[4] == 0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
