// tb_time_base: with a 10-cycle "second", checks that the tick comes exactly
// every CLK_HZ cycles, lasts one cycle, and that the seconds counter follows.
module tb_time_base;
  localparam int unsigned HZ = 10;
  logic clk = 0, rst_n = 0;
  logic sec_tick;
  logic [31:0] seconds;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, ticks = 0;

  time_base #(.CLK_HZ(HZ)) dut (.clk, .rst_n, .sec_tick, .seconds);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);            // first cycle out of reset: prescaler at 0
    check(seconds == 0, "seconds zero after reset");
    for (cyc = 1; cyc <= 10 * HZ; cyc++) begin
      @(negedge clk);
      if (sec_tick) begin
        ticks++;
        check((cyc + 1) % HZ == 0, "first tick CLK_HZ cycles after reset release");
        if (last_tick >= 0) check(cyc - last_tick == HZ, "tick period");
        last_tick = cyc;
        check(seconds == 32'(ticks - 1), "seconds before tick edge");
      end else begin
        check(seconds == 32'(ticks), "seconds between ticks");
      end
      @(posedge clk);
    end
    check(ticks == 10, "ten ticks in ten seconds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
