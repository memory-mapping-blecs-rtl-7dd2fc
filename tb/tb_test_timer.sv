// tb_test_timer: with intervals of 5 and 8 seconds and a one-second tick
// every 4 cycles, checks the two countdowns, the request flags, the pending
// flag and the seconds-since-test counter against a reference model, through
// both requests and a test completion that reloads the counters.
module tb_test_timer;
  localparam int unsigned N = 5, C = 8;
  logic clk = 0, rst_n = 0;
  logic sec_tick = 0, test_done = 0;
  logic [31:0] remain_normal, remain_critical, since_test;
  logic req_normal, req_priority, pending;
  int checks = 0, failures = 0;
  int rn = N, rc = C, rs = 0;
  int seen_n = 0, seen_p = 0;

  test_timer #(.NORMAL_TEST_S(N), .CRITICAL_TEST_S(C)) dut (.*);

  always #5 clk = ~clk;

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
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(negedge clk);
      sec_tick  = (cyc % 4 == 3);
      test_done = (cyc == 60) || (cyc == 150);
      @(posedge clk);
      if (test_done) begin rn = N; rc = C; rs = 0; end
      else if (sec_tick) begin
        if (rn > 0) rn--;
        if (rc > 0) rc--;
        rs++;
      end
      #1;
      checks++;
      if (remain_normal != 32'(rn) || remain_critical != 32'(rc) || since_test != 32'(rs) ||
          req_normal != (rn == 0) || req_priority != (rc == 0) || pending != (rn == 0 || rc == 0)) begin
        failures++;
        $display("FAIL cycle %0d: n %0d/%0d c %0d/%0d s %0d/%0d", cyc,
                 remain_normal, rn, remain_critical, rc, since_test, rs);
      end
      if (req_normal) seen_n++;
      if (req_priority) seen_p++;
    end
    checks++;
    if (seen_n == 0 || seen_p == 0) begin failures++; $display("FAIL: a request never rose"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
