// tb_login_regs: drives random monitored signals and known numbers of events
// (CTRV frames, CRC errors, timeouts, dumps, supply drops, test completion),
// then reads all 28 words of the LOGIN bank and compares each with a word
// assembled in the testbench from the register map. Also checks the
// one-cycle answer, the CRC and timeout rate alarms (more than 5 per second),
// the HV alarm, the one-second timers and the pending bits.
module tb_login_regs;
  import blecs_pkg::*;
  localparam int unsigned HZ = 50;

  logic clk = 0, rst_n = 0;
  bus_req_t req = '0;
  logic [31:0] rdata;
  logic ack;
  login_in_t mon = '0;
  logic [15:0] pending = '0;
  logic sec_tick, alarm_hv, test_req_normal, test_req_priority;
  logic [1:0] alarm_low, alarm_medium;
  int checks = 0, failures = 0;

  login_regs #(.CLK_HZ(HZ), .NORMAL_TEST_S(3), .CRITICAL_TEST_S(5)) dut (.*);

  always #5 clk = ~clk;

  // reference state
  int unsigned ev [7];        // frame A, frame B, CRC A, CRC B, tmo A, tmo B, tmo energy
  int unsigned rip [5];
  int unsigned n_du = 0, n_dm = 0;
  logic [31:0] turn_last = 0;
  logic [11:0] bunch_last = 0;
  int unsigned secs = 0, secs_since_test = 0;

  always @(posedge clk) if (rst_n && sec_tick) begin secs++; secs_since_test++; end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_read(input logic [23:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: 32'h0};
    @(posedge clk); #1;
    check(ack == 1'b1, "ack one cycle after request");
    d = rdata;
    @(negedge clk);
    req.valid = 1'b0;
  endtask

  // one cycle with the given event pulses
  task automatic pulse(input logic [6:0] evv, input logic du, input logic dm);
    @(negedge clk);
    {mon.frame_a, mon.frame_b, mon.crc_err_a, mon.crc_err_b, mon.tmo_a, mon.tmo_b, mon.tmo_energy} = evv;
    mon.dump_u = du; mon.dump_m = dm;
    mon.turn_cnt = $urandom; mon.bunch_cnt = 12'($urandom);
    @(posedge clk);
    for (int i = 0; i < 7; i++) if (evv[6-i]) ev[i]++;
    if (du) n_du++;
    if (dm) n_dm++;
    if (du || dm) begin turn_last = mon.turn_cnt; bunch_last = mon.bunch_cnt; end
    @(negedge clk);
    {mon.frame_a, mon.frame_b, mon.crc_err_a, mon.crc_err_b, mon.tmo_a, mon.tmo_b, mon.tmo_energy} = '0;
    mon.dump_u = 0; mon.dump_m = 0;
  endtask

  function automatic logic [31:0] expect_word(int w);
    case (w)
      0:  return {mon.sys_status, pending, test_req_normal | test_req_priority,
                  test_req_normal, test_req_priority, 5'b0};
      3:  return {mon.active_tests, 21'b0};
      5:  return {mon.test_result[5:3], 2'b0, mon.test_result[2:0], 24'b0};
      6:  return secs;
      7:  return {mon.bp_lines, 4'b0000, 8'(n_du), 8'(n_dm)};
      8:  return turn_last;
      9:  return {20'b0, bunch_last};
      10: return {mon.energy_in, mon.energy_out, mon.energy_err, 5'b0, mon.bpl_test_act, mon.bpl_test_tc};
      11, 12, 13, 14, 15, 16, 17: return ev[w-11];
      18: return {mon.hv1_flags, 4'b0, mon.hv1_volt};
      19: return {mon.hv2_flags, 4'b0, mon.hv2_volt};
      20: return {mon.hv1_curr, mon.hv2_curr};
      21: return {3'b0, mon.vme_3v3, 3'b0, mon.vme_5v};
      22: return {3'b0, mon.ana_5v, 3'b0, mon.ana_5vref};
      23, 24, 25, 26, 27: return {mon.lv_ok[27-w], 31'(rip[w-23])};
      default: return 0;
    endcase
  endfunction

  task automatic read_all(input string tag);
    logic [31:0] d;
    for (int w = 0; w < 28; w++) begin
      if (w == 1 || w == 2 || w == 4) continue;   // timers checked separately
      bus_read(24'(4 * w), d);
      checks++;
      if (d != expect_word(w)) begin
        failures++;
        $display("FAIL %s word %0d (%06h): %h expected %h", tag, w, 24'h700000 + 4 * w, d, expect_word(w));
      end
    end
  endtask

  initial begin
    repeat (200 * HZ) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    mon.lv_ok = '1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    mon.sys_status = 8'($urandom); mon.active_tests = 11'($urandom); mon.test_result = 6'($urandom);
    mon.bp_lines = 12'($urandom); mon.energy_in = 16'($urandom); mon.energy_out = 5'($urandom);
    mon.energy_err = 1; mon.bpl_test_act = 1; mon.bpl_test_tc = 4'($urandom);
    mon.hv1_volt = 24'($urandom); mon.hv2_volt = 24'($urandom); mon.hv1_curr = 16'($urandom);
    mon.hv2_curr = 16'($urandom); mon.vme_3v3 = 13'($urandom); mon.vme_5v = 13'($urandom);
    mon.ana_5v = 13'($urandom); mon.ana_5vref = 13'($urandom);
    pending = 16'($urandom);
    read_all("idle");
    check(alarm_low == 0 && alarm_medium == 0 && alarm_hv == 0, "no alarm at rest");

    // random events, including dumps
    repeat (60) pulse(7'($urandom) & 7'b1100001, $urandom_range(4, 0) == 0, $urandom_range(4, 0) == 0);
    // supply drops: analog 5 V twice, digital 12 V once
    for (int k = 0; k < 2; k++) begin
      @(negedge clk); mon.lv_ok[4] = 0; @(negedge clk); mon.lv_ok[4] = 1; rip[0]++;
    end
    @(negedge clk); mon.lv_ok[0] = 0; rip[4]++;
    // wait for the start of a second, then 7 CRC errors on A and 7 timeouts on B
    @(posedge sec_tick);
    repeat (7) pulse(7'b0010010, 0, 0);
    check(alarm_low == 2'b10, "CRC rate alarm on A only");
    check(alarm_medium == 2'b01, "timeout rate alarm on B only");
    read_all("after events");
    // two quiet seconds clear the alarms
    repeat (2) @(posedge sec_tick);
    @(negedge clk);
    check(alarm_low == 0 && alarm_medium == 0, "rate alarms clear after a quiet second");

    // HV alarm
    mon.hv2_flags = 4'b0100; #1;
    check(alarm_hv == 1, "HV alarm on a flag");
    read_all("hv flag");

    // test timers: after reset 3 and 5 s, both requests set by now
    bus_read(24'h000004, d); check(d == 0, "normal countdown at zero");
    bus_read(24'h000008, d); check(d == 0, "critical countdown at zero");
    check(test_req_normal && test_req_priority, "both timer requests raised");
    bus_read(24'h000010, d); check(d == secs_since_test, "seconds since test");
    // a finished system test reloads both
    @(negedge clk); mon.test_done = 1; @(negedge clk); mon.test_done = 0; secs_since_test = 0;
    bus_read(24'h000004, d); check(d == 3 || d == 2, "normal countdown reloaded");
    bus_read(24'h000008, d); check(d == 5 || d == 4, "critical countdown reloaded");
    check(!test_req_normal && !test_req_priority, "requests clear after test");
    @(posedge sec_tick); @(posedge sec_tick); @(posedge sec_tick); @(posedge clk); #1;
    check(test_req_normal && !test_req_priority, "normal request first after 3 s");
    read_all("timers");
    // writes are ignored
    @(negedge clk); req = '{valid: 1, we: 1, addr: 24'h000020, wdata: 32'hFFFFFFFF};
    @(negedge clk); req.valid = 0;
    read_all("after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
