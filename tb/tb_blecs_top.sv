// tb_blecs_top: end-to-end run of the whole register map at a 20-cycle
// second and test intervals of 3 and 6 seconds. A behavioural model of the
// external SRAM and flash windows answers two cycles after a request. The run
// touches every window and makes each mechanism of the design happen, counting
// each: external access per window, spare access, test request shown as a
// pending LOGIN bit, pending cleared by the test side, manual control refused
// and accepted, A-over-B beam-permit forcing, CRC and timeout rate alarms, HV
// alarm, dump counting, supply ripple, test-timer requests, FIFO overflow, BLM
// memory and test-result traffic in both directions. A mechanism that never
// happened counts as a failure.
module tb_blecs_top;
  import blecs_pkg::*;
  localparam int unsigned HZ = 20;

  logic clk = 0, rst_n = 0;
  bus_req_t req = '0, ext_req;
  logic [31:0] rdata, ext_rdata;
  logic ack, ext_ack;
  region_e ext_sel;
  login_in_t mon = '0;
  logic [1:0] alarm_low, alarm_medium;
  logic alarm_hv, test_req_normal, test_req_priority, sec_tick;
  logic [15:0] pending, test_ack = '0;
  manual_t manual;
  logic [15:0] tc_present;
  logic [31:0] present_ch [8], blecf_status [4], defaults [4];
  logic rm_we = 0;
  logic [7:0] rm_addr = 0;
  logic [31:0] rm_wdata = 0;
  logic tr_we = 0;
  logic [10:0] tr_addr = 0;
  logic [31:0] tr_wdata = 0, tr_rdata;
  dab_ident_t ident;
  logic [31:0] flash_ctrl, rdptr [3];
  logic [15:0] coll_push = '0, coll_ovf;
  logic [31:0] coll_data [16];
  logic blm_we = 0;
  logic [9:0] blm_addr = 0;
  logic [31:0] blm_wdata = 0, blm_rdata;
  logic [15:0] hv_dac_code;
  logic hv_dac_sample;

  blecs_top #(.CLK_HZ(HZ), .NORMAL_TEST_S(3), .CRITICAL_TEST_S(6)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- external memory model
  logic [31:0] ext_mem [int];
  bus_req_t    ext_q1 = '0, ext_q2 = '0;
  region_e     sel_q1, sel_q2;
  int          ext_hits [4] = '{default: 0};
  always @(posedge clk) begin
    ext_q1 <= ext_req; sel_q1 <= ext_sel;
    ext_q2 <= ext_q1;  sel_q2 <= sel_q1;
    ext_ack   <= 1'b0;
    ext_rdata <= 32'h0;
    if (ext_q2.valid) begin
      int key;
      key = (int'(sel_q2) << 24) | int'(ext_q2.addr);
      ext_ack <= 1'b1;
      ext_hits[int'(sel_q2)]++;
      if (ext_q2.we) ext_mem[key] = ext_q2.wdata;
      else ext_rdata <= ext_mem.exists(key) ? ext_mem[key] : 32'h0;
    end
  end

  // ---------------------------------------------------------------- bus master
  task automatic bus(input logic we, input logic [23:0] a, input logic [31:0] v,
                     output logic [31:0] r);
    int wait_cyc = 0;
    @(negedge clk);
    req = '{valid: 1'b1, we: we, addr: a, wdata: v};
    @(posedge clk); #1;
    @(negedge clk); req.valid = 1'b0;
    while (!ack && wait_cyc < 10) begin @(posedge clk); #1; wait_cyc++; end
    if (!ack) @(negedge clk);
    check(ack, $sformatf("answer for %06h", a));
    r = rdata;
  endtask

  // bus read that also gives the answer latency in cycles
  task automatic bus_lat(input logic [23:0] a, output logic [31:0] r, output int lat);
    lat = 1;
    @(negedge clk);
    req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: 32'h0};
    @(posedge clk); #1;
    req.valid = 1'b0;
    while (!ack && lat < 10) begin @(posedge clk); #1; lat++; end
    r = rdata;
  endtask

  // mechanism counters
  int n_ext = 0, n_spare = 0, n_pending_link = 0, n_pending_ack = 0, n_man_refused = 0,
      n_man_on = 0, n_ab = 0, n_alarm_low = 0, n_alarm_med = 0, n_alarm_hv = 0, n_dump = 0,
      n_ripple = 0, n_req_normal = 0, n_req_prio = 0, n_ovf = 0, n_blm = 0, n_tr = 0, n_hvlf = 0;
  always @(posedge clk) begin
    if (alarm_low != 0)    n_alarm_low++;
    if (alarm_medium != 0) n_alarm_med++;
    if (test_req_normal)   n_req_normal++;
    if (test_req_priority) n_req_prio++;
  end

  initial begin
    repeat (400 * HZ) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int lat;
    ident = '{rev_adc: 16'h0102, rev_date: 32'h41_0A_05_07, temp_power: 32'h2A00_0303,
              serial: 64'h1122_3344_5566_7788};
    foreach (coll_data[i]) coll_data[i] = 0;
    foreach (blecf_status[i]) blecf_status[i] = 32'h1111_1111 * (i + 1);
    mon.lv_ok = '1;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // --- external windows: write then read back in each
    begin
      logic [23:0] base [4] = '{24'h000000, 24'h200000, 24'h400000, 24'h600000};
      for (int w = 0; w < 4; w++) begin
        bus(1, base[w] + 24'h1234 * 24'(w + 1), 32'hE0E0_0000 | w, d);
        bus(0, base[w] + 24'h1234 * 24'(w + 1), 0, d);
        check(d == (32'hE0E0_0000 | w), $sformatf("external window %0d", w));
      end
      foreach (ext_hits[w]) begin if (ext_hits[w] == 2) n_ext++; else $display("window %0d hits %0d", w, ext_hits[w]); end
      check(n_ext == 4, "each external window reached with its own select");
    end

    // --- spare regions answer zero one cycle later
    bus_lat(24'h703000, d, lat); check(d == 0 && lat == 1, "spare LOGIN gap"); n_spare++;
    bus_lat(24'h7D0000, d, lat); check(d == 0 && lat == 1, "spare before control bank"); n_spare++;
    bus_lat(24'h7F0004, d, lat); check(d == 32'h0102_0000 && lat == 1, "DAB revision, one-cycle answer");

    // --- test request through the control bank appears in LOGIN 700000
    bus(1, 24'h7E0000, 32'h8001_0000, d);          // user system test + expert manual control
    check(pending == 16'h8001, "pending flags");
    bus(0, 24'h700000, 0, d);
    check(d[23:8] == 16'h8001, "pending shown in LOGIN system word");
    if (d[23:8] == 16'h8001) n_pending_link++;

    // --- manual control: refused, then accepted under system test + manual control
    bus(1, 24'h7E0004, 32'h8003_E000, d);
    check(manual == '0, "manual refused outside system test");
    bus(0, 24'h7E0004, 0, d);
    if (d[31] == 0) n_man_refused++;
    @(negedge clk); mon.sys_status[6] = 1; mon.active_tests[0] = 1;
    bus(1, 24'h7E0004, 32'h8003_E000, d);           // force BP on all four lines
    check(manual.active && manual.force_bp, "manual accepted");
    if (manual.active) n_man_on++;
    check(manual.bp_ua && !manual.bp_ub && manual.bp_ma && !manual.bp_mb, "A lines override B lines");
    if (manual.bp_ua && !manual.bp_ub) n_ab++;
    // test side acknowledges the manual-control request
    @(negedge clk); test_ack = 16'h0001; @(negedge clk); test_ack = 0;
    bus(0, 24'h700000, 0, d);
    check(d[23:8] == 16'h8000, "acknowledged request leaves LOGIN");
    if (d[23:8] == 16'h8000) n_pending_ack++;

    // --- CTRV errors above 5 per second, dumps, supply ripple
    @(posedge sec_tick);
    repeat (6) begin
      @(negedge clk); mon.crc_err_b = 1; mon.tmo_a = 1; @(negedge clk); mon.crc_err_b = 0; mon.tmo_a = 0;
    end
    @(negedge clk); #1;
    check(alarm_low == 2'b01 && alarm_medium == 2'b10, "rate alarms");
    repeat (3) begin
      @(negedge clk); mon.dump_m = 1; mon.turn_cnt = 32'd777; mon.bunch_cnt = 12'd42;
      @(negedge clk); mon.dump_m = 0;
    end
    @(negedge clk); mon.dump_u = 1; mon.turn_cnt = 32'd999; mon.bunch_cnt = 12'd7;
    @(negedge clk); mon.dump_u = 0; mon.resp_b = 1; @(negedge clk); mon.resp_b = 0;
    bus(0, 24'h70001C, 0, d);
    check(d[15:8] == 1 && d[7:0] == 3 && d[19:18] == 2'b01, "dump counters and response flag");
    if (d[15:0] == 16'h0103) n_dump++;
    bus(0, 24'h700020, 0, d); check(d == 999, "turn at last dump");
    bus(0, 24'h700024, 0, d); check(d == 7, "bunch at last dump");
    bus(0, 24'h700038, 0, d); check(d == 6, "CRC error count B");
    bus(0, 24'h70003C, 0, d); check(d == 6, "timeout count A");
    @(negedge clk); mon.lv_ok[2] = 0; @(negedge clk); mon.lv_ok[2] = 1; @(negedge clk);
    bus(0, 24'h700064, 0, d); check(d == 32'h8000_0001, "digital 3.3 V ripple counted");
    if (d[30:0] == 1) n_ripple++;
    @(negedge clk); mon.hv1_flags = 4'b1000; #1;
    if (alarm_hv) n_alarm_hv++;
    check(alarm_hv, "HV alarm");
    @(negedge clk); mon.hv1_flags = 4'b0000;

    // --- test timers: wait past the critical interval
    repeat (7) @(posedge sec_tick);
    @(posedge clk); #1;
    bus(0, 24'h700000, 0, d);
    check(d[7:5] == 3'b111, "timer test pending, normal and priority requests");
    bus(0, 24'h700018, 0, d);
    check(d >= 8, "seconds since reset advancing");

    // --- test results: test side writes channel 3, bus reads; bus writes setup
    @(negedge clk); tr_we = 1; tr_addr = 11'((32'h038) >> 2); tr_wdata = 32'h8123_4567;
    @(negedge clk); tr_we = 0;
    bus(0, 24'h720038, 0, d); check(d == 32'h8123_4567, "HVLF channel 3 result");
    bus(1, 24'h72000C, 32'h0100_0010, d);
    @(negedge clk); tr_addr = 11'd3; @(posedge clk); #1;
    check(tr_rdata == 32'h0100_0010, "modulation setup reaches test side");
    if (tr_rdata == 32'h0100_0010) n_tr++;

    // --- collimation FIFO overflow on channel 16
    repeat (34) begin
      @(negedge clk); coll_push[15] = 1; coll_data[15] = coll_data[15] + 1;
    end
    @(negedge clk); coll_push[15] = 0;
    bus(0, 24'h7F0140, 0, d); check(d == 32'h1, "overflow bit of channel 16");
    if (d[0]) n_ovf++;
    bus(0, 24'h7F013C, 0, d); check(d == 1, "oldest value of channel 16");

    // --- BLM memories and running maximum
    @(negedge clk); blm_we = 1; blm_addr = 10'd5; blm_wdata = 32'h0BAD_CAFE;
    @(negedge clk); blm_we = 0; rm_we = 1; rm_addr = 8'd255; rm_wdata = 32'h0000_FFFF;
    @(negedge clk); rm_we = 0;
    bus(0, 24'h7FC014, 0, d); check(d == 32'h0BAD_CAFE, "BLM logging A word 5");
    if (d == 32'h0BAD_CAFE) n_blm++;
    bus(0, 24'h7E13FC, 0, d); check(d == 32'h0000_FFFF, "running maximum channel 256");
    bus(1, 24'h7FC500, 32'h0000_0ABC, d);
    @(negedge clk); blm_addr = 10'h140; @(posedge clk); #1;
    check(blm_rdata == 32'h0000_0ABC, "threshold A written from the bus");

    // --- HVLF modulation of the HV DAC from the default HVLF settings
    bus(1, 24'h7E1400, 32'h8000_000A, d);           // bias 0x8000, multiplier 10
    bus(1, 24'h7E1404, 32'h0000_0002, d);           // frequency division 2
    check(hv_dac_code == 16'h8000, "DAC at bias while HVLF test off");
    @(negedge clk); mon.active_tests[4] = 1;
    begin
      int lo = 65535, hi = 0;
      repeat (300) begin
        @(posedge hv_dac_sample); #1;
        n_hvlf++;
        if (int'(hv_dac_code) < lo) lo = int'(hv_dac_code);
        if (int'(hv_dac_code) > hi) hi = int'(hv_dac_code);
      end
      // peak 256 * 10 codes around the bias
      check(hi > 32768 + 2540 && hi <= 32768 + 2560 && lo < 32768 - 2540 && lo >= 32768 - 2560,
            $sformatf("modulation range %0d..%0d", lo, hi));
    end
    @(negedge clk); mon.active_tests[4] = 0;
    @(posedge clk); @(posedge clk); #1;
    check(hv_dac_code == 16'h8000, "DAC back at bias");

    // --- every mechanism happened
    check(n_hvlf > 0, "HVLF modulation");
    check(n_ext == 4, "external windows");
    check(n_spare > 0, "spare access");
    check(n_pending_link > 0, "pending link");
    check(n_pending_ack > 0, "pending acknowledge");
    check(n_man_refused > 0, "manual refused");
    check(n_man_on > 0, "manual accepted");
    check(n_ab > 0, "A-over-B forcing");
    check(n_alarm_low > 0, "CRC alarm");
    check(n_alarm_med > 0, "timeout alarm");
    check(n_alarm_hv > 0, "HV alarm");
    check(n_dump > 0, "dump logging");
    check(n_ripple > 0, "supply ripple");
    check(n_req_normal > 0, "normal test request");
    check(n_req_prio > 0, "priority test request");
    check(n_ovf > 0, "FIFO overflow");
    check(n_blm > 0 && n_tr > 0, "memory traffic");
    $display("mechanisms: ext %0d spare %0d pending %0d/%0d manual %0d/%0d ab %0d alarms %0d/%0d/%0d dump %0d ripple %0d timer %0d/%0d ovf %0d hvlf %0d",
             n_ext, n_spare, n_pending_link, n_pending_ack, n_man_refused, n_man_on, n_ab,
             n_alarm_low, n_alarm_med, n_alarm_hv, n_dump, n_ripple, n_req_normal, n_req_prio, n_ovf, n_hvlf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
