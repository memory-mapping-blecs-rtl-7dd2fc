// login_regs: the LOGIN status bank (byte offsets 0x000..0x06C of 700000).
//
// A read-only bank of 28 words that the control system polls once per second.
// Some words are plain views of board signals (`mon`): system status bits,
// active tests, test results, beam permit lines, beam energy, HV and supply
// readings. The others are kept here:
//   * seconds since reset (time_base) and the system-test timers (test_timer),
//   * the dump counters and last-dump turn/bunch numbers (dump_logger),
//   * 32-bit event counters for CTRV frames, CRC errors and timeouts on
//     channels A and B and for the beam-energy timeout,
//   * 31-bit ripple counters, one per low-voltage supply, counting the falls of
//     its "ok" input,
//   * rate alarms: CRC errors above 5/s on A or B give `alarm_low`, timeouts
//     above 5/s give `alarm_medium`; any HV flag high gives `alarm_hv`.
// Bus: a request strobe `req.valid` is answered on the next cycle with `ack`
// and, for reads, `rdata`; writes are acknowledged and ignored. Words of the
// window beyond 0x06C read zero. Word layout and counters follow the board's
// register map; the ripple-count rule, the alarm hold rule and the bus timing
// are choices of this design. All `mon` signals are taken as synchronous.
module login_regs
  import blecs_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 40_000_000,
  parameter int unsigned NORMAL_TEST_S   = 72000,
  parameter int unsigned CRITICAL_TEST_S = 86400
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  bus_req_t             req,
  output logic [DATA_W-1:0]    rdata,
  output logic                 ack,
  input  login_in_t            mon,
  input  logic [N_TESTREQ-1:0] pending,
  output logic                 sec_tick,
  output logic [1:0]           alarm_low,     // CRC error rate, channel A (bit 1) and B (bit 0)
  output logic [1:0]           alarm_medium,  // timeout rate, channel A (bit 1) and B (bit 0)
  output logic                 alarm_hv,
  output logic                 test_req_normal,
  output logic                 test_req_priority
);

  localparam int unsigned N_EV = 7;  // frame A/B, CRC A/B, timeout A/B, energy timeout
  localparam int unsigned N_LV = 5;

  // ---------------------------------------------------------------- timers
  logic [31:0] seconds;
  logic [31:0] remain_normal, remain_critical, since_test;
  logic        timer_pending;

  time_base #(.CLK_HZ(CLK_HZ)) u_time (
    .clk, .rst_n, .sec_tick, .seconds
  );

  test_timer #(.NORMAL_TEST_S(NORMAL_TEST_S), .CRITICAL_TEST_S(CRITICAL_TEST_S)) u_timer (
    .clk, .rst_n, .sec_tick,
    .test_done      (mon.test_done),
    .remain_normal, .remain_critical, .since_test,
    .req_normal     (test_req_normal),
    .req_priority   (test_req_priority),
    .pending        (timer_pending)
  );

  // ---------------------------------------------------------------- dumps
  logic [7:0]  cnt_u, cnt_m;
  logic [31:0] turn_at_dump;
  logic [11:0] bunch_at_dump;
  logic        responded_a, responded_b;

  dump_logger u_dump (
    .clk, .rst_n,
    .dump_u (mon.dump_u), .dump_m (mon.dump_m),
    .turn_cnt (mon.turn_cnt), .bunch_cnt (mon.bunch_cnt),
    .resp_a (mon.resp_a), .resp_b (mon.resp_b),
    .cnt_u, .cnt_m, .turn_at_dump, .bunch_at_dump, .responded_a, .responded_b
  );

  // ---------------------------------------------------------------- alarms
  rate_alarm u_crc_a (.clk, .rst_n, .sec_tick, .event_i(mon.crc_err_a), .alarm(alarm_low[1]));
  rate_alarm u_crc_b (.clk, .rst_n, .sec_tick, .event_i(mon.crc_err_b), .alarm(alarm_low[0]));
  rate_alarm u_tmo_a (.clk, .rst_n, .sec_tick, .event_i(mon.tmo_a),     .alarm(alarm_medium[1]));
  rate_alarm u_tmo_b (.clk, .rst_n, .sec_tick, .event_i(mon.tmo_b),     .alarm(alarm_medium[0]));

  assign alarm_hv = (|mon.hv1_flags) | (|mon.hv2_flags);

  // ---------------------------------------------------------------- event and ripple counters
  logic [N_EV-1:0] ev;
  logic [31:0]     ev_cnt [N_EV];
  logic [N_LV-1:0] lv_ok_q;
  logic [30:0]     ripple [N_LV];

  assign ev = {mon.frame_a, mon.frame_b, mon.crc_err_a, mon.crc_err_b,
               mon.tmo_a, mon.tmo_b, mon.tmo_energy};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_EV); i++) ev_cnt[i] <= '0;
      for (int i = 0; i < int'(N_LV); i++) ripple[i] <= '0;
      lv_ok_q <= '1;
    end else begin
      // ev[N_EV-1] is frame A, the first counter word
      for (int i = 0; i < int'(N_EV); i++)
        if (ev[N_EV-1-i]) ev_cnt[i] <= ev_cnt[i] + 32'd1;
      // mon.lv_ok[N_LV-1] is the first supply word (analog 5 V)
      for (int i = 0; i < int'(N_LV); i++)
        if (lv_ok_q[N_LV-1-i] && !mon.lv_ok[N_LV-1-i]) ripple[i] <= ripple[i] + 31'd1;
      lv_ok_q <= mon.lv_ok;
    end
  end

  // ---------------------------------------------------------------- read mux
  logic [DATA_W-1:0] word;
  logic [10:0]       widx;   // word index inside the 8 KB window

  assign widx = req.addr[12:2];

  always_comb begin
    word = '0;
    unique case (widx) inside
      11'd0:  word = {mon.sys_status, pending, timer_pending, test_req_normal,
                      test_req_priority, 5'b0};
      11'd1:  word = remain_normal;
      11'd2:  word = remain_critical;
      11'd3:  word = {mon.active_tests, 21'b0};
      11'd4:  word = since_test;
      11'd5:  word = {mon.test_result[5:3], 2'b00, mon.test_result[2:0], 24'b0};
      11'd6:  word = seconds;
      11'd7:  word = {mon.bp_lines, responded_a, responded_b, 2'b00, cnt_u, cnt_m};
      11'd8:  word = turn_at_dump;
      11'd9:  word = {20'b0, bunch_at_dump};
      11'd10: word = {mon.energy_in, mon.energy_out, mon.energy_err, 5'b0,
                      mon.bpl_test_act, mon.bpl_test_tc};
      [11'd11:11'd17]: word = ev_cnt[3'(widx - 11'd11)];
      11'd18: word = {mon.hv1_flags, 4'b0, mon.hv1_volt};
      11'd19: word = {mon.hv2_flags, 4'b0, mon.hv2_volt};
      11'd20: word = {mon.hv1_curr, mon.hv2_curr};
      11'd21: word = {3'b0, mon.vme_3v3, 3'b0, mon.vme_5v};
      11'd22: word = {3'b0, mon.ana_5v, 3'b0, mon.ana_5vref};
      [11'd23:11'd27]: word = {mon.lv_ok[3'(N_LV-1) - 3'(widx - 11'd23)], ripple[3'(widx - 11'd23)]};
      default: word = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack   <= 1'b0;
      rdata <= '0;
    end else begin
      ack   <= req.valid;
      rdata <= (req.valid && !req.we) ? word : '0;
    end
  end

endmodule
