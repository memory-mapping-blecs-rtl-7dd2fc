// tb_blecs_full: the complete design at its default parameters (40 MHz clock,
// 20 h / 24 h test intervals). One complete operation: a write and a read in
// every internal bank and in one external window, then a few samples of the
// HVLF modulation at its real base rate, then one real second of
// clock so that the seconds counter, the test countdowns and the one-second
// tick are seen at their true scale. The external window is answered by a
// one-cycle behavioural memory.
module tb_blecs_full;
  import blecs_pkg::*;

  logic clk = 0, rst_n = 0;
  bus_req_t req = '0, ext_req;
  logic [31:0] rdata, ext_rdata = 0;
  logic ack, ext_ack = 0;
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
  dab_ident_t ident = '0;
  logic [31:0] flash_ctrl, rdptr [3];
  logic [15:0] coll_push = '0, coll_ovf;
  logic [31:0] coll_data [16];
  logic blm_we = 0;
  logic [9:0] blm_addr = 0;
  logic [31:0] blm_wdata = 0, blm_rdata;
  logic [15:0] hv_dac_code;
  logic hv_dac_sample;

  blecs_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] ext_word = 0;
  always @(posedge clk) begin
    ext_ack   <= ext_req.valid;
    ext_rdata <= (ext_req.valid && !ext_req.we) ? ext_word : 32'h0;
    if (ext_req.valid && ext_req.we) ext_word <= ext_req.wdata;
  end

  task automatic bus(input logic we, input logic [23:0] a, input logic [31:0] v,
                     output logic [31:0] r);
    @(negedge clk);
    req = '{valid: 1'b1, we: we, addr: a, wdata: v};
    @(posedge clk); #1;
    check(ack, $sformatf("one-cycle answer for %06h", a));
    r = rdata;
    @(negedge clk); req.valid = 1'b0;
  endtask

  initial begin
    #(64'd450_000_000);   // 45 million cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int cyc;
    longint unsigned t_rel;
    foreach (coll_data[i]) coll_data[i] = 0;
    foreach (blecf_status[i]) blecf_status[i] = 0;
    mon.lv_ok = '1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    t_rel = $time;
    bus(1, 24'h400010, 32'h5555_AAAA, d);
    bus(0, 24'h400010, 0, d);       check(d == 32'h5555_AAAA, "Xtra SRAM window");
    bus(1, 24'h7E1404, 32'h0000_0100, d);
    bus(0, 24'h7E1404, 0, d);       check(d == 32'h0000_0100, "default HVLF control 2");
    bus(1, 24'h720010, 32'h8040_2010, d);
    bus(0, 24'h720010, 0, d);       check(d == 32'h8040_2010, "HVLF modulation setup");
    bus(1, 24'h7FC480, 32'h0000_0003, d);
    bus(0, 24'h7FC480, 0, d);       check(d == 32'h0000_0003, "ADC range memory");
    bus(0, 24'h700004, 0, d);       check(d == 72000, "normal countdown at 20 h");
    bus(0, 24'h700008, 0, d);       check(d == 86400, "critical countdown at 24 h");
    // HVLF modulation at the real base rate: 1.25 MHz, one sample per 32 clocks
    bus(1, 24'h7E1400, 32'h1000_0001, d);
    bus(1, 24'h7E1404, 32'h0000_0001, d);
    @(negedge clk); mon.sys_status[6] = 1; mon.active_tests[4] = 1;
    begin
      longint unsigned t1, t2;
      @(posedge hv_dac_sample); t1 = $time;
      @(posedge hv_dac_sample); t2 = $time;
      check((t2 - t1) / 10 == 32, $sformatf("HVLF sample spacing %0d cycles", (t2 - t1) / 10));
      check(hv_dac_code == 16'h1000 + 16'd13, "second sample: bias + 256 * sin(2*pi*2/256)");
    end
    @(negedge clk); mon.active_tests[4] = 0;
    // one second at 40 MHz
    @(posedge sec_tick);
    cyc = int'(($time - t_rel) / 10) + 1;
    check(cyc > 39_999_000 && cyc <= 40_000_000, $sformatf("first tick after %0d cycles", cyc));
    @(posedge clk); #1;
    bus(0, 24'h700018, 0, d);       check(d == 1, "one second since reset");
    bus(0, 24'h700004, 0, d);       check(d == 71999, "normal countdown decremented");
    bus(0, 24'h700010, 0, d);       check(d == 1, "one second since last test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
