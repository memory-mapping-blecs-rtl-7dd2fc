// tb_control_regs: exercises the control bank through its bus: test requests
// setting pending flags and the acknowledge clearing them, manual control
// accepted only while allowed and the A-over-B beam-permit rule, the TC and
// channel tables, the read-only BLECF status words, the running-maximum table
// written from the acquisition side, the default settings with their spare
// bits, and unmapped offsets. Expected values come from the register map.
module tb_control_regs;
  import blecs_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t req = '0;
  logic [31:0] rdata;
  logic ack;
  logic [15:0] pending, test_ack = '0;
  logic manual_allowed = 0;
  manual_t manual;
  logic [15:0] tc_present;
  logic [31:0] present_ch [8];
  logic [31:0] blecf_status [4];
  logic [31:0] defaults [4];
  logic rm_we = 0;
  logic [7:0] rm_addr = 0;
  logic [31:0] rm_wdata = 0;
  int checks = 0, failures = 0;
  logic [31:0] rm_ref [256];
  logic [31:0] pc_ref [8];
  logic [31:0] d;

  control_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input logic [23:0] a, input logic [31:0] v);
    @(negedge clk);
    req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: v};
    @(posedge clk); #1;
    check(ack, "write ack");
    @(negedge clk); req.valid = 0;
  endtask

  task automatic bus_read(input logic [23:0] a, output logic [31:0] v);
    @(negedge clk);
    req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: 32'h0};
    @(posedge clk); #1;
    check(ack, "read ack");
    v = rdata;
    @(negedge clk); req.valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (blecf_status[i]) blecf_status[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // --- test requests
    bus_write(24'h0000, 32'hA5C3_1234);
    check(pending == 16'hA5C3, "request sets pending flags");
    bus_write(24'h0000, 32'h0100_0000);
    check(pending == (16'hA5C3 | 16'h0100), "requests accumulate");
    bus_read(24'h0000, d);
    check(d == {16'hA5C3 | 16'h0100, 16'h0}, "pending read back");
    @(negedge clk); test_ack = 16'h8001; @(negedge clk); test_ack = 0;
    check(pending == ((16'hA5C3 | 16'h0100) & ~16'h8001), "acknowledge clears flags");

    // --- manual control: not allowed, activation ignored
    bus_write(24'h0004, 32'hFFFF_E000);
    check(manual == '0, "manual outputs off while not allowed");
    bus_read(24'h0004, d);
    check(d == 32'h7FFF_E000, "activation bit refused");
    // allowed: activation accepted, outputs follow, A-over-B rule
    @(negedge clk); manual_allowed = 1;
    // bit31 act, 30 force dump, tc 5 (29..26), 25 send energy, energy 0x13 (24..20),
    // 19 dump u, 17 force bp, UA=1 UB=1 MA=0 MB=1
    bus_write(24'h0004, (1 << 31) | (1 << 30) | (5 << 26) | (1 << 25) | (32'h13 << 20) |
                         (1 << 19) | (1 << 17) | (1 << 16) | (1 << 15) | (1 << 13));
    check(manual.active && manual.force_tc_dump && manual.dump_tc == 5 && manual.send_energy &&
          manual.energy == 5'h13 && manual.force_dump_u && !manual.force_dump_m && manual.force_bp,
          "manual fields decoded");
    check(manual.bp_ua && !manual.bp_ub, "UA true forces UB false");
    check(!manual.bp_ma && manual.bp_mb, "MB kept while MA false");
    // allowance drops: everything off and activation cleared
    @(negedge clk); manual_allowed = 0; #1;
    check(manual == '0, "outputs off when no longer allowed");
    @(negedge clk); manual_allowed = 1; #1;
    check(manual == '0, "activation stays cleared");

    // --- TC presence, channel table
    bus_write(24'h0008, 32'hBEEF_FFFF);
    check(tc_present == 16'hBEEF, "TC table");
    bus_read(24'h0008, d); check(d == 32'hBEEF_0000, "TC table spare bits zero");
    for (int i = 0; i < 8; i++) begin pc_ref[i] = $urandom; bus_write(24'h0100 + 24'(4 * i), pc_ref[i]); end
    for (int i = 0; i < 8; i++) begin
      bus_read(24'h0100 + 24'(4 * i), d);
      check(d == pc_ref[i] && present_ch[i] == pc_ref[i], "present channels word");
    end

    // --- BLECF status, read only
    for (int i = 0; i < 4; i++) begin
      bus_write(24'h000C + 24'(4 * i), 32'h0);
      bus_read(24'h000C + 24'(4 * i), d);
      check(d == blecf_status[i], "BLECF status word");
    end

    // --- running maximum table
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); rm_we = 1; rm_addr = 8'(i); rm_wdata = $urandom; rm_ref[i] = rm_wdata;
    end
    @(negedge clk); rm_we = 0;
    bus_write(24'h1000, 32'hDEAD_0000);      // read only from the bus
    for (int i = 0; i < 256; i += 7) begin
      bus_read(24'h1000 + 24'(4 * i), d);
      check(d == rm_ref[i], $sformatf("running max ch %0d", i + 1));
    end
    bus_read(24'h13FC, d); check(d == rm_ref[255], "running max ch 256");

    // --- defaults
    bus_write(24'h1400, 32'h1234_5678); bus_write(24'h1404, 32'hFFFF_00AA);
    bus_write(24'h1408, 32'h0BAD_F00D); bus_write(24'h140C, 32'hCAFE_0001);
    check(defaults[0] == 32'h1234_5678 && defaults[1] == 32'h0000_00AA &&
          defaults[2] == 32'h0BAD_F00D && defaults[3] == 32'hCAFE_0001, "default settings");
    bus_read(24'h1404, d); check(d == 32'h0000_00AA, "HVLF control 2 spare bits zero");

    // --- unmapped
    bus_write(24'h0020, 32'hFFFF_FFFF);
    bus_read(24'h0020, d); check(d == 0, "spare reads zero");
    bus_read(24'h1410, d); check(d == 0, "past the defaults reads zero");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
