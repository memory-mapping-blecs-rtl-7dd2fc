// tb_test_results_regs: writes HVLF channel results from the test side at the
// word index of the map (channel n at 0x028 + 8*(n-1)) and reads them from the
// bus; writes setup words from the bus and reads them on the test side;
// checks the one-cycle answer and that offsets past the bank read zero.
module tb_test_results_regs;
  import blecs_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t req = '0;
  logic [31:0] rdata, loc_rdata, loc_wdata = 0;
  logic ack, loc_we = 0;
  logic [10:0] loc_addr = 0;
  int checks = 0, failures = 0;
  logic [31:0] ch_ref [256][2];
  logic [31:0] d;

  test_results_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_access(input logic we, input logic [23:0] a, input logic [31:0] v,
                            output logic [31:0] r);
    @(negedge clk);
    req = '{valid: 1'b1, we: we, addr: a, wdata: v};
    @(posedge clk); #1;
    check(ack, "ack one cycle later");
    r = rdata;
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
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // test side writes all channel results
    for (int n = 1; n <= 256; n++) for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      loc_we = 1;
      loc_addr = 11'(((32'h028 + 8 * (n - 1)) >> 2) + k);
      loc_wdata = $urandom; ch_ref[n-1][k] = loc_wdata;
    end
    @(negedge clk); loc_we = 0;
    for (int n = 1; n <= 256; n += 5) for (int k = 0; k < 2; k++) begin
      bus_access(0, 24'(32'h028 + 8 * (n - 1) + 4 * k), 0, d);
      check(d == ch_ref[n-1][k], $sformatf("channel %0d word %0d", n, k));
    end
    bus_access(0, 24'h000820, 0, d); check(d == ch_ref[255][0], "channel 256 at 0x720820");
    bus_access(0, 24'h000824, 0, d); check(d == ch_ref[255][1], "channel 256 second word");
    // setup words written from the bus, read on the test side
    bus_access(1, 24'h00000C, 32'h0123_0456, d);
    bus_access(1, 24'h000010, 32'h11223344, d);
    check(d == 0, "no read data on a write");
    @(negedge clk); loc_addr = 11'h3; @(posedge clk); #1;
    check(loc_rdata == 32'h0123_0456, "modulation setup seen by the test side");
    @(negedge clk); loc_addr = 11'h4; @(posedge clk); #1;
    check(loc_rdata == 32'h11223344, "modulation setup 2 seen by the test side");
    bus_access(0, 24'h00000C, 0, d); check(d == 32'h0123_0456, "setup read back");
    // beyond the bank
    bus_access(1, 24'h000828, 32'hFFFFFFFF, d);
    bus_access(0, 24'h000828, 0, d); check(d == 0, "past the bank reads zero");
    bus_access(0, 24'h001FFC, 0, d); check(d == 0, "end of window reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
