// tb_dab_csr: checks the DAB64x bank through its bus: identification words
// packed big-endian, flash control and SRAM read pointers, the 16 collimation
// FIFOs (order, pop on read, zero when empty, overflow bits with channel 1 in
// bit 15 and write-one-to-clear), and the BLM memories shared with the
// acquisition side at the map's offsets.
module tb_dab_csr;
  import blecs_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t req = '0;
  logic [31:0] rdata;
  logic ack;
  dab_ident_t ident;
  logic [31:0] flash_ctrl;
  logic [31:0] rdptr [3];
  logic [15:0] coll_push = '0, coll_ovf;
  logic [31:0] coll_data [16];
  logic blm_we = 0;
  logic [9:0] blm_addr = 0;
  logic [31:0] blm_wdata = 0, blm_rdata;
  int checks = 0, failures = 0;
  logic [31:0] q [16][$];
  logic [31:0] d;

  dab_csr dut (.*);

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

  task automatic push_n(input int ch, input int n);
    repeat (n) begin
      @(negedge clk);
      coll_push = 16'(1) << ch;
      coll_data[ch] = $urandom;
      if (q[ch].size() < 32) q[ch].push_back(coll_data[ch]);
      @(negedge clk); coll_push = '0;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ident.rev_adc = 16'hA1B2; ident.rev_date = 32'h43_0C_1F_09;
    ident.temp_power = 32'h0123_4567; ident.serial = 64'h0011_2233_4455_6677;
    foreach (coll_data[i]) coll_data[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // identification
    bus_access(0, 24'h0004, 0, d); check(d == 32'hA1B2_0000, "ADC revision bytes at 7F0004/5");
    bus_access(0, 24'h0014, 0, d); check(d == 32'h430C_1F09, "revision letter and date");
    bus_access(0, 24'h0018, 0, d); check(d == 32'h0123_4567, "temperature and power");
    bus_access(0, 24'h003C, 0, d); check(d == 32'h0011_2233, "serial upper");
    bus_access(0, 24'h0040, 0, d); check(d == 32'h4455_6677, "serial lower");
    // read/write registers
    bus_access(1, 24'h0000, 32'hF1A5_0001, d); check(flash_ctrl == 32'hF1A5_0001, "flash control");
    bus_access(1, 24'h0050, 32'h8000_0100, d);
    bus_access(1, 24'h0054, 32'h0000_0200, d);
    bus_access(1, 24'h0058, 32'h8000_0300, d);
    check(rdptr[0] == 32'h8000_0100 && rdptr[1] == 32'h0000_0200 && rdptr[2] == 32'h8000_0300, "read pointers");
    bus_access(0, 24'h0054, 0, d); check(d == 32'h0000_0200, "BD pointer read back");
    // collimation FIFOs
    bus_access(0, 24'h0100, 0, d); check(d == 0, "empty FIFO reads zero");
    push_n(0, 5); push_n(3, 40); push_n(15, 2);
    bus_access(0, 24'h0140, 0, d); check(d == 32'h0000_1000, "overflow on channel 4 only (bit 12)");
    check(coll_ovf == 16'h0008, "overflow port");
    for (int ch = 0; ch < 16; ch++) begin
      int n;
      n = q[ch].size();
      for (int k = 0; k < n + 1; k++) begin
        bus_access(0, 24'h0100 + 24'(4 * ch), 0, d);
        if (q[ch].size() > 0) check(d == q[ch].pop_front(), $sformatf("FIFO ch %0d value %0d", ch + 1, k));
        else check(d == 0, $sformatf("FIFO ch %0d empty after drain", ch + 1));
      end
    end
    bus_access(1, 24'h0140, 32'h0000_1000, d);
    bus_access(0, 24'h0140, 0, d); check(d == 0, "overflow cleared by writing one");
    // BLM memories: acquisition side writes logging A, bus reads it
    for (int i = 0; i < 576; i += 11) begin
      @(negedge clk); blm_we = 1; blm_addr = 10'(i); blm_wdata = 32'hB000_0000 | i;
    end
    @(negedge clk); blm_we = 0;
    for (int i = 0; i < 576; i += 11) begin
      bus_access(0, 24'hC000 + 24'(4 * i), 0, d);
      check(d == (32'hB000_0000 | i), $sformatf("BLM memory word %0d: %h", i, d));
    end
    // bus writes thresholds B (0x7FC700), acquisition side reads
    bus_access(1, 24'hC700, 32'h7777_0001, d);
    bus_access(1, 24'hC8FC, 32'h7777_0002, d);
    @(negedge clk); blm_addr = 10'((32'hC700 - 32'hC000) / 4); @(posedge clk); #1;
    check(blm_rdata == 32'h7777_0001, "threshold B first word");
    @(negedge clk); blm_addr = 10'd575; @(posedge clk); #1;
    check(blm_rdata == 32'h7777_0002, "threshold B last word");
    bus_access(0, 24'hC900, 0, d); check(d == 0, "spare after memories");
    bus_access(0, 24'h0144, 0, d); check(d == 0, "spare after overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
