// tb_dp_ram: random reads and writes on both ports of a 40-word memory with a
// 6-bit address, checked against a shadow array: read-first data, one-cycle
// read latency, port b winning a same-word write, out-of-range addresses.
module tb_dp_ram;
  localparam int unsigned W = 40;
  logic clk = 0, rst_n = 0;
  logic a_we = 0, b_we = 0;
  logic [5:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [31:0] shadow [W];
  logic [31:0] exp_a, exp_b;

  dp_ram #(.WORDS(W), .AW(6)) dut (.*);

  always #5 clk = ~clk;

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
    // fill through port a
    for (int i = 0; i < int'(W); i++) begin
      @(negedge clk);
      a_we = 1; a_addr = 6'(i); a_wdata = $urandom; shadow[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    repeat (3000) begin
      @(negedge clk);
      a_we = $urandom_range(1, 0); b_we = $urandom_range(2, 0) == 0;
      a_addr = 6'($urandom_range(45, 0)); b_addr = ($urandom_range(3, 0) == 0) ? a_addr : 6'($urandom_range(45, 0));
      a_wdata = $urandom; b_wdata = $urandom;
      exp_a = (a_addr < W) ? shadow[a_addr] : 0;
      exp_b = (b_addr < W) ? shadow[b_addr] : 0;
      @(posedge clk);
      if (a_we && a_addr < W && !(b_we && b_addr == a_addr)) shadow[a_addr] = a_wdata;
      if (b_we && b_addr < W) shadow[b_addr] = b_wdata;
      #1;
      checks += 2;
      if (a_rdata != exp_a) begin failures++; $display("FAIL a[%0d] %h exp %h", a_addr, a_rdata, exp_a); end
      if (b_rdata != exp_b) begin failures++; $display("FAIL b[%0d] %h exp %h", b_addr, b_rdata, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
