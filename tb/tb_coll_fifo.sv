// tb_coll_fifo: random pushes and pops on a 32-deep FIFO compared with a
// queue model: data order, empty/full flags, drop-on-full with the sticky
// overflow flag and its clear. Phases with mostly pushes fill it to
// overflow; phases with mostly pops drain it to empty.
module tb_coll_fifo;
  localparam int unsigned D = 32;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0, clr_ovf = 0;
  logic [31:0] din = 0, dout;
  logic empty, full, overflow;
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  bit r_ovf = 0;
  int n_full = 0, n_ovf = 0, n_empty = 0;

  coll_fifo #(.DEPTH(D), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int push_pct, input int pop_pct);
    logic [31:0] exp_head;
    bit exp_empty, exp_full, dp, dq;
    @(negedge clk);
    push = $urandom_range(99, 0) < push_pct;
    pop  = $urandom_range(99, 0) < pop_pct;
    clr_ovf = $urandom_range(19, 0) == 0;
    din  = $urandom;
    exp_empty = (q.size() == 0);
    exp_full  = (q.size() == D);
    exp_head  = exp_empty ? 0 : q[0];
    #1;
    checks++;
    if (dout != exp_head || empty != exp_empty || full != exp_full || overflow != r_ovf) begin
      failures++;
      $display("FAIL size %0d: dout %h/%h empty %b full %b ovf %b/%b", q.size(), dout, exp_head,
               empty, full, overflow, r_ovf);
    end
    if (exp_full) n_full++;
    if (exp_empty) n_empty++;
    @(posedge clk);
    dq = pop && !exp_empty;
    dp = push && (!exp_full || dq);
    if (dq) void'(q.pop_front());
    if (dp) q.push_back(din);
    if (push && !dp) begin r_ovf = 1; n_ovf++; end
    else if (clr_ovf) r_ovf = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (4) begin
      repeat (300) step(80, 20);
      repeat (300) step(20, 80);
      repeat (300) step(50, 50);
    end
    checks++;
    if (n_full == 0 || n_ovf == 0 || n_empty == 0) begin
      failures++; $display("FAIL: full %0d overflow %0d empty %0d", n_full, n_ovf, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
