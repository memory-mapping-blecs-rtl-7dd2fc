// tb_dump_logger: random dump, response and counter activity; a reference
// model kept in the testbench gives the expected counters, latched turn and
// bunch numbers and response flags after every cycle. Includes a run of more
// than 255 unmaskable dumps to reach saturation.
module tb_dump_logger;
  logic clk = 0, rst_n = 0;
  logic dump_u = 0, dump_m = 0, resp_a = 0, resp_b = 0;
  logic [31:0] turn_cnt = 0;
  logic [11:0] bunch_cnt = 0;
  logic [7:0]  cnt_u, cnt_m;
  logic [31:0] turn_at_dump;
  logic [11:0] bunch_at_dump;
  logic        responded_a, responded_b;
  int checks = 0, failures = 0;

  int r_u = 0, r_m = 0;
  logic [31:0] r_turn = 0;
  logic [11:0] r_bunch = 0;
  bit r_a = 0, r_b = 0;

  dump_logger dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit du, input bit dm, input bit ra, input bit rb);
    @(negedge clk);
    dump_u = du; dump_m = dm; resp_a = ra; resp_b = rb;
    turn_cnt  = $urandom;
    bunch_cnt = 12'($urandom);
    @(posedge clk);
    if (du && r_u < 255) r_u++;
    if (dm && r_m < 255) r_m++;
    if (du || dm) begin
      r_turn = turn_cnt; r_bunch = bunch_cnt; r_a = ra; r_b = rb;
    end else begin
      if (ra) r_a = 1;
      if (rb) r_b = 1;
    end
    #1;
    checks++;
    if (cnt_u != 8'(r_u) || cnt_m != 8'(r_m) || turn_at_dump != r_turn ||
        bunch_at_dump != r_bunch || responded_a != r_a || responded_b != r_b) begin
      failures++;
      $display("FAIL: u %0d/%0d m %0d/%0d turn %h/%h bunch %h/%h a %b/%b b %b/%b",
               cnt_u, r_u, cnt_m, r_m, turn_at_dump, r_turn, bunch_at_dump, r_bunch,
               responded_a, r_a, responded_b, r_b);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2000)
      step($urandom_range(9, 0) == 0, $urandom_range(7, 0) == 0,
           $urandom_range(5, 0) == 0, $urandom_range(5, 0) == 0);
    repeat (300) step(1, 0, 0, 0);
    checks++;
    if (cnt_u != 8'hFF) begin failures++; $display("FAIL: no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
