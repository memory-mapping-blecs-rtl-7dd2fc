// test_timer: countdown to the next normal and critical system test.
//
// Two down-counters hold the seconds left before a normal system test
// (`remain_normal`, LOGIN 700004) and before a critical one (`remain_critical`,
// LOGIN 700008). They load NORMAL_TEST_S / CRITICAL_TEST_S at reset and again
// whenever `test_done` reports a finished system test, and decrement once per
// `sec_tick` down to zero. At zero they raise `req_normal` (LOGIN bit 6, test
// request normal) and `req_priority` (bit 5, priority request: beam permit
// withdrawn at the next dump); `pending` (bit 7) is their OR. `since_test`
// (LOGIN 700010) counts seconds since the last finished test. The two interval
// lengths are assumptions of this design; the map gives only the counters.
module test_timer #(
  parameter int unsigned NORMAL_TEST_S   = 72000,
  parameter int unsigned CRITICAL_TEST_S = 86400
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sec_tick,
  input  logic        test_done,
  output logic [31:0] remain_normal,
  output logic [31:0] remain_critical,
  output logic [31:0] since_test,
  output logic        req_normal,
  output logic        req_priority,
  output logic        pending
);

  always_ff @(posedge clk) begin
    if (!rst_n || test_done) begin
      remain_normal   <= 32'(NORMAL_TEST_S);
      remain_critical <= 32'(CRITICAL_TEST_S);
      since_test      <= '0;
    end else if (sec_tick) begin
      if (remain_normal   != '0) remain_normal   <= remain_normal - 32'd1;
      if (remain_critical != '0) remain_critical <= remain_critical - 32'd1;
      if (since_test != '1)      since_test      <= since_test + 32'd1;
    end
  end

  assign req_normal   = (remain_normal == '0);
  assign req_priority = (remain_critical == '0);
  assign pending      = req_normal | req_priority;

endmodule
