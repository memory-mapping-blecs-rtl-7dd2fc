// time_base: one-second tick and seconds-since-reset counter.
//
// A prescaler counts CLK_HZ clock cycles and emits `sec_tick`, a one-cycle
// pulse, on the last cycle of each second; `seconds` then increments on the
// same edge that ends the tick cycle. The first tick comes CLK_HZ cycles after
// reset is released. The board reports "time in seconds since the last reset"
// and refreshes its status once per second; the 40 MHz clock is an assumption
// of this design, set through CLK_HZ.
module time_base #(
  parameter int unsigned CLK_HZ = 40_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        sec_tick,
  output logic [31:0] seconds
);

  localparam int unsigned PW = (CLK_HZ > 1) ? $clog2(CLK_HZ) : 1;
  localparam logic [PW-1:0] LAST = PW'(CLK_HZ - 1);

  logic [PW-1:0] presc;

  assign sec_tick = (presc == LAST);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      presc   <= '0;
      seconds <= '0;
    end else if (sec_tick) begin
      presc   <= '0;
      seconds <= seconds + 32'd1;
    end else begin
      presc   <= presc + PW'(1);
    end
  end

endmodule
