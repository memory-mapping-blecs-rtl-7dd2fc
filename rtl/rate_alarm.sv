// rate_alarm: error-rate alarm, "more than LIMIT errors per second".
//
// Error pulses on `event_i` are counted inside one-second windows delimited by
// `sec_tick`. The alarm rises on the cycle after the window count first
// exceeds LIMIT (5 on this board, for CTRV CRC errors and timeouts) and is kept
// until a window closes with a count within the limit. An event on the tick
// cycle is counted in the window that starts there. The window counter
// saturates at 255. The hold-until-a-quiet-window behaviour is a choice of this
// design; the map only states the threshold.
module rate_alarm #(
  parameter int unsigned LIMIT = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sec_tick,
  input  logic event_i,
  output logic alarm
);

  logic [7:0] cnt;
  logic [7:0] cnt_nxt;

  always_comb begin
    cnt_nxt = cnt;
    if (event_i && cnt != 8'hFF) cnt_nxt = cnt + 8'd1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= '0;
      alarm <= 1'b0;
    end else if (sec_tick) begin
      // close the window: keep the alarm only if it was exceeded in it
      alarm <= (cnt > 8'(LIMIT));
      cnt   <= event_i ? 8'd1 : 8'd0;
    end else begin
      cnt <= cnt_nxt;
      if (cnt_nxt > 8'(LIMIT)) alarm <= 1'b1;
    end
  end

endmodule
