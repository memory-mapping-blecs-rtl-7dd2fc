// dump_logger: beam dump bookkeeping of the LOGIN "User Beam Permit" words.
//
// On each dump pulse the matching 8-bit counter (unmaskable `cnt_u`, maskable
// `cnt_m`) increments, saturating at 255; the turn and bunch counters are
// latched into `turn_at_dump` / `bunch_at_dump`; and the two "beam info had
// responded to the last BLECS dump" flags are cleared. A later response pulse
// on `resp_a` / `resp_b` sets its flag. A response on the same cycle as a dump
// counts for that dump. All outputs are registered and clear at reset. The
// fields follow the board's register map; saturation and the flag rule are
// choices of this design.
module dump_logger (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dump_u,
  input  logic        dump_m,
  input  logic [31:0] turn_cnt,
  input  logic [11:0] bunch_cnt,
  input  logic        resp_a,
  input  logic        resp_b,
  output logic [7:0]  cnt_u,
  output logic [7:0]  cnt_m,
  output logic [31:0] turn_at_dump,
  output logic [11:0] bunch_at_dump,
  output logic        responded_a,
  output logic        responded_b
);

  logic dump;
  assign dump = dump_u | dump_m;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_u         <= '0;
      cnt_m         <= '0;
      turn_at_dump  <= '0;
      bunch_at_dump <= '0;
      responded_a   <= 1'b0;
      responded_b   <= 1'b0;
    end else begin
      if (dump_u && cnt_u != 8'hFF) cnt_u <= cnt_u + 8'd1;
      if (dump_m && cnt_m != 8'hFF) cnt_m <= cnt_m + 8'd1;
      if (dump) begin
        turn_at_dump  <= turn_cnt;
        bunch_at_dump <= bunch_cnt;
        responded_a   <= resp_a;
        responded_b   <= resp_b;
      end else begin
        if (resp_a) responded_a <= 1'b1;
        if (resp_b) responded_b <= 1'b1;
      end
    end
  end

endmodule
