// test_results_regs: the TEST RESULTS bank (byte offsets of 720000).
//
// A dual-ported word memory of 522 words holding what the test logic leaves
// for the control system and the settings it works from:
//   0x000, 0x004   HV applied during the CFC test, the DAC reset and the GOH reset
//   0x008          BPLTC: bits 31..16 TC 1..16 present, bits 15..0 their results
//   0x00C..0x014   HVLF (modulation test) setup: amplitude, frequency divider,
//                  digital multiplier, attenuators, offset voltage
//   0x018          decision threshold of the immediate test
//   0x01C, 0x020   HVLF time (upper and lower word)
//   0x024          HVLF overview: done, result, tested TC and channel counts
//   0x028 + 8*(n-1)  channel n (1..256): passed, amplitude, phase; then the
//                  long-term sine and cosine factors
// The bus side (port `req`) reads and writes every word; the test side
// (`loc_*`) does the same with its own address. Bus requests are answered on
// the next cycle with `ack` and `rdata`; offsets past 0x824 read zero. The
// word layout follows the board's map; storing it as one memory, written by
// both sides, is a choice of this design.
module test_results_regs
  import blecs_pkg::*;
#(
  parameter int unsigned WORDS = 522
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bus_req_t          req,
  output logic [DATA_W-1:0] rdata,
  output logic              ack,
  input  logic              loc_we,
  input  logic [10:0]       loc_addr,   // word index
  input  logic [31:0]       loc_wdata,
  output logic [31:0]       loc_rdata
);

  logic [31:0] a_rdata;
  logic        rd_q;

  dp_ram #(.WORDS(WORDS), .AW(11)) u_mem (
    .clk, .rst_n,
    .a_we    (req.valid && req.we),
    .a_addr  (req.addr[12:2]),
    .a_wdata (req.wdata),
    .a_rdata (a_rdata),
    .b_we    (loc_we),
    .b_addr  (loc_addr),
    .b_wdata (loc_wdata),
    .b_rdata (loc_rdata)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack  <= 1'b0;
      rd_q <= 1'b0;
    end else begin
      ack  <= req.valid;
      rd_q <= req.valid && !req.we;
    end
  end

  assign rdata = rd_q ? a_rdata : '0;

endmodule
