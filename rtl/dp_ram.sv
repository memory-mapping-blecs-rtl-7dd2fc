// dp_ram: word memory with two synchronous read/write ports.
//
// Port a serves the board bus, port b the logic that produces or consumes the
// data (acquisition, test sequencer). Both ports read with one cycle of
// latency: `x_rdata` holds the word at the address presented on the previous
// cycle, as it was before any write on that cycle (read-first). Addresses at or
// above WORDS read zero and ignore writes. When both ports write the same word
// on one cycle, port b wins. Reset clears only the read registers; the array
// itself is not cleared, so it maps onto a true dual-port block RAM.
module dp_ram #(
  parameter int unsigned WORDS = 576,
  parameter int unsigned AW    = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);

  localparam int unsigned IW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_we && 32'(a_addr) < WORDS && !(b_we && b_addr == a_addr)) mem[IW'(a_addr)] <= a_wdata;
    if (b_we && 32'(b_addr) < WORDS) mem[IW'(b_addr)] <= b_wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_rdata <= '0;
      b_rdata <= '0;
    end else begin
      a_rdata <= (32'(a_addr) < WORDS) ? mem[IW'(a_addr)] : '0;
      b_rdata <= (32'(b_addr) < WORDS) ? mem[IW'(b_addr)] : '0;
    end
  end

endmodule
