// coll_fifo: one collimation data channel, a DEPTH-deep first-in first-out queue.
//
// The acquisition side pushes one WIDTH-bit value per `push`; the bus side
// reads the oldest value on `dout` and removes it with `pop`. `dout` shows the
// head of the queue combinationally and reads 0 when the queue is empty. A
// push into a full queue is dropped and sets the sticky `overflow` flag, which
// `clr_ovf` clears (a push overflowing on the clearing cycle wins). Push and
// pop on the same cycle are both served, also when the queue is full. Depth 32
// and one 32-bit word per value follow the board's register map; drop-on-full
// and the clear input are choices of this design.
module coll_fifo #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             overflow,
  input  logic             clr_ovf
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [PW:0]      count;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (PW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = empty ? '0 : mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + (PW+1)'(1);
        2'b01:   count <= count - (PW+1)'(1);
        default: count <= count;
      endcase
      if (push && !do_push)  overflow <= 1'b1;
      else if (clr_ovf)      overflow <= 1'b0;
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= (PW+1)'(DEPTH));

endmodule
