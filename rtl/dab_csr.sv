// dab_csr: the DAB64x control/status bank (byte offsets of 7F0000).
//
//   0x0000  flash ROM control/status (read/write, brought out on `flash_ctrl`)
//   0x0004  ADC board revision, high byte then low byte (bytes 2..3 reserved)
//   0x0014  revision letter, month, day, year
//   0x0018  FPGA temperature (two bytes) and two power-monitor status bytes
//   0x003C, 0x0040  serial number, upper and lower four bytes
//   0x0050..0x0058  PM, BD and Xtra SRAM read pointers (read/write; bit 31
//           selects a full (1) or partial (0) read)
//   0x0100..0x013C  collimation data, channels 1..16: each a 32-deep FIFO
//           filled by the acquisition side; a bus read returns the oldest
//           value and removes it (0 when empty)
//   0x0140  collimation overflow: bit 15 channel 1 .. bit 0 channel 16, set
//           when a value arrived at a full FIFO; writing 1 clears a bit
//   0xC000..0xC8FC  BLM memories, 576 words: logging A and B (128 each),
//           ESL A and B (16 each), ADC range (32), thresholds A and B (128
//           each); read/write from the bus and from the acquisition side
//           (`blm_*`, word index 0..575 from 0xC000)
// Other offsets read zero. Requests are answered on the next cycle with `ack`
// and `rdata`. Bytes are packed big-endian: the byte at the lowest address is
// bits 31..24. The map gives the layout and the FIFO depth; the bus timing,
// pop-on-read, write-one-to-clear and one shared memory for the BLM tables
// are choices of this design.
module dab_csr
  import blecs_pkg::*;
#(
  parameter int unsigned N_COLL    = 16,
  parameter int unsigned COLL_DEPTH = 32,
  parameter int unsigned MEM_WORDS = 576
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bus_req_t          req,
  output logic [DATA_W-1:0] rdata,
  output logic              ack,
  input  dab_ident_t        ident,
  output logic [31:0]       flash_ctrl,
  output logic [31:0]       rdptr [3],
  // collimation data from the acquisition side
  input  logic [N_COLL-1:0] coll_push,   // bit i: channel i+1
  input  logic [31:0]       coll_data [N_COLL],
  output logic [N_COLL-1:0] coll_ovf,    // bit i: channel i+1
  // acquisition port of the BLM memories
  input  logic              blm_we,
  input  logic [9:0]        blm_addr,
  input  logic [31:0]       blm_wdata,
  output logic [31:0]       blm_rdata
);

  logic [13:0] widx;
  logic        wr, rd;
  logic        sel_mem, sel_mem_q;
  logic [31:0] reg_rdata_q, mem_rdata;

  assign widx    = req.addr[15:2];
  assign wr      = req.valid &&  req.we;
  assign rd      = req.valid && !req.we;
  assign sel_mem = widx >= 14'h3000 && widx < 14'h3000 + 14'(MEM_WORDS);

  // ---------------------------------------------------------------- collimation FIFOs
  logic [N_COLL-1:0] pop, clr;
  logic [31:0]       head [N_COLL];
  logic [N_COLL-1:0] unused_empty, unused_full;

  for (genvar c = 0; c < int'(N_COLL); c++) begin : g_coll
    assign pop[c] = rd && widx == 14'(64 + c);
    // overflow register: channel 1 in bit 15
    assign clr[c] = wr && widx == 14'd80 && req.wdata[15 - c];
    coll_fifo #(.DEPTH(COLL_DEPTH), .WIDTH(32)) u_fifo (
      .clk, .rst_n,
      .push     (coll_push[c]),
      .din      (coll_data[c]),
      .pop      (pop[c]),
      .dout     (head[c]),
      .empty    (unused_empty[c]),
      .full     (unused_full[c]),
      .overflow (coll_ovf[c]),
      .clr_ovf  (clr[c])
    );
  end

  logic [15:0] ovf_word;
  always_comb begin
    ovf_word = '0;
    for (int c = 0; c < int'(N_COLL); c++) ovf_word[15 - c] = coll_ovf[c];
  end

  // ---------------------------------------------------------------- BLM memories
  dp_ram #(.WORDS(MEM_WORDS), .AW(10)) u_blm (
    .clk, .rst_n,
    .a_we    (wr && sel_mem),
    .a_addr  (10'(widx - 14'h3000)),
    .a_wdata (req.wdata),
    .a_rdata (mem_rdata),
    .b_we    (blm_we),
    .b_addr  (blm_addr),
    .b_wdata (blm_wdata),
    .b_rdata (blm_rdata)
  );

  // ---------------------------------------------------------------- registers and read path
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flash_ctrl  <= '0;
      for (int i = 0; i < 3; i++) rdptr[i] <= '0;
      ack         <= 1'b0;
      sel_mem_q   <= 1'b0;
      reg_rdata_q <= '0;
    end else begin
      if (wr && widx == 14'd0) flash_ctrl <= req.wdata;
      if (wr && widx >= 14'd20 && widx < 14'd23) rdptr[2'(widx - 14'd20)] <= req.wdata;

      ack         <= req.valid;
      sel_mem_q   <= rd && sel_mem;
      reg_rdata_q <= '0;
      if (rd) begin
        if (widx == 14'd0)                          reg_rdata_q <= flash_ctrl;
        else if (widx == 14'd1)                     reg_rdata_q <= {ident.rev_adc, 16'b0};
        else if (widx == 14'd5)                     reg_rdata_q <= ident.rev_date;
        else if (widx == 14'd6)                     reg_rdata_q <= ident.temp_power;
        else if (widx == 14'd15)                    reg_rdata_q <= ident.serial[63:32];
        else if (widx == 14'd16)                    reg_rdata_q <= ident.serial[31:0];
        else if (widx >= 14'd20 && widx < 14'd23)   reg_rdata_q <= rdptr[2'(widx - 14'd20)];
        else if (widx >= 14'd64 && widx < 14'(64 + N_COLL))
          reg_rdata_q <= head[4'(widx - 14'd64)];
        else if (widx == 14'd80)                    reg_rdata_q <= {16'b0, ovf_word};
      end
    end
  end

  assign rdata = sel_mem_q ? mem_rdata : reg_rdata_q;

endmodule
