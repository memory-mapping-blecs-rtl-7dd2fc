// control_regs: the control register bank (byte offsets of 7E0000).
//
//   0x0000  Tests Request: writing 1 to bit 31..16 raises the matching pending
//           flag (user system, consistency, threshold-to-BPL, energy, BPBIS;
//           expert system ... expert manual control, in that order). Reading
//           returns the flags in bits 31..16. A flag drops when the test logic
//           pulses its bit of `test_ack`; a request on the same cycle wins.
//   0x0004  Manual Control. Bit 31 (activation) is accepted only while the
//           board is under system test and manual control is active
//           (`manual_allowed`), and clears when that condition falls. The
//           effective controls on `manual` are all zero unless activated.
//           Beam-permit forcing applies the A-over-B rule: forcing UA (MA)
//           true forces UB (MB) false.
//   0x0008  Present TC board table, bits 31..16, TC 1 in bit 31 (read/write).
//   0x000C..0x0018  BLECF status words HV, TESTCFC, RSTDAC, RSTGOH (read only).
//   0x0100..0x011C  Present channels table, 8 words of 32 channels, channel 1
//           in bit 31 of the first word (read/write).
//   0x1000..0x13FC  Running maximum no. 7 table, 256 channels: read only from
//           the bus, written by the acquisition side through `rm_*`.
//   0x1400..0x140C  Default HVLF control 1 and 2, default HV values 1 and 2
//           (read/write; spare bits 31..16 of HVLF control 2 read zero).
// Other offsets read zero and ignore writes. A request strobe `req.valid` is
// answered on the next cycle with `ack` and `rdata`. Register layout follows
// the board's map; the bus timing, reset to zero, the set/acknowledge scheme
// of the pending flags and the clearing of the activation bit are choices of
// this design.
module control_regs
  import blecs_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  bus_req_t             req,
  output logic [DATA_W-1:0]    rdata,
  output logic                 ack,
  // test requests
  output logic [N_TESTREQ-1:0] pending,
  input  logic [N_TESTREQ-1:0] test_ack,
  // manual control
  input  logic                 manual_allowed,
  output manual_t              manual,
  // configuration tables
  output logic [15:0]          tc_present,
  output logic [31:0]          present_ch [8],
  input  logic [31:0]          blecf_status [4],
  output logic [31:0]          defaults [4],
  // running maximum table write port
  input  logic                 rm_we,
  input  logic [7:0]           rm_addr,
  input  logic [31:0]          rm_wdata
);

  localparam logic [31:0] DEFAULT_MASK [4] = '{32'hFFFF_FFFF, 32'h0000_FFFF,
                                               32'hFFFF_FFFF, 32'hFFFF_FFFF};

  logic [13:0] widx;
  logic        wr, rd;
  logic [18:0] man_q;         // register bits 31..13
  logic        sel_rm_q;
  logic [31:0] reg_rdata_q, rm_rdata, unused_rm_b;

  assign widx = req.addr[15:2];
  assign wr   = req.valid &&  req.we;
  assign rd   = req.valid && !req.we;

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending    <= '0;
      man_q      <= '0;
      tc_present <= '0;
      for (int i = 0; i < 8; i++) present_ch[i] <= '0;
      for (int i = 0; i < 4; i++) defaults[i]   <= '0;
    end else begin
      pending <= (pending & ~test_ack) |
                 ((wr && widx == 14'd0) ? req.wdata[31:16] : '0);

      if (wr && widx == 14'd1) begin
        man_q <= req.wdata[31:13];
        if (!manual_allowed) man_q[18] <= 1'b0;
      end else if (!manual_allowed) begin
        man_q[18] <= 1'b0;
      end

      if (wr && widx == 14'd2) tc_present <= req.wdata[31:16];
      if (wr && widx >= 14'd64 && widx < 14'd72)
        present_ch[3'(widx - 14'd64)] <= req.wdata;
      if (wr && widx >= 14'd1280 && widx < 14'd1284)
        defaults[2'(widx - 14'd1280)] <= req.wdata & DEFAULT_MASK[2'(widx - 14'd1280)];
    end
  end

  // ---------------------------------------------------------------- manual control outputs
  logic man_on;
  assign man_on = man_q[18] && manual_allowed;

  always_comb begin
    manual = '0;
    if (man_on) begin
      manual.active        = 1'b1;
      manual.force_tc_dump = man_q[17];
      manual.dump_tc       = man_q[16:13];
      manual.send_energy   = man_q[12];
      manual.energy        = man_q[11:7];
      manual.force_dump_u  = man_q[6];
      manual.force_dump_m  = man_q[5];
      manual.force_bp      = man_q[4];
      manual.bp_ua         = man_q[3];
      manual.bp_ub         = man_q[2] & ~man_q[3];
      manual.bp_ma         = man_q[1];
      manual.bp_mb         = man_q[0] & ~man_q[1];
    end
  end

  // ---------------------------------------------------------------- running maximum table
  dp_ram #(.WORDS(256), .AW(8)) u_runmax (
    .clk, .rst_n,
    .a_we    (1'b0),
    .a_addr  (widx[7:0]),
    .a_wdata ('0),
    .a_rdata (rm_rdata),
    .b_we    (rm_we),
    .b_addr  (rm_addr),
    .b_wdata (rm_wdata),
    .b_rdata (unused_rm_b)
  );

  // ---------------------------------------------------------------- read path
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack         <= 1'b0;
      sel_rm_q    <= 1'b0;
      reg_rdata_q <= '0;
    end else begin
      ack         <= req.valid;
      sel_rm_q    <= rd && widx >= 14'd1024 && widx < 14'd1280;
      reg_rdata_q <= '0;
      if (rd) begin
        if (widx == 14'd0)                        reg_rdata_q <= {pending, 16'b0};
        else if (widx == 14'd1)                   reg_rdata_q <= {man_q, 13'b0};
        else if (widx == 14'd2)                   reg_rdata_q <= {tc_present, 16'b0};
        else if (widx >= 14'd3 && widx < 14'd7)   reg_rdata_q <= blecf_status[2'(widx - 14'd3)];
        else if (widx >= 14'd64 && widx < 14'd72) reg_rdata_q <= present_ch[3'(widx - 14'd64)];
        else if (widx >= 14'd1280 && widx < 14'd1284) reg_rdata_q <= defaults[2'(widx - 14'd1280)];
      end
    end
  end

  assign rdata = sel_rm_q ? rm_rdata : reg_rdata_q;

  a_ack_follows_req: assert property (@(posedge clk) disable iff (!rst_n) req.valid |=> ack);

endmodule
