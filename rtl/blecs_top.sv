// blecs_top: bus slave of the BLECS board, the complete register map.
//
// A request (`req`: one-cycle strobe, write flag, 24-bit byte address, 32-bit
// data) is decoded by addr_decoder into one of the board's windows:
//   000000 PM SRAM, 200000 BD SRAM, 400000 Xtra SRAM, 600000 flash ROM:
//          external memories; the request leaves on `ext_req` with the
//          address made relative to the window and `ext_sel` naming it, and
//          the answer comes back on `ext_rdata`/`ext_ack`.
//   700000 LOGIN status bank (login_regs)
//   720000 TEST RESULTS bank (test_results_regs)
//   7E0000 control registers (control_regs)
//   7F0000 DAB64x control/status bank (dab_csr)
//   spare  answered on the next cycle with zero data.
// The HVLF modulator drives the HV DAC from the default HVLF settings of the
// control bank while the HVLF test runs.
// Internal banks answer one cycle after the request. A new request may be
// issued only after the previous one was acknowledged (the bus master waits
// for `ack`); an assertion checks this. The test-request flags set in the
// control bank show up as "pending" bits of the LOGIN system word, and expert
// manual control is allowed while the LOGIN status says "system under test"
// (sys_status bit 6) and the active-test word shows manual control (bit 0 of
// active_tests). The address map is the board's; the bus protocol and these
// two links are this design's reading of it.
module blecs_top
  import blecs_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 40_000_000,
  parameter int unsigned NORMAL_TEST_S   = 72000,
  parameter int unsigned CRITICAL_TEST_S = 86400
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // board bus
  input  bus_req_t             req,
  output logic [DATA_W-1:0]    rdata,
  output logic                 ack,
  // external SRAM and flash windows
  output bus_req_t             ext_req,
  output region_e              ext_sel,
  input  logic [DATA_W-1:0]    ext_rdata,
  input  logic                 ext_ack,
  // LOGIN bank
  input  login_in_t            mon,
  output logic [1:0]           alarm_low,
  output logic [1:0]           alarm_medium,
  output logic                 alarm_hv,
  output logic                 test_req_normal,
  output logic                 test_req_priority,
  output logic                 sec_tick,
  // control bank
  output logic [N_TESTREQ-1:0] pending,
  input  logic [N_TESTREQ-1:0] test_ack,
  output manual_t              manual,
  output logic [15:0]          tc_present,
  output logic [31:0]          present_ch [8],
  input  logic [31:0]          blecf_status [4],
  output logic [31:0]          defaults [4],
  input  logic                 rm_we,
  input  logic [7:0]           rm_addr,
  input  logic [31:0]          rm_wdata,
  // TEST RESULTS bank, test side
  input  logic                 tr_we,
  input  logic [10:0]          tr_addr,
  input  logic [31:0]          tr_wdata,
  output logic [31:0]          tr_rdata,
  // DAB64x bank
  input  dab_ident_t           ident,
  output logic [31:0]          flash_ctrl,
  output logic [31:0]          rdptr [3],
  input  logic [15:0]          coll_push,
  input  logic [31:0]          coll_data [16],
  output logic [15:0]          coll_ovf,
  input  logic                 blm_we,
  input  logic [9:0]           blm_addr,
  input  logic [31:0]          blm_wdata,
  output logic [31:0]          blm_rdata,
  // HV DAC during the HVLF modulation test
  output logic [15:0]          hv_dac_code,
  output logic                 hv_dac_sample
);

  region_e           region;
  logic [ADDR_W-1:0] offset;
  bus_req_t          sub_req;
  logic              is_ext;

  addr_decoder u_dec (.addr(req.addr), .region, .offset);

  always_comb begin
    sub_req      = req;
    sub_req.addr = offset;
  end

  assign is_ext = region inside {RG_PM_SRAM, RG_BD_SRAM, RG_XTRA_SRAM, RG_FLASH};

  function automatic bus_req_t gate(input bus_req_t r, input logic en);
    bus_req_t g = r;
    g.valid = r.valid && en;
    return g;
  endfunction

  // ---------------------------------------------------------------- banks
  logic [DATA_W-1:0] login_rdata, tres_rdata, ctrl_rdata, dab_rdata;
  logic              login_ack, tres_ack, ctrl_ack, dab_ack;
  logic              manual_allowed;

  assign manual_allowed = mon.sys_status[6] && mon.active_tests[0];

  login_regs #(
    .CLK_HZ(CLK_HZ), .NORMAL_TEST_S(NORMAL_TEST_S), .CRITICAL_TEST_S(CRITICAL_TEST_S)
  ) u_login (
    .clk, .rst_n,
    .req   (gate(sub_req, region == RG_LOGIN)),
    .rdata (login_rdata), .ack (login_ack),
    .mon, .pending, .sec_tick, .alarm_low, .alarm_medium, .alarm_hv,
    .test_req_normal, .test_req_priority
  );

  test_results_regs u_tres (
    .clk, .rst_n,
    .req   (gate(sub_req, region == RG_TESTRES)),
    .rdata (tres_rdata), .ack (tres_ack),
    .loc_we (tr_we), .loc_addr (tr_addr), .loc_wdata (tr_wdata), .loc_rdata (tr_rdata)
  );

  control_regs u_ctrl (
    .clk, .rst_n,
    .req   (gate(sub_req, region == RG_CTRL)),
    .rdata (ctrl_rdata), .ack (ctrl_ack),
    .pending, .test_ack, .manual_allowed, .manual,
    .tc_present, .present_ch, .blecf_status, .defaults,
    .rm_we, .rm_addr, .rm_wdata
  );

  dab_csr u_dab (
    .clk, .rst_n,
    .req   (gate(sub_req, region == RG_DAB)),
    .rdata (dab_rdata), .ack (dab_ack),
    .ident, .flash_ctrl, .rdptr, .coll_push, .coll_data, .coll_ovf,
    .blm_we, .blm_addr, .blm_wdata, .blm_rdata
  );

  // ---------------------------------------------------------------- HVLF modulation
  // Runs while the board is under system test (sys_status bit 6) and the HVLF
  // test is active (70000C bit 25, active_tests bit 4), from the default HVLF
  // control words 7E1400 (bias 31..16, multiplier 7..0) and 7E1404 (division).
  logic [7:0] unused_phase;

  hvlf_modulator #(.CLK_HZ(CLK_HZ)) u_hvlf (
    .clk, .rst_n,
    .enable   (mon.sys_status[6] && mon.active_tests[4]),
    .bias     (defaults[0][31:16]),
    .mult     (defaults[0][7:0]),
    .freq_div (defaults[1][15:0]),
    .dac_code (hv_dac_code),
    .sample   (hv_dac_sample),
    .phase    (unused_phase)
  );

  // ---------------------------------------------------------------- external windows
  assign ext_req = gate(sub_req, is_ext);
  assign ext_sel = region;

  // ---------------------------------------------------------------- spare: zero on the next cycle
  logic spare_ack;
  always_ff @(posedge clk) begin
    if (!rst_n) spare_ack <= 1'b0;
    else        spare_ack <= req.valid && region == RG_SPARE;
  end

  // ---------------------------------------------------------------- answer merge
  // Only the addressed bank answers; the others keep ack and rdata at zero.
  assign ack   = login_ack | tres_ack | ctrl_ack | dab_ack | ext_ack | spare_ack;
  assign rdata = login_rdata | tres_rdata | ctrl_rdata | dab_rdata |
                 (ext_ack ? ext_rdata : '0);

  // one outstanding request at a time
  logic busy;
  always_ff @(posedge clk) begin
    if (!rst_n)         busy <= 1'b0;
    else if (req.valid) busy <= 1'b1;
    else if (ack)       busy <= 1'b0;
  end

  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n) req.valid |-> (!busy || ack));

endmodule
