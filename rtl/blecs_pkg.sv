// blecs_pkg: types and constants shared by the BLECS register map.
//
// The board answers a 24-bit byte address space (0x000000..0x7FFFFF) split into
// windows: three 2 MB SRAMs, a flash ROM window, the LOGIN status bank, the
// TEST RESULTS bank, the control register bank and the DAB64x control/status
// bank. The window limits below follow the board's address map. The request
// struct and the bus timing (one-cycle strobe, answer one cycle later) are a
// choice of this design; the map itself does not define a bus protocol.
package blecs_pkg;

  localparam int unsigned ADDR_W = 24;
  localparam int unsigned DATA_W = 32;

  // Window starts (byte addresses). A window ends where the next one starts.
  localparam logic [ADDR_W-1:0] PM_SRAM_BASE   = 24'h000000;
  localparam logic [ADDR_W-1:0] BD_SRAM_BASE   = 24'h200000;
  localparam logic [ADDR_W-1:0] XTRA_SRAM_BASE = 24'h400000;
  localparam logic [ADDR_W-1:0] FLASH_BASE     = 24'h600000;
  localparam logic [ADDR_W-1:0] LOGIN_BASE     = 24'h700000;
  localparam logic [ADDR_W-1:0] LOGIN_END      = 24'h702000;
  localparam logic [ADDR_W-1:0] TESTRES_BASE   = 24'h720000;
  localparam logic [ADDR_W-1:0] TESTRES_END    = 24'h722000;
  localparam logic [ADDR_W-1:0] CTRL_BASE      = 24'h7E0000;
  localparam logic [ADDR_W-1:0] DAB_BASE       = 24'h7F0000;
  localparam logic [ADDR_W-1:0] DAB_END        = 24'h800000;

  typedef enum logic [3:0] {
    RG_PM_SRAM   = 4'd0,
    RG_BD_SRAM   = 4'd1,
    RG_XTRA_SRAM = 4'd2,
    RG_FLASH     = 4'd3,
    RG_LOGIN     = 4'd4,
    RG_TESTRES   = 4'd5,
    RG_CTRL      = 4'd6,
    RG_DAB       = 4'd7,
    RG_SPARE     = 4'd8
  } region_e;

  // One bus request; valid is a single-cycle strobe.
  typedef struct packed {
    logic              valid;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } bus_req_t;

  // Number of pending-test flags (Tests Request bits 31..16, LOGIN 700000 bits 23..8).
  localparam int unsigned N_TESTREQ = 16;

  // Effective expert manual controls (Manual Control register 7E0004).
  typedef struct packed {
    logic       active;        // bit 31, accepted only in system test + manual control
    logic       force_tc_dump; // bit 30
    logic [3:0] dump_tc;       // bits 29..26
    logic       send_energy;   // bit 25
    logic [4:0] energy;        // bits 24..20
    logic       force_dump_u;  // bit 19
    logic       force_dump_m;  // bit 18
    logic       force_bp;      // bit 17
    logic       bp_ua;         // bit 16
    logic       bp_ub;         // bit 15
    logic       bp_ma;         // bit 14
    logic       bp_mb;         // bit 13
  } manual_t;

  // Signals shown in the LOGIN bank. Levels unless marked as pulses.
  typedef struct packed {
    logic [7:0]  sys_status;    // 700000 bits 31..24: SYS.OP TEST T.REQ PM HV BE ORBCK DUMP
    logic [10:0] active_tests;  // 70000C bits 31..21
    logic        test_done;     // pulse: system test finished
    logic [5:0]  test_result;   // 700014 bits 31,30,29,26,25,24 (28, 27 are spare)
    logic [11:0] bp_lines;      // 70001C bits 31..20
    logic        dump_u;        // pulse: unmaskable dump
    logic        dump_m;        // pulse: maskable dump
    logic        resp_a;        // pulse: beam info A responded
    logic        resp_b;        // pulse: beam info B responded
    logic [31:0] turn_cnt;
    logic [11:0] bunch_cnt;
    logic [15:0] energy_in;     // 700028 bits 31..16
    logic [4:0]  energy_out;    // bits 15..11
    logic        energy_err;    // bit 10
    logic        bpl_test_act;  // bit 4
    logic [3:0]  bpl_test_tc;   // bits 3..0
    logic        frame_a;       // pulses from the CTRV receiver
    logic        frame_b;
    logic        crc_err_a;
    logic        crc_err_b;
    logic        tmo_a;
    logic        tmo_b;
    logic        tmo_energy;
    logic [3:0]  hv1_flags;     // 700048 bits 31..28
    logic [23:0] hv1_volt;
    logic [3:0]  hv2_flags;     // 70004C bits 31..28
    logic [23:0] hv2_volt;
    logic [15:0] hv1_curr;      // 700050
    logic [15:0] hv2_curr;
    logic [12:0] vme_3v3;       // 700054
    logic [12:0] vme_5v;
    logic [12:0] ana_5v;        // 700058
    logic [12:0] ana_5vref;
    logic [4:0]  lv_ok;         // 70005C..70006C bit 31, in address order
  } login_in_t;

  // Identification and monitoring bytes of the DAB64x bank.
  typedef struct packed {
    logic [15:0] rev_adc;       // 7F0004 high byte, 7F0005 low byte
    logic [31:0] rev_date;      // 7F0014..7F0017 letter, MM, DD, yy
    logic [31:0] temp_power;    // 7F0018..7F001B
    logic [63:0] serial;        // 7F003C..7F0043, most significant byte first
  } dab_ident_t;

endpackage
