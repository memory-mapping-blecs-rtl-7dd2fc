// addr_decoder: splits the board's 24-bit byte address space into windows.
//
// Purely combinational. The windows and their limits are those of the board's
// address map overview: PM SRAM 000000, BD SRAM 200000, Xtra SRAM 400000,
// flash ROM 600000, LOGIN 700000..701FFF, TEST RESULTS 720000..721FFF,
// control registers 7E0000..7EFFFF and DAB64x control/status 7F0000..7FFFFF.
// Everything else (702000..71FFFF, 722000..7DFFFF and 800000 and up) is spare.
// `offset` is the address minus the start of the selected window (the address
// itself for spare). The map gives two sizes for LOGIN and TEST RESULTS; the
// smaller ones, from the overview, are used here.
module addr_decoder
  import blecs_pkg::*;
(
  input  logic [ADDR_W-1:0] addr,
  output region_e           region,
  output logic [ADDR_W-1:0] offset
);

  always_comb begin
    region = RG_SPARE;
    offset = addr;
    if (addr < BD_SRAM_BASE) begin
      region = RG_PM_SRAM;   offset = addr - PM_SRAM_BASE;
    end else if (addr < XTRA_SRAM_BASE) begin
      region = RG_BD_SRAM;   offset = addr - BD_SRAM_BASE;
    end else if (addr < FLASH_BASE) begin
      region = RG_XTRA_SRAM; offset = addr - XTRA_SRAM_BASE;
    end else if (addr < LOGIN_BASE) begin
      region = RG_FLASH;     offset = addr - FLASH_BASE;
    end else if (addr < LOGIN_END) begin
      region = RG_LOGIN;     offset = addr - LOGIN_BASE;
    end else if (addr >= TESTRES_BASE && addr < TESTRES_END) begin
      region = RG_TESTRES;   offset = addr - TESTRES_BASE;
    end else if (addr >= CTRL_BASE && addr < DAB_BASE) begin
      region = RG_CTRL;      offset = addr - CTRL_BASE;
    end else if (addr >= DAB_BASE && addr < DAB_END) begin
      region = RG_DAB;       offset = addr - DAB_BASE;
    end
  end

endmodule
