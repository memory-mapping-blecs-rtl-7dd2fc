// tb_addr_decoder: checks the window decode of the board address map at every
// window edge and at random addresses, against a reference table written out
// separately from the decoder.
module tb_addr_decoder;
  import blecs_pkg::*;

  logic [23:0] addr;
  region_e     region;
  logic [23:0] offset;
  int checks = 0, failures = 0;

  addr_decoder dut (.addr, .region, .offset);

  // reference: {first address, last address, region}
  typedef struct { int unsigned lo, hi; region_e r; } win_t;
  win_t map [10] = '{
    '{32'h000000, 32'h1FFFFF, RG_PM_SRAM},
    '{32'h200000, 32'h3FFFFF, RG_BD_SRAM},
    '{32'h400000, 32'h5FFFFF, RG_XTRA_SRAM},
    '{32'h600000, 32'h6FFFFF, RG_FLASH},
    '{32'h700000, 32'h701FFF, RG_LOGIN},
    '{32'h702000, 32'h71FFFF, RG_SPARE},
    '{32'h720000, 32'h721FFF, RG_TESTRES},
    '{32'h722000, 32'h7DFFFF, RG_SPARE},
    '{32'h7E0000, 32'h7EFFFF, RG_CTRL},
    '{32'h7F0000, 32'h7FFFFF, RG_DAB}
  };

  task automatic check_addr(input int unsigned a);
    region_e     er = RG_SPARE;
    int unsigned eo = a;
    foreach (map[i]) if (a >= map[i].lo && a <= map[i].hi) begin
      er = map[i].r;
      eo = (er == RG_SPARE) ? a : a - map[i].lo;
    end
    addr = 24'(a);
    #1;
    checks++;
    if (region != er || offset != 24'(eo)) begin
      failures++;
      $display("FAIL addr %06h: region %0d offset %06h, expected %0d %06h", a, region, offset, er, eo);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (map[i]) begin
      check_addr(map[i].lo);
      check_addr(map[i].hi);
      check_addr(map[i].lo + (map[i].hi - map[i].lo) / 2);
    end
    check_addr(32'h800000);
    check_addr(32'hFFFFFF);
    repeat (2000) check_addr($urandom_range(32'hFFFFFF, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
