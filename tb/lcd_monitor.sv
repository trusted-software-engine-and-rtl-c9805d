// lcd_monitor: behavioural model of the HD44780-style character LCD
// (simulation only). It samples RS and the four data lines on each falling
// edge of E. Until the 4-bit bus is selected (an upper nibble of 0x2) each
// pulse is one whole command; after that two pulses make one byte, high
// nibble first. It keeps the 128-byte display RAM, the address counter and
// counts of commands and data writes; line 1 is RAM 0x00-0x0F and line 2 is
// RAM 0x40-0x4F.
module lcd_monitor (
  input logic       lcd_e,
  input logic       lcd_rs,
  input logic       lcd_rw,
  input logic [3:0] lcd_d
);
  logic [7:0]  ddram [128];
  logic [6:0]  addr;
  bit          four_bit, have_high;
  logic [3:0]  high;
  logic        high_rs;
  int unsigned cmds, data_writes, rs_mismatch, rw_writes_high, line2_writes;

  initial begin
    for (int i = 0; i < 128; i++) ddram[i] = 8'h20;
    addr = 0; four_bit = 0; have_high = 0; high = 0; high_rs = 0;
    cmds = 0; data_writes = 0; rs_mismatch = 0; rw_writes_high = 0; line2_writes = 0;
  end

  function automatic void execute(logic rs, logic [7:0] b);
    if (rs) begin
      ddram[addr] = b;
      if (addr >= 7'h40) line2_writes++;
      addr = addr + 1;
      data_writes++;
    end else begin
      cmds++;
      if (b[7]) addr = b[6:0];
      else if (b == 8'h01) begin
        for (int i = 0; i < 128; i++) ddram[i] = 8'h20;
        addr = 0;
      end
    end
  endfunction

  always @(negedge lcd_e) begin
    if (lcd_rw) rw_writes_high++;
    if (!four_bit) begin
      cmds++;
      if (lcd_d == 4'h2) four_bit = 1;
    end else if (!have_high) begin
      high = lcd_d; high_rs = lcd_rs; have_high = 1;
    end else begin
      if (high_rs != lcd_rs) rs_mismatch++;
      execute(lcd_rs, {high, lcd_d});
      have_high = 0;
    end
  end

  function automatic logic [7:0] at(int line, int col);
    return ddram[(line == 0 ? 0 : 64) + col];
  endfunction
endmodule
