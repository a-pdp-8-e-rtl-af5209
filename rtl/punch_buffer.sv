// punch_buffer: holds the character being punched.
//
// Eight gates pass DATA 4-11 (active low on the bus) as active-high data
// bits while the punch is addressed (602X L low). Two quad latches store
// them: the latches are transparent while PUNCH STROBE is low, which happens
// during TP 3 of a 6022, 6024 or 6026 IOT, and hold their contents
// afterwards, so the character stays on PUNCH HOLE 1-8 for the whole punch
// cycle and until the next punch instruction. The latch reset input is the
// 6022 line, so 6022 clears the buffer; reset wins over enable. DATA 4 goes
// to Heath input line 7 (PUNCH HOLE 8) and DATA 11 to line 0 (PUNCH HOLE 1).
//
// These are level-sensitive latches on purpose: the document builds the
// buffer from 9314 quad latches enabled by PUNCH STROBE. Nothing clears
// them at power-up; the document gives no initial state.
`timescale 1ns / 1ps

module punch_buffer (
  input  logic [4:11] data_n,          // OMNIBUS DATA 4-11 L, as seen on the bus
  input  logic        sel_pun_n,       // 602X L
  input  logic        punch_strobe_n,  // PUNCH STROBE L: latch enable
  input  logic        pcf_n,           // 6022 L: latch reset
  output logic [7:0]  punch_hole       // Heath data input lines 7..0 (PUNCH HOLE 8..1)
);

  logic [7:0] d;

  assign d = ~data_n & {8{~sel_pun_n}};

  always_latch begin
    if (!pcf_n)               punch_hole = '0;
    else if (!punch_strobe_n) punch_hole = d;
  end

endmodule
