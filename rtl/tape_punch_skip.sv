// tape_punch_skip: punch control and punch skip logic.
//
// The decoder outputs 6022, 6024 and 6026 are open-collector lines tied
// into one active-low node. It goes to the Heath unit as PUNCH START, so
// each of those instructions starts a punch cycle for the length of the
// IOT. The node also enables PUNCH STROBE, which is low while TP 3 (the
// processor's 100 ns timing pulse) is high during such an IOT and opens
// the punch buffer latches. 6021 (PSF) grounds the OMNIBUS SKIP line while
// the Heath PUNCH READY line is high; the ready line itself serves as the
// punch flag. The logic is the document's; combinational, no clock.
`timescale 1ns / 1ps

module tape_punch_skip
  import heath_pkg::iot_lines_t;
(
  input  iot_lines_t pun,             // 6021, 6022, 6024, 6026 L
  input  logic       tp3,             // OMNIBUS TP 3 H
  input  logic       punch_ready,     // Heath PUNCH READY (high = ready)
  output logic       punch_strobe_n,  // PUNCH STROBE L to the punch buffer enable
  output logic       punch_start_n,   // Heath PUNCH START (low starts a cycle)
  output logic       skip_n           // OMNIBUS SKIP L (open collector)
);

  logic pun_xfer_n;

  always_comb begin
    pun_xfer_n     = pun.op2_n & pun.op4_n & pun.op6_n;
    punch_start_n  = pun_xfer_n;
    punch_strobe_n = ~(tp3 & ~pun_xfer_n);
    skip_n         = ~(~pun.op1_n & punch_ready);
  end

endmodule
