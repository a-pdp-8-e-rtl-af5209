// address_decoder: device select logic of the Heath interface.
//
// During an IOT the processor grounds I/O PAUSE and puts the instruction
// on MD 0-11. This block looks at the device code in MD 3-8 while I/O PAUSE
// is low: code RDR_DEV (01) grounds sel_rdr_n ("601X L"), code PUN_DEV
// (02) grounds sel_pun_n ("602X L"), and either grounds INTERNAL I/O so
// the processor's positive I/O bus interface makes no IOP pulses and uses
// the short IOT timing. io_pause_buf_n is I/O PAUSE buffered for the
// operation-bit gates of the operations decoder.
//
// The decode, the gating by I/O PAUSE and the INTERNAL I/O output follow
// the document's gate-level diagram; it is written here as equations, not
// as its NOR gates. The device codes are parameters whose defaults are the
// document's. Purely combinational.
`timescale 1ns / 1ps

module address_decoder
  import heath_pkg::RDR_DEV_CODE, heath_pkg::PUN_DEV_CODE;
#(
  parameter logic [5:0] RDR_DEV = RDR_DEV_CODE,
  parameter logic [5:0] PUN_DEV = PUN_DEV_CODE
) (
  input  logic       io_pause_n,      // OMNIBUS I/O PAUSE L
  input  logic [3:8] md_dev_n,        // OMNIBUS MD 3-8 L (PDP-8 bit order)
  output logic       io_pause_buf_n,  // buffered I/O PAUSE L
  output logic       sel_rdr_n,       // 601X L: reader addressed
  output logic       sel_pun_n,       // 602X L: punch addressed
  output logic       int_io_n         // OMNIBUS INTERNAL I/O L (open collector)
);

  logic [5:0] dev;
  logic       pause;

  assign pause          = ~io_pause_n;
  assign dev            = ~md_dev_n;   // MD 3 is the most significant bit
  assign io_pause_buf_n = io_pause_n;

  always_comb begin
    sel_rdr_n = ~(pause && dev == RDR_DEV);
    sel_pun_n = ~(pause && dev == PUN_DEV);
    int_io_n  = sel_rdr_n & sel_pun_n;
  end

endmodule
