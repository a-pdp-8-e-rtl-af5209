// tape_read_skip: reader control and reader skip logic.
//
// The decoder outputs 6012, 6014 and 6016 are open-collector lines tied
// together into one active-low node, rdr_xfer_n. That node is sent to the
// Heath unit unchanged as READER START, so any of the three instructions
// gives READER START a high-to-low transition for the length of the IOT and
// the reader advances the tape one character. Inverted, the same node is
// RDR DATA STROBE, which opens the reader buffer gates so the character
// now over the photo array reaches the DATA bus during the same IOT.
// 6011 (RSF) grounds the OMNIBUS SKIP line while READER READY is low,
// which is how the Heath reader says a character is ready; this board keeps
// no flag flip-flop of its own. All of this is the document's logic;
// combinational, no clock.
`timescale 1ns / 1ps

module tape_read_skip
  import heath_pkg::iot_lines_t;
(
  input  iot_lines_t rdr,              // 6011, 6012, 6014, 6016 L
  input  logic       reader_ready_n,   // Heath READER READY (low = data valid)
  output logic       rdr_xfer_n,       // wired 6012/6014/6016 L node
  output logic       rdr_data_strobe,  // RDR DATA STROBE H to the reader buffer
  output logic       reader_start_n,   // Heath READER START (low pulse advances tape)
  output logic       skip_n            // OMNIBUS SKIP L (open collector)
);

  always_comb begin
    rdr_xfer_n      = rdr.op2_n & rdr.op4_n & rdr.op6_n;
    rdr_data_strobe = ~rdr_xfer_n;
    reader_start_n  = rdr_xfer_n;
    skip_n          = ~(~rdr.op1_n & ~reader_ready_n);
  end

endmodule
