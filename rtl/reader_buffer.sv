// reader_buffer: puts the reader character on the OMNIBUS DATA bus.
//
// Eight open-collector two-input gates combine READ HOLE 1-8 (Heath data
// output lines 0-7, high = hole) with RDR DATA STROBE: while the strobe is
// high each hole grounds its DATA line, so the character appears on
// DATA 4-11 (active low) with Heath line 7 on DATA 4 and line 0 on DATA 11.
// A released line reads 1 here, so the board's outputs can be combined with
// other drivers by a bitwise AND. The same 6012/6014/6016 node grounds C0
// and C1, telling the processor to take the DATA bus into the AC. Logic and
// bit order are the document's; combinational.
`timescale 1ns / 1ps

module reader_buffer (
  input  logic       rdr_xfer_n,       // wired 6012/6014/6016 L node
  input  logic       rdr_data_strobe,  // RDR DATA STROBE H
  input  logic [7:0] read_hole,        // Heath data output lines 7..0 (READ HOLE 8..1)
  output logic [4:11] data_n,          // OMNIBUS DATA 4-11 L (open collector, 1 = released)
  output logic       c0_n,             // OMNIBUS C0 L (open collector)
  output logic       c1_n              // OMNIBUS C1 L (open collector)
);

  always_comb begin
    data_n = ~(read_hole & {8{rdr_data_strobe}});
    c0_n   = rdr_xfer_n;
    c1_n   = rdr_xfer_n;
  end

endmodule
