// tb_reader_buffer: checks that the reader character reaches DATA 4-11 in
// the right bit order only while RDR DATA STROBE is high, and that C0 and
// C1 follow the 6012/6014/6016 node. Uses every 8-bit character pattern;
// the expected bus value is built bit by bit from the Heath line numbering
// (line 7 on DATA 4, line 0 on DATA 11).
`timescale 1ns / 1ps

module tb_reader_buffer;

  logic        rdr_xfer_n, rdr_data_strobe, c0_n, c1_n;
  logic [7:0]  read_hole;
  logic [4:11] data_n;
  int          checks = 0, failures = 0;

  reader_buffer dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ch = 0; ch < 256; ch++) begin
      for (int s = 0; s < 2; s++) begin
        logic [4:11] exp;
        read_hole       = 8'(ch);
        rdr_data_strobe = 1'(s);
        rdr_xfer_n      = !rdr_data_strobe;
        #10;
        for (int line = 0; line < 8; line++)
          exp[11 - line] = !(s == 1 && read_hole[line]);
        checks++;
        if (data_n !== exp) begin
          failures++;
          $display("FAIL data_n: char %02h strobe %0d got %b expected %b", ch, s, data_n, exp);
        end
        checks++;
        if (c0_n !== rdr_xfer_n || c1_n !== rdr_xfer_n) begin
          failures++;
          $display("FAIL c0_n/c1_n: got %b%b with node %b", c0_n, c1_n, rdr_xfer_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
