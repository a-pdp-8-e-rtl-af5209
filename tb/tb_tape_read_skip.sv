// tb_tape_read_skip: checks READER START, RDR DATA STROBE and the reader
// skip for every combination of the four reader IOT lines and READER READY.
// Expected values: the transfer node is low when any of 6012/6014/6016 is
// low; SKIP is grounded only for 6011 with READER READY low.
`timescale 1ns / 1ps

module tb_tape_read_skip;
  import heath_pkg::*;

  iot_lines_t rdr;
  logic       reader_ready_n, rdr_xfer_n, rdr_data_strobe, reader_start_n, skip_n;
  int         checks = 0, failures = 0;

  tape_read_skip dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (iot=%b ready_n=%b)", what, got, exp, rdr,
               reader_ready_n);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int r = 0; r < 2; r++) begin
        logic xfer;
        rdr            = iot_lines_t'(4'(v));
        reader_ready_n = 1'(r);
        #10;
        xfer = !rdr.op2_n || !rdr.op4_n || !rdr.op6_n;
        check(rdr_xfer_n, !xfer, "rdr_xfer_n");
        check(rdr_data_strobe, xfer, "rdr_data_strobe");
        check(reader_start_n, !xfer, "reader_start_n");
        check(skip_n, !(!rdr.op1_n && r == 0), "skip_n");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
