// tb_address_decoder: exhaustive check of the device select logic.
//
// Applies every device code 00-77 (octal) on MD 3-8 with I/O PAUSE both
// asserted and released and compares the three select outputs and the
// buffered I/O PAUSE with values computed here from the device codes 01
// (reader) and 02 (punch). Combinational block, so each vector is checked
// 10 ns after it is applied.
`timescale 1ns / 1ps

module tb_address_decoder;

  logic       io_pause_n;
  logic [3:8] md_dev_n;
  logic       io_pause_buf_n, sel_rdr_n, sel_pun_n, int_io_n;
  int         checks = 0, failures = 0;

  address_decoder dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (pause_n=%b md3-8=%o)", what, got, exp,
               io_pause_n, ~md_dev_n);
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
    for (int p = 0; p < 2; p++) begin
      for (int dev = 0; dev < 64; dev++) begin
        logic pause, exp_rdr, exp_pun;
        io_pause_n = 1'(p);
        md_dev_n   = ~6'(dev);
        #10;
        pause   = (p == 0);
        exp_rdr = pause && dev == 1;
        exp_pun = pause && dev == 2;
        check(sel_rdr_n, !exp_rdr, "sel_rdr_n");
        check(sel_pun_n, !exp_pun, "sel_pun_n");
        check(int_io_n, !(exp_rdr || exp_pun), "int_io_n");
        check(io_pause_buf_n, io_pause_n, "io_pause_buf_n");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
