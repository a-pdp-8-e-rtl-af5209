// tb_operations_decoder: exhaustive check of the IOT line decoding.
//
// Walks all operation codes MD 9-11, I/O PAUSE asserted and released, and
// the three legal select states (reader, punch, neither). The expected IOT
// lines are worked out here: line 60xK is low only when device x is
// selected, I/O PAUSE is asserted and the operation code is K.
`timescale 1ns / 1ps

module tb_operations_decoder;
  import heath_pkg::*;

  logic        io_pause_buf_n, sel_rdr_n, sel_pun_n;
  logic [9:11] md_op_n;
  iot_lines_t  rdr, pun;
  int          checks = 0, failures = 0;

  operations_decoder dut (.*);

  function automatic iot_lines_t expected(input bit sel, input bit pause, input int op);
    iot_lines_t e;
    e.op1_n = !(sel && pause && op == 1);
    e.op2_n = !(sel && pause && op == 2);
    e.op4_n = !(sel && pause && op == 4);
    e.op6_n = !(sel && pause && op == 6);
    return e;
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++) begin
      for (int p = 0; p < 2; p++) begin
        for (int op = 0; op < 8; op++) begin
          iot_lines_t er, ep;
          sel_rdr_n      = !(s == 1);
          sel_pun_n      = !(s == 2);
          io_pause_buf_n = 1'(p);
          md_op_n        = ~3'(op);
          #10;
          er = expected(s == 1, p == 0, op);
          ep = expected(s == 2, p == 0, op);
          checks++;
          if (rdr !== er) begin
            failures++;
            $display("FAIL rdr sel=%0d pause_n=%0d op=%0d: got %b expected %b", s, p, op, rdr, er);
          end
          checks++;
          if (pun !== ep) begin
            failures++;
            $display("FAIL pun sel=%0d pause_n=%0d op=%0d: got %b expected %b", s, p, op, pun, ep);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
