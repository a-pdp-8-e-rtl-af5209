// tb_tape_punch_skip: checks PUNCH START, PUNCH STROBE and the punch skip
// for every combination of the punch IOT lines, TP 3 and PUNCH READY.
// Expected values: PUNCH START is low for any of 6022/6024/6026, PUNCH
// STROBE is low only while TP 3 is high during one of them, and SKIP is
// grounded for 6021 while PUNCH READY is high.
`timescale 1ns / 1ps

module tb_tape_punch_skip;
  import heath_pkg::*;

  iot_lines_t pun;
  logic       tp3, punch_ready, punch_strobe_n, punch_start_n, skip_n;
  int         checks = 0, failures = 0;

  tape_punch_skip dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (iot=%b tp3=%b ready=%b)", what, got, exp, pun,
               tp3, punch_ready);
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
      for (int t = 0; t < 2; t++) begin
        for (int r = 0; r < 2; r++) begin
          logic xfer;
          pun         = iot_lines_t'(4'(v));
          tp3         = 1'(t);
          punch_ready = 1'(r);
          #10;
          xfer = !pun.op2_n || !pun.op4_n || !pun.op6_n;
          check(punch_start_n, !xfer, "punch_start_n");
          check(punch_strobe_n, !(xfer && t == 1), "punch_strobe_n");
          check(skip_n, !(!pun.op1_n && r == 1), "skip_n");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
