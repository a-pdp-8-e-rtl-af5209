// tb_punch_buffer: checks the punch character latches.
//
// Sequence: reset by 6022, load random characters through a PUNCH STROBE
// pulse with the punch addressed, then change the DATA bus with the strobe
// released and check the character is held. Also checks transparency while
// the strobe is low, that a strobe without the punch addressed loads zero
// (the data gates are closed), and that reset wins over enable. Expected
// values come from a reference copy of the character kept here.
`timescale 1ns / 1ps

module tb_punch_buffer;

  logic [4:11] data_n;
  logic        sel_pun_n, punch_strobe_n, pcf_n;
  logic [7:0]  punch_hole;
  logic [7:0]  model;
  int          checks = 0, failures = 0;

  punch_buffer dut (.*);

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (punch_hole !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, punch_hole, exp);
    end
  endtask

  // DATA bus value for a character: active low, Heath line 7 on DATA 4.
  function automatic logic [4:11] bus(input logic [7:0] ch);
    logic [4:11] b;
    for (int line = 0; line < 8; line++) b[11 - line] = !ch[line];
    return b;
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_n = '1; sel_pun_n = 1; punch_strobe_n = 1; pcf_n = 1;
    #10;
    // 6022: reset with the strobe active, as during TP 3 of a 6022 IOT.
    data_n = bus(8'hff); sel_pun_n = 0; pcf_n = 0; #20;
    punch_strobe_n = 0; #100; punch_strobe_n = 1; #20;
    pcf_n = 1; sel_pun_n = 1; data_n = '1; #20;
    model = 8'h00;
    check(model, "after 6022 reset");

    for (int i = 0; i < 200; i++) begin
      logic [7:0] ch;
      ch = 8'($urandom);
      // 6024/6026 IOT: punch addressed, AC on the bus, TP 3 pulse.
      sel_pun_n = 0; data_n = bus(ch); #100;
      punch_strobe_n = 0; #50;
      check(ch, "transparent during strobe");
      #50; punch_strobe_n = 1; model = ch; #50;
      // End of the IOT: other traffic on the bus must not reach the holes.
      sel_pun_n = 1; data_n = bus(8'($urandom)); #100;
      check(model, "held after the IOT");
      sel_pun_n = 0; data_n = bus(~model); #50;
      check(model, "held with punch addressed but no strobe");
      sel_pun_n = 1; #50;
    end

    // Strobe with the punch not addressed: data gates closed, zero latched.
    data_n = bus(8'h5a); punch_strobe_n = 0; #50; punch_strobe_n = 1; #50;
    check(8'h00, "strobe without 602X");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
