// tb_tape_copy: copies a paper tape from the Heath reader to the Heath
// punch through the interface board, the way a copy program (or PIP moving
// a file from PTR to PTP) drives both halves of the board at once.
//
// For each character the processor model polls 6011, reads with 6016, polls
// 6021 and punches with 6026. The reader fetches the next character while
// the punch is still busy, so both Heath mechanisms run at the same time
// and the copy is paced by the punch. Checks: the punched tape equals the
// read tape, no H10 handshake rule is broken, and after the first
// character each punch IOT follows the previous one by one 100 ms punch
// cycle plus at most two poll loops (10 characters per second). IOT timing
// as in tb_heath_interface: 1.2 us per IOT, TP 3 from 400 to 500 ns.
`timescale 1ns / 1ps

module tb_tape_copy;

  localparam int      N_CHARS  = 10;
  localparam realtime IOT_TIME = 1200ns;
  localparam realtime PUN_CYC  = 100ms;
  localparam realtime SLACK    = 2 * 2 * IOT_TIME;

  logic        io_pause_n = 1'b1;
  logic [3:11] md_n = '1;
  logic        tp3 = 1'b0;
  logic [4:11] data_in_n, data_out_n;
  logic        c0_n, c1_n, skip_n, int_io_n;
  logic [7:0]  read_hole, punch_hole;
  logic        reader_ready_n, reader_start_n, punch_ready, punch_start_n;
  logic [0:11] ac = '0;
  int          checks = 0, failures = 0;
  int          overlap = 0;

  heath_interface dut (.*);

  h10_model #(.TAPE_LEN(N_CHARS + 1)) h10 (
    .read_hole      (read_hole),
    .reader_ready_n (reader_ready_n),
    .reader_start_n (reader_start_n),
    .punch_hole     (punch_hole),
    .punch_ready    (punch_ready),
    .punch_start_n  (punch_start_n)
  );

  assign data_in_n = ((!c0_n && !c1_n) ? '1 : ~ac[4:11]) & data_out_n;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t FAIL %s", $realtime, what);
    end
  endtask

  task automatic iot(input logic [11:0] instr, output bit skip, output logic [7:0] data);
    md_n       = ~instr[8:0];
    io_pause_n = 1'b0;
    #400ns;
    tp3  = 1'b1;
    skip = !skip_n;
    data = ~data_in_n;
    #100ns tp3 = 1'b0;
    #100ns io_pause_n = 1'b1;
    md_n = '1;
    #600ns;
  endtask

  task automatic wait_flag(input logic [11:0] skip_instr);
    bit         s;
    logic [7:0] d;
    forever begin
      iot(skip_instr, s, d);
      if (s) break;
      #(IOT_TIME);
    end
  endtask

  initial begin
    #3s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit         s;
    logic [7:0] d;
    realtime    t_prev;
    #1us;
    // Clear the punch flag and buffer first, as the handler does (one blank).
    iot(12'o6022, s, d);
    for (int n = 0; n < N_CHARS; n++) begin
      wait_flag(12'o6011);
      ac = '0;
      iot(12'o6016, s, d);
      ac[4:11] = d;
      check(d == h10.tape_char(n), $sformatf("char %0d read %02h", n, d));
      wait_flag(12'o6021);
      if (n > 0)
        check($realtime - t_prev >= PUN_CYC - IOT_TIME && $realtime - t_prev <= PUN_CYC + SLACK,
              $sformatf("punch period %0t", $realtime - t_prev));
      if (reader_ready_n == 1'b0 && n + 1 < N_CHARS) overlap++;
      t_prev = $realtime;
      iot(12'o6026, s, d);
    end
    wait_flag(12'o6021);
    check(h10.violations == 0, $sformatf("H10 handshake violations: %0d", h10.violations));
    check(h10.n_punched == N_CHARS + 1, $sformatf("punched %0d characters", h10.n_punched));
    for (int n = 0; n < N_CHARS; n++)
      check(h10.punched[n + 1] == h10.tape_char(n),
            $sformatf("copy char %0d = %02h", n, h10.punched[n + 1]));
    // The reader must have had the next character ready while the punch ran.
    check(overlap > 0, $sformatf("reader and punch busy at once %0d times", overlap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
