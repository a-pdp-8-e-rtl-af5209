// h10_model: behavioural model of the Heath H10 paper tape reader/punch
// handshake, for simulation only (not synthesizable).
//
// Reader: a tape of TAPE_LEN characters, character i = (i * 37 + 5) mod 256,
// is loaded with character 0 under the head and READER READY low. A falling
// edge on READER START raises READER READY within 150 ns; READ_CYCLE
// (16.5 ms) after that edge the next character is in place on the data
// lines and READER READY falls again. The data lines keep the old character
// until the new one is in place. After the last character the tape has run
// out and READER READY stays high.
// Punch: PUNCH READY is high when idle. A falling edge on PUNCH START drops
// it within 150 ns; the character on the punch data lines is taken when
// PUNCH START returns high, must then stay unchanged for HOLD_TIME (25 ms),
// and PUNCH READY returns high PUNCH_CYCLE (100 ms, 10 characters per
// second) after the start edge.
// Rule checks, counted in `violations`: READER START only while READER READY
// is low and low for at least 100 ns, PUNCH START only while PUNCH READY is high, PUNCH START low for
// at least 200 ns and at most 80 ms, punch data stable during the hold time.
`timescale 1ns / 1ps

module h10_model #(
  parameter int      TAPE_LEN    = 32,
  parameter int      MAX_PUNCH   = 64,
  parameter realtime READ_CYCLE  = 16.5ms,
  parameter realtime PUNCH_CYCLE = 100ms,
  parameter realtime HOLD_TIME   = 25ms
) (
  output logic [7:0] read_hole,
  output logic       reader_ready_n,
  input  logic       reader_start_n,
  input  logic [7:0] punch_hole,
  output logic       punch_ready,
  input  logic       punch_start_n
);

  int         violations = 0;
  int         tape_pos   = 0;
  int         n_punched  = 0;
  logic [7:0] punched[MAX_PUNCH];
  bit         hold_window = 0;

  function automatic logic [7:0] tape_char(input int i);
    return 8'((i * 37 + 5) % 256);
  endfunction

  initial begin
    read_hole      = tape_char(0);
    reader_ready_n = 1'b0;
    punch_ready    = 1'b1;
  end

  // Reader
  always @(negedge reader_start_n) begin
    if (reader_ready_n) begin
      violations++;
      $display("%t h10: READER START while READER READY high", $realtime);
    end else begin
      realtime t0;
      t0 = $realtime;
      #100ns;
      if (reader_start_n != 1'b0) begin
        violations++;
        $display("%t h10: READER START pulse shorter than 100 ns", $realtime);
      end
      #50ns reader_ready_n = 1'b1;
      #(READ_CYCLE - ($realtime - t0));
      if (tape_pos + 1 < TAPE_LEN) begin
        tape_pos++;
        read_hole      = tape_char(tape_pos);
        reader_ready_n = 1'b0;
      end
    end
  end

  // Punch
  always @(negedge punch_start_n) begin
    realtime    t0;
    logic [7:0] ch;
    t0 = $realtime;
    if (!punch_ready) begin
      violations++;
      $display("%t h10: PUNCH START while PUNCH READY low", $realtime);
    end else begin
      #150ns punch_ready = 1'b0;
      if (punch_start_n == 1'b0) @(posedge punch_start_n);
      if ($realtime - t0 < 200ns || $realtime - t0 > 80ms) begin
        violations++;
        $display("%t h10: PUNCH START pulse of %0t", $realtime, $realtime - t0);
      end
      ch = punch_hole;
      hold_window = 1;
      #(HOLD_TIME);
      hold_window = 0;
      if (n_punched < MAX_PUNCH) punched[n_punched] = ch;
      n_punched++;
      #(PUNCH_CYCLE - ($realtime - t0));
      punch_ready = 1'b1;
    end
  end

  always @(punch_hole) begin
    if (hold_window) begin
      violations++;
      $display("%t h10: punch data changed during the hold time", $realtime);
    end
  end

endmodule
