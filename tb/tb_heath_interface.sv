// tb_heath_interface: end-to-end test of the interface board between a
// model of the PDP-8/E IOT bus cycle and a model of the Heath H10.
//
// The processor model runs IOT instructions the way the high-speed
// reader/punch handler does: it polls 6011 (RSF) until SKIP, then reads the
// character with 6014, 6012 or 6016; it polls 6021 (PSF) and punches with
// 6022, 6024 or 6026. One IOT takes 1.2 us: I/O PAUSE low with the
// instruction on MD, TP 3 high from 400 to 500 ns, SKIP and the DATA bus
// sampled at the leading edge of TP 3. The processor drives the AC onto the
// DATA bus unless the board grounds C0 and C1; the bus is the AND of both
// open-collector drivers. A poll loop adds a 1.2 us JMP between IOTs.
//
// Checked: every character read equals the tape, every character punched
// equals the AC sent (6022 punches a blank), C0/C1 and INTERNAL I/O during
// the board's IOTs and never during a foreign IOT, and the H10 handshake
// rules; also that SKIP is valid 50 ns before TP 3. Rates: each character
// read takes the reader's 16.5 ms plus at most two poll loops, and each
// punched character 100 ms plus at most two poll loops, so the board adds
// no delay of its own. Every mechanism (both
// skips taken and not taken, each read and punch instruction, buffer clear,
// foreign device ignored) must happen at least once.
`timescale 1ns / 1ps

module tb_heath_interface;

  localparam int      TAPE_LEN  = 24;
  localparam int      N_PUNCH   = 6;
  localparam realtime IOT_TIME  = 1200ns;
  localparam realtime READ_CYC  = 16.5ms;
  localparam realtime PUN_CYC   = 100ms;
  localparam realtime SLACK     = 2 * 2 * IOT_TIME;

  logic        io_pause_n = 1'b1;
  logic [3:11] md_n = '1;
  logic        tp3 = 1'b0;
  logic [4:11] data_in_n, data_out_n, cpu_data_n;
  logic        c0_n, c1_n, skip_n, int_io_n;
  logic [7:0]  read_hole, punch_hole;
  logic        reader_ready_n, reader_start_n, punch_ready, punch_start_n;
  logic [0:11] ac = '0;

  int checks = 0, failures = 0;
  bit skip_early;
  localparam logic [11:0] FOREIGN [4] = '{12'o6031, 12'o6046, 12'o6034, 12'o6001};

  // Mechanism counters.
  int n_rsf_skip, n_rsf_noskip, n_psf_skip, n_psf_noskip;
  int n_rrb, n_rfc, n_rrb_rfc, n_pcf, n_ppc, n_pls, n_foreign;

  heath_interface dut (.*);

  h10_model #(.TAPE_LEN(TAPE_LEN)) h10 (
    .read_hole      (read_hole),
    .reader_ready_n (reader_ready_n),
    .reader_start_n (reader_start_n),
    .punch_hole     (punch_hole),
    .punch_ready    (punch_ready),
    .punch_start_n  (punch_start_n)
  );

  // Processor drives AC 4-11 unless the device asks to place data itself.
  assign cpu_data_n = (!c0_n && !c1_n) ? '1 : ~ac[4:11];
  assign data_in_n  = cpu_data_n & data_out_n;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t FAIL %s", $realtime, what);
    end
  endtask

  // One IOT bus cycle. Returns the SKIP and the DATA bus seen at TP 3.
  task automatic iot(input logic [11:0] instr, output bit skip, output logic [7:0] data,
                     output bit c_lines, output bit internal);
    md_n       = ~instr[8:0];
    io_pause_n = 1'b0;
    #350ns;
    // SKIP must already be valid 50 ns before TP 3, for the flag as it is then.
    skip_early = (instr == 12'o6011) ? !reader_ready_n :
                 (instr == 12'o6021) ? punch_ready : 1'b0;
    check(!skip_n == skip_early, $sformatf("SKIP valid 50 ns before TP 3 (IOT %o)", instr));
    #50ns;
    tp3      = 1'b1;
    skip     = !skip_n;
    data     = ~data_in_n;
    c_lines  = !c0_n && !c1_n;
    internal = !int_io_n;
    #100ns tp3 = 1'b0;
    #100ns io_pause_n = 1'b1;
    md_n = '1;
    #600ns;
  endtask

  // Poll a skip IOT until it skips (JMP .-1 loop).
  task automatic wait_flag(input logic [11:0] skip_instr);
    bit s, c, i;
    logic [7:0] d;
    forever begin
      iot(skip_instr, s, d, c, i);
      check(i, "INTERNAL I/O on a skip IOT");
      check(!c, "C lines idle on a skip IOT");
      if (s) begin
        if (skip_instr == 12'o6011) n_rsf_skip++; else n_psf_skip++;
        break;
      end
      if (skip_instr == 12'o6011) n_rsf_noskip++; else n_psf_noskip++;
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
    bit         s, c, i;
    logic [7:0] d;
    realtime    t_prev, t_now;

    n_rsf_skip = 0; n_rsf_noskip = 0; n_psf_skip = 0; n_psf_noskip = 0;
    n_rrb = 0; n_rfc = 0; n_rrb_rfc = 0; n_pcf = 0; n_ppc = 0; n_pls = 0; n_foreign = 0;
    #1us;

    // Foreign IOTs (keyboard 6031, teleprinter 6046, device 03 op 4) must
    // leave every board output alone.
    for (int k = 0; k < 4; k++) begin
      ac = 12'o7777;
      iot(FOREIGN[k], s, d, c, i);
      check(!s && !c && !i, $sformatf("foreign IOT %o ignored", FOREIGN[k]));
      check(reader_start_n && punch_start_n, "no handshake on a foreign IOT");
      n_foreign++;
    end

    // ---------------- Reading a tape ----------------
    t_prev = 0;
    for (int n = 0; n < TAPE_LEN; n++) begin
      logic [11:0] op;
      logic [7:0]  exp;
      exp = h10.tape_char(n);
      wait_flag(12'o6011);
      t_now = $realtime;
      if (n > 0) begin
        check(t_now - t_prev >= READ_CYC && t_now - t_prev <= READ_CYC + SLACK,
              $sformatf("reader character period %0t", t_now - t_prev));
      end
      t_prev = t_now;
      op = (n == 0) ? 12'o6014 : (n == 1) ? 12'o6012 : 12'o6016;
      ac = '0;
      iot(op, s, d, c, i);
      ac[4:11] = d;
      check(!s, "no skip on a read IOT");
      check(c && i, "C0, C1 and INTERNAL I/O on a read IOT");
      check(d == exp, $sformatf("char %0d read %02h expected %02h", n, d, exp));
      case (op)
        12'o6012: n_rrb++;
        12'o6014: n_rfc++;
        default:  n_rrb_rfc++;
      endcase
    end
    // The tape has run out: RSF must not skip any more.
    #(READ_CYC + 1ms);
    iot(12'o6011, s, d, c, i);
    check(!s, "no reader skip after the end of the tape");
    n_rsf_noskip++;

    // ---------------- Punching ----------------
    // 6022 clears the buffer and feeds one blank character.
    wait_flag(12'o6021);
    ac = 12'o0377;
    iot(12'o6022, s, d, c, i);
    check(i && !c && !s, "6022 bus lines");
    n_pcf++;
    t_prev = $realtime;
    for (int n = 0; n < N_PUNCH; n++) begin
      logic [11:0] op;
      wait_flag(12'o6021);
      t_now = $realtime;
      check(t_now - t_prev >= PUN_CYC - IOT_TIME && t_now - t_prev <= PUN_CYC + SLACK,
            $sformatf("punch character period %0t", t_now - t_prev));
      ac = {4'o0, 8'((n * 91 + 17) % 256)};
      op = n[0] ? 12'o6024 : 12'o6026;
      t_prev = $realtime;
      iot(op, s, d, c, i);
      check(i && !c && !s, "punch IOT bus lines");
      if (op == 12'o6024) n_ppc++; else n_pls++;
    end
    wait_flag(12'o6021);

    check(h10.violations == 0, $sformatf("H10 handshake violations: %0d", h10.violations));
    check(h10.n_punched == N_PUNCH + 1, $sformatf("punched %0d characters", h10.n_punched));
    check(h10.punched[0] == 8'h00, "6022 punches a blank");
    for (int n = 0; n < N_PUNCH; n++)
      check(h10.punched[n + 1] == 8'((n * 91 + 17) % 256),
            $sformatf("punched char %0d = %02h", n, h10.punched[n + 1]));

    // Every mechanism must have happened.
    check(n_rsf_skip > 0 && n_rsf_noskip > 0, "reader skip taken and not taken");
    check(n_psf_skip > 0 && n_psf_noskip > 0, "punch skip taken and not taken");
    check(n_rrb > 0 && n_rfc > 0 && n_rrb_rfc > 0, "6012, 6014 and 6016 used");
    check(n_pcf > 0 && n_ppc > 0 && n_pls > 0, "6022, 6024 and 6026 used");
    check(n_foreign > 0, "foreign IOTs seen");
    $display("mechanisms: RSF skip %0d/no %0d, PSF skip %0d/no %0d, 6012 %0d 6014 %0d 6016 %0d, 6022 %0d 6024 %0d 6026 %0d, foreign %0d",
             n_rsf_skip, n_rsf_noskip, n_psf_skip, n_psf_noskip, n_rrb, n_rfc, n_rrb_rfc,
             n_pcf, n_ppc, n_pls, n_foreign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
