// heath_interface: PDP-8/E OMNIBUS interface board for the Heath H10 paper
// tape reader/punch (top level).
//
// The board answers the eight IOT instructions of the DEC high-speed
// reader/punch, so the stock OS/8 handler drives it:
//   6011 RSF  skip if READER READY is low (a character is under the head)
//   6012 RRB, 6014 RFC, 6016 RRB RFC
//             put the character on DATA 4-11, ground C0 and C1 so the
//             processor loads it into the AC, and pulse READER START to
//             advance the tape (all three do the same on this board)
//   6021 PSF  skip if PUNCH READY is high
//   6022 PCF  clear the punch buffer and start a punch cycle
//   6024 PPC, 6026 PLS
//             latch AC 4-11 from the DATA bus at TP 3 and start a cycle
// The reader and punch flags of the DEC unit are the Heath ready lines
// themselves; there is no flag flip-flop on the board. Bus lines are active
// low and open collector: an output of 1 means released, and the board's
// two SKIP drivers are combined by an AND here. data_in_n is the DATA bus
// as the board sees it (the processor's AC during punch IOTs); data_out_n
// is what the board pulls low. Everything is combinational except the punch
// buffer latches, which are transparent during TP 3 of a punch IOT. The
// structure (address decoder, operations decoder, tape read, tape punch,
// reader and punch buffers) follows the document.
`timescale 1ns / 1ps

module heath_interface
  import heath_pkg::RDR_DEV_CODE, heath_pkg::PUN_DEV_CODE, heath_pkg::iot_lines_t;
#(
  parameter logic [5:0] RDR_DEV = RDR_DEV_CODE,
  parameter logic [5:0] PUN_DEV = PUN_DEV_CODE
) (
  // OMNIBUS
  input  logic        io_pause_n,      // I/O PAUSE L
  input  logic [3:11] md_n,            // MD 3-11 L
  input  logic        tp3,             // TP 3 H
  input  logic [4:11] data_in_n,       // DATA 4-11 L as seen on the bus
  output logic [4:11] data_out_n,      // DATA 4-11 L driven by the board
  output logic        c0_n,            // C0 L
  output logic        c1_n,            // C1 L
  output logic        skip_n,          // SKIP L
  output logic        int_io_n,        // INTERNAL I/O L
  // Heath reader
  input  logic [7:0]  read_hole,       // data output lines 7..0
  input  logic        reader_ready_n,  // READER READY
  output logic        reader_start_n,  // READER START
  // Heath punch
  output logic [7:0]  punch_hole,      // data input lines 7..0
  input  logic        punch_ready,     // PUNCH READY
  output logic        punch_start_n    // PUNCH START
);

  logic       io_pause_buf_n, sel_rdr_n, sel_pun_n;
  iot_lines_t rdr, pun;
  logic       rdr_xfer_n, rdr_data_strobe, rdr_skip_n;
  logic       punch_strobe_n, pun_skip_n;

  address_decoder #(.RDR_DEV(RDR_DEV), .PUN_DEV(PUN_DEV)) u_addr (
    .io_pause_n     (io_pause_n),
    .md_dev_n       (md_n[3:8]),
    .io_pause_buf_n (io_pause_buf_n),
    .sel_rdr_n      (sel_rdr_n),
    .sel_pun_n      (sel_pun_n),
    .int_io_n       (int_io_n)
  );

  operations_decoder u_ops (
    .io_pause_buf_n (io_pause_buf_n),
    .md_op_n        (md_n[9:11]),
    .sel_rdr_n      (sel_rdr_n),
    .sel_pun_n      (sel_pun_n),
    .rdr            (rdr),
    .pun            (pun)
  );

  tape_read_skip u_read (
    .rdr             (rdr),
    .reader_ready_n  (reader_ready_n),
    .rdr_xfer_n      (rdr_xfer_n),
    .rdr_data_strobe (rdr_data_strobe),
    .reader_start_n  (reader_start_n),
    .skip_n          (rdr_skip_n)
  );

  reader_buffer u_rbuf (
    .rdr_xfer_n      (rdr_xfer_n),
    .rdr_data_strobe (rdr_data_strobe),
    .read_hole       (read_hole),
    .data_n          (data_out_n),
    .c0_n            (c0_n),
    .c1_n            (c1_n)
  );

  tape_punch_skip u_punch (
    .pun            (pun),
    .tp3            (tp3),
    .punch_ready    (punch_ready),
    .punch_strobe_n (punch_strobe_n),
    .punch_start_n  (punch_start_n),
    .skip_n         (pun_skip_n)
  );

  punch_buffer u_pbuf (
    .data_n         (data_in_n),
    .sel_pun_n      (sel_pun_n),
    .punch_strobe_n (punch_strobe_n),
    .pcf_n          (pun.op2_n),
    .punch_hole     (punch_hole)
  );

  // Open-collector SKIP drivers of the reader and punch sections.
  assign skip_n = rdr_skip_n & pun_skip_n;

endmodule
