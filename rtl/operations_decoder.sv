// operations_decoder: turns an addressed IOT into one of the named IOT lines.
//
// Each device has its own 8251 BCD-to-decimal decoder. Its C, B and A
// inputs are MD 9, MD 10 and MD 11, gated by the buffered I/O PAUSE so they
// are all zero between IOTs; its D input is the device select from the
// address decoder (601X L for the reader, 602X L for the punch), so a
// decoder only answers while its device is addressed. Outputs 1, 2, 4 and
// 6 become the IOT lines 60x1, 60x2, 60x4 and 60x6 (active low); the other
// outputs are not used. Because the decoders are one-of-ten, only one
// function is on during an IOT, and 60x6 is its own line rather than the
// sum of 60x2 and 60x4. This is the document's structure. Combinational.
`timescale 1ns / 1ps

module operations_decoder
  import heath_pkg::iot_lines_t, heath_pkg::OP_SKIP, heath_pkg::OP_2, heath_pkg::OP_4,
         heath_pkg::OP_6;
(
  input  logic        io_pause_buf_n,  // buffered I/O PAUSE L
  input  logic [9:11] md_op_n,         // OMNIBUS MD 9-11 L
  input  logic        sel_rdr_n,       // 601X L
  input  logic        sel_pun_n,       // 602X L
  output iot_lines_t  rdr,             // 6011, 6012, 6014, 6016 L
  output iot_lines_t  pun              // 6021, 6022, 6024, 6026 L
);

  logic [2:0] cba;
  logic [9:0] rdr_y_n, pun_y_n;

  // MD bit high and I/O PAUSE asserted: C = MD 9, B = MD 10, A = MD 11.
  assign cba = ~md_op_n & {3{~io_pause_buf_n}};

  bcd_decimal_decoder u_rdr_dec (.dcba({sel_rdr_n, cba}), .y_n(rdr_y_n));
  bcd_decimal_decoder u_pun_dec (.dcba({sel_pun_n, cba}), .y_n(pun_y_n));

  always_comb begin
    rdr = '{op1_n: rdr_y_n[OP_SKIP], op2_n: rdr_y_n[OP_2],
            op4_n: rdr_y_n[OP_4],    op6_n: rdr_y_n[OP_6]};
    pun = '{op1_n: pun_y_n[OP_SKIP], op2_n: pun_y_n[OP_2],
            op4_n: pun_y_n[OP_4],    op6_n: pun_y_n[OP_6]};
  end

  // Only one function may be turned on during any one IOT.
  always_comb begin
    assert ($countones({~rdr, ~pun}) <= 1)
      else $error("operations_decoder: more than one IOT line active");
  end

endmodule
