// heath_pkg: constants and types shared by the PDP-8/E to Heath H10
// paper tape reader/punch interface.
//
// The PDP-8/E IOT instruction is 6DDO (octal): MD 0-2 hold the opcode 6,
// MD 3-8 the six-bit device code and MD 9-11 the three operation bits.
// The reader answers to device 01 and the punch to device 02, so the
// instructions handled are 6011/6012/6014/6016 and 6021/6022/6024/6026.
// All OMNIBUS lines are active low ("_n") as they are on the bus itself;
// the Heath handshake lines keep the polarity of the Heath connector.
// Bus vectors use the PDP-8 bit numbering, bit 0 being the most
// significant, so they are declared with ascending ranges such as [4:11].
`timescale 1ns / 1ps

package heath_pkg;

  // Device codes decoded from MD 3-8.
  localparam logic [5:0] RDR_DEV_CODE = 6'o01;
  localparam logic [5:0] PUN_DEV_CODE = 6'o02;

  // Operation codes (MD 9-11) that this board decodes, for either device.
  // They double as the decoder output numbers, hence plain integers.
  localparam int unsigned OP_SKIP = 1;  // 6011 RSF / 6021 PSF
  localparam int unsigned OP_2    = 2;  // 6012 RRB / 6022 PCF
  localparam int unsigned OP_4    = 4;  // 6014 RFC / 6024 PPC
  localparam int unsigned OP_6    = 6;  // 6016 RRB,RFC / 6026 PLS

  // The four decoded IOT lines of one device, each active low, as they
  // leave one BCD-to-decimal decoder (outputs 1, 2, 4 and 6).
  typedef struct packed {
    logic op1_n;  // 60x1: skip on flag
    logic op2_n;  // 60x2
    logic op4_n;  // 60x4
    logic op6_n;  // 60x6: microprogram of 60x2 and 60x4
  } iot_lines_t;

endpackage
