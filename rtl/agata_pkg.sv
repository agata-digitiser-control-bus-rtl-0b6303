// agata_pkg: shared types and constants of the digitiser control bus.
//
// The host stream starts with a Destination byte, three Length bytes
// (Length 0 is the most significant byte) and then 16-bit commands made of
// Command byte 0 and Command byte 1. Destination bit 7 selects the module
// (Core = 0, Segment = 1), bit 6 read (1) or write (0), bit 5 simple (0) or
// long (1) write; bits 4..0 are reserved zero. Command byte 0 repeats those
// three bits, then holds the sub-module address SM2..SM0 in bits 4..2 and
// two reserved zero bits. Command byte 1 is the address inside the item.
// These layouts follow the document. The link wire bundle and the sizes of
// the host byte streams are this design's own choices.
package agata_pkg;

  // Destination byte / top of Command byte 0
  typedef struct packed {
    logic       segment;   // bit 7: 0 = Core module, 1 = Segment module
    logic       read;      // bit 6: 1 = read, 0 = write
    logic       long_wr;   // bit 5: 1 = long write, 0 = simple write
    logic [4:0] rsvd;      // bits 4..0: reserved, zero
  } dest_t;

  typedef struct packed {
    logic       segment;   // bit 7, echoes Destination bit 7
    logic       read;      // bit 6, echoes Destination bit 6
    logic       long_wr;   // bit 5, echoes Destination bit 5
    logic [2:0] sm;        // bits 4..2: SM2 SM1 SM0, item inside the module
    logic [1:0] rsvd;      // bits 1..0: reserved, zero
  } cmd0_t;

  // Number of Virtex ADC devices per module; the SM code one above the last
  // Virtex addresses the main board (Core: SM=3, Segment: SM=4).
  localparam int unsigned CORE_NUM_VIRTEX = 3;
  localparam int unsigned SEG_NUM_VIRTEX  = 4;
  localparam int unsigned MAX_VIRTEX      = 4;

  // Length field width in bits (three bytes)
  localparam int unsigned LEN_W = 24;

  // One direction of a serial link: CLOCK and DATA (LVDS pairs on the board,
  // single logic levels here) and the active-low FRAME.
  typedef struct packed {
    logic clk;
    logic data;
    logic frame_n;
  } link_wires_t;

  localparam link_wires_t LINK_IDLE = '{clk: 1'b0, data: 1'b0, frame_n: 1'b1};

endpackage
