// cc_pkg: constants and types shared by the clock card logic.
//
// The clock card is the master card of a readout subrack. It derives the
// 25 MHz reference clock for the subrack, talks to every other card over the
// bus backplane (BB) and answers the real-time Linux computers over fibre.
// This package holds the numbers the card's description fixes (clock and
// scan rates, RAM and frame sizes, slot map) and the encodings this design
// chose where the description is silent (command opcodes, byte codes on the
// Cmd line and on the Power Card link).
package cc_pkg;

  // Rates (reference clock 25 MHz, line scan 800 kHz, frame scan 20 kHz).
  localparam int unsigned REF_CLK_HZ = 25_000_000;
  localparam int unsigned LINE_HZ    = 800_000;
  localparam int unsigned FRAME_HZ   = 20_000;

  // On-board RAM: 2 MB, byte wide.
  localparam int unsigned RAM_AW = 21;

  // Largest configuration image (EP1S40): 1550 kB.
  localparam int unsigned EP1S40_IMAGE_BYTES = 1550 * 1024;

  // Scientific frame: 5.12 KB, compiled from the four readout cards.
  localparam int unsigned SCI_FRAME_BYTES = 5120;
  localparam int unsigned N_RC            = 4;

  // RAM request, one per cycle; read data returns on the next cycle.
  typedef struct packed {
    logic              en;
    logic              we;
    logic [RAM_AW-1:0] addr;
    logic [7:0]        wdata;
  } ram_req_t;

  // Card types by backplane slot (slot 0 AC ... slot 8 CC, slot 9 PC).
  typedef enum logic [2:0] {
    CARD_AC   = 3'd0,
    CARD_BC   = 3'd1,
    CARD_RC   = 3'd2,
    CARD_CC   = 3'd3,
    CARD_PC   = 3'd4,
    CARD_NONE = 3'd7
  } card_type_e;

  // Sub-array wavelength band.
  typedef enum logic {
    BAND_450UM = 1'b0,
    BAND_850UM = 1'b1
  } band_e;

  // Decoded commands from the RTL computers (this design's own encoding).
  typedef enum logic [3:0] {
    OP_NOP            = 4'd0,
    OP_SET_MODE       = 4'd1,  // arg[0]: 0 = image storage, 1 = frame buffering
    OP_LOAD_IMAGE     = 4'd2,  // arg: image length in bytes
    OP_PROGRAM_JTAG   = 4'd3,  // shift the stored image into the JTAG chain
    OP_READ_FRAMES    = 4'd4,  // arg: number of consecutive frames
    OP_CARD_CMD       = 4'd5,  // arg[7:0]: byte for the Cmd line
    OP_POWER_RESET    = 4'd6,
    OP_CONFIG_RESET   = 4'd7,
    OP_REGISTER_RESET = 4'd8
  } host_op_e;

  // Byte codes on the Cmd line (this design's own).
  localparam logic [7:0] CMDB_DV        = 8'hD5;
  localparam logic [7:0] CMDB_PREPARE   = 8'hC1;
  localparam logic [7:0] CMDB_REG_RESET = 8'hC2;

  // Words to the Power Card (this design's own).
  localparam logic [7:0] PCW_POWER_DOWN   = 8'hA1;
  localparam logic [7:0] PCW_CONFIG_RESET = 8'hA2;

endpackage
