// Shared types and constants of the pixel converter / pixel router interface.
//
// The router reads a pixel converter daughter board through a memory-mapped
// bus: 32-bit data words, a 19-bit address whose bits 18..16 select one of
// five targets (event memory, control word 0, control word 1, flush event
// register, test/run register), and a 16-bit event memory address space.
// Each board stores up to eight events. The field positions of control
// word 0 and the split of control word 1 into start address (31..16) and end
// address (15..0) follow the interface definition; the descriptor struct is
// this design's internal representation of one stored event.
package pc_pkg;

  localparam int unsigned DATA_W    = 32;  // event data word width
  localparam int unsigned CONV_AW   = 19;  // converter address bits 18..0
  localparam int unsigned HS_AW     = 3;   // half stave select bits 21..19
  localparam int unsigned MEM_AW_D  = 16;  // event memory address space
  localparam int unsigned EVENTS_D  = 8;   // events stored per board
  localparam int unsigned BOARDS_D  = 6;   // daughter boards (half staves)
  localparam int unsigned EVNUM_W   = 9;   // event number field, bits 9..1

  // Targets selected by address bits 18..16.
  typedef enum logic [2:0] {
    REG_MEM     = 3'b000,  // event data
    REG_CTRL0   = 3'b001,  // control word 0 (event status)
    REG_CTRL1   = 3'b010,  // control word 1 (start/end address)
    REG_FLUSH   = 3'b011,  // flush event register (write only)
    REG_TESTRUN = 3'b100,  // test/run register
    REG_NONE    = 3'b111   // unmapped
  } region_e;

  // Bit positions in control word 0.
  localparam int unsigned C0_READY      = 0;
  localparam int unsigned C0_EVNUM_LSB  = 1;   // bits 9..1
  localparam int unsigned C0_PARITY     = 10;
  localparam int unsigned C0_LINKDOWN   = 11;
  localparam int unsigned C0_FORMAT     = 12;
  localparam int unsigned C0_SEU        = 13;
  localparam int unsigned C0_PIXCTRL    = 14;
  localparam int unsigned C0_TEMPHIGH   = 15;
  localparam int unsigned C0_LINKREADY  = 16;

  // Board status that belongs to no single event; copied into every
  // control word 0.
  typedef struct packed {
    logic link_ready;
    logic temp_high;
    logic pixel_ctrl_err;
    logic seu_err;
  } board_status_t;

  // Per-event error flags accumulated while the event is received.
  typedef struct packed {
    logic format_err;
    logic link_down_err;
    logic parity_err;
  } event_err_t;

  // One stored event.
  typedef struct packed {
    logic [MEM_AW_D-1:0] start_addr;
    logic [MEM_AW_D-1:0] end_addr;
    event_err_t          err;
  } event_desc_t;

endpackage
