// fpsm_pkg - types and constants shared by the Field Programmable Sequencer
// and Memory (FPSM).
//
// A PMU word is 16 bits: an 8-bit Flag Field (the "opcode" of a microcode
// word) and an 8-bit Data Field (the "operand": next-state address or truth
// table data). The Flag Field holds CF[1:0] (carry flag), SCC[2:0] (selector
// control code) and SEQ[2:0] (signals for other PMUs), in that order from the
// most significant bit down. The field names and widths follow the document;
// placing CF in the top bits is this design's reading of the printed order.
//
// The four address paths of the selector are encoded by SCC[1:0]; SCC[2] is
// reserved. Which path gets which code is this design's choice.
//
// Signals between PMUs and switch boxes travel as 4-bit nibbles.
package fpsm_pkg;

  localparam int unsigned PMU_AW = 8;   // 256 words per PMU
  localparam int unsigned PMU_DW = 8;   // Data Field width

  typedef logic [3:0] nib_t;

  typedef struct packed {
    logic [1:0] cf;   // carry flag; cf[1] marks a terminal (conditional) word
    logic [2:0] scc;  // selector control code; scc[2] reserved
    logic [2:0] seq;  // levels sent to other PMUs while this word is current
  } flag_t;

  typedef struct packed {
    flag_t      flag;
    logic [7:0] data;
  } word_t;

  // Address paths of the selector (SCC[1:0] code)
  typedef enum logic [1:0] {
    PATH_INT = 2'b00,  // internal address: the Data Field of the current word
    PATH_INC = 2'b01,  // current address + 1
    PATH_CUR = 2'b10,  // current address (hold)
    PATH_EXT = 2'b11   // external address (external register or switch box)
  } path_e;

  // Switch box: source of each global wire g1..g4 at the input selector
  typedef enum logic [1:0] {
    ISEL_IN1   = 2'd0,
    ISEL_IN2   = 2'd1,
    ISEL_IN3   = 2'd2,
    ISEL_NORTH = 2'd3
  } isel_e;

  // Switch box: source of each of OUT1..OUT5 at the output selector
  typedef enum logic [2:0] {
    OSEL_IN1  = 3'd0,
    OSEL_IN2  = 3'd1,
    OSEL_G1   = 3'd2,
    OSEL_G2   = 3'd3,
    OSEL_G3   = 3'd4,
    OSEL_G4   = 3'd5,
    OSEL_ZERO = 3'd6,
    OSEL_ONES = 3'd7
  } osel_e;

  // Switch box: bus switch setting of one global wire
  typedef enum logic [1:0] {
    BSW_LOCAL     = 2'd0,  // g = input selector, not joined to neighbours
    BSW_DRIVE     = 2'd1,  // g = input selector, driven to west and east
    BSW_FROM_WEST = 2'd2,  // g = west wire, passed on to the east
    BSW_FROM_EAST = 2'd3   // g = east wire, passed on to the west
  } bsw_e;

  // Switch box configuration register, written as three 16-bit words.
  typedef struct packed {
    logic [12:0] rsv;
    logic        logic_mode;  // PMU fed by this SB: 0 memory, 1 peripheral
    logic        ext_src_sb;  // PMU external address: 0 ext register, 1 OUT2:OUT1
    logic [1:0]  south_sel;   // global wire sent to the south SB (0 = g1)
    logic [7:0]  bsw;         // 4 x bsw_e, g4 in the top bits
    logic [14:0] osel;        // 5 x osel_e, OUT5 in the top bits
    logic [7:0]  isel;        // 4 x isel_e, g4 in the top bits
  } sb_cfg_t;

  localparam int unsigned SB_CFG_WORDS = 3;

  // PMU input nibbles from its switch box (OUT1..OUT5):
  //   OUT1, OUT2: external address, low and high nibble
  //   OUT3[0]: EN, OUT4[0]: CND, OUT5[0]: external write enable
  // PMU output nibbles to the next switch box (IN1..IN3):
  //   IN1, IN2: Dout low and high nibble; IN3: {CF[1], SEQ[2:0]}
  // so SEQ[0] of one PMU's current word can drive EN, CND or the write
  // enable of another PMU.
  localparam int unsigned OUT_EN  = 2;
  localparam int unsigned OUT_CND = 3;
  localparam int unsigned OUT_WE  = 4;

endpackage
