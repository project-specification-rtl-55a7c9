// Common Merger Module (CMM) shared types, constants and helper functions.
//
// The CMM merges trigger data from the 14 Cluster Processor Modules (CPMs) or
// 16 Jet/Energy Modules (JEMs) of one crate, and on "system" modules also the
// sums from the other crates, then sends the result to the Central Trigger
// Processor (CTP). One hardware design serves three firmware functions:
// cluster (CP) hit counting, jet hit counting and energy summing. This package
// holds the numbers the specification gives (16 backplane slots of 24 data
// bits plus odd parity, 25-bit cable words, eight 3-bit thresholds, the
// quad-linear energy code) and the function/level selection of Table 1.
// Layout choices that the specification leaves open (where the parity bit of
// a cable word sits, how 50 energy bits share two cables) are this design's
// own and are described beside each constant.
package cmm_pkg;

  // Backplane: 16 slots, each 24 data bits + 1 odd parity bit (bit 24).
  localparam int unsigned N_SLOTS   = 16;
  localparam int unsigned BP_DW     = 24;
  localparam int unsigned BP_W      = BP_DW + 1;
  // Recorded backplane word: data, parity, parity-error flag (bit 25).
  localparam int unsigned REC_W     = BP_W + 1;

  // Cable links between CMMs: 25 committed signal pairs, odd parity in bit 24.
  localparam int unsigned N_CABLES  = 3;
  localparam int unsigned CABLE_W   = 25;

  // CTP cable: 33 signal pairs; data from bit 0, odd parity in bit 32.
  localparam int unsigned CTP_W     = 33;

  // Hit counting.
  localparam int unsigned N_THR     = 8;   // thresholds per CMM
  localparam int unsigned HIT_W     = 3;   // main hit count width (saturates at 7)
  localparam int unsigned FWD_W     = 2;   // forward hit count width (saturates at 3)
  localparam int unsigned N_FWD_THR = 4;   // forward thresholds, per side

  // Energy summing widths.
  localparam int unsigned EXY_W     = 15;  // crate Ex/Ey sum, two's complement
  localparam int unsigned ET_W      = 14;  // crate Et sum, unsigned
  localparam int unsigned LIN_W     = 12;  // linear JEM energy (max 4032)

  // Readout.
  localparam int unsigned GL_PINS   = 20;  // G-Link data pins
  localparam int unsigned SER_BITS  = 35;  // serial bits per pin per slice (before parity)
  localparam int unsigned BCN_W     = 12;

  typedef enum logic [1:0] {
    FW_CP       = 2'd0,
    FW_JET      = 2'd1,
    FW_ENERGY   = 2'd2,
    FW_RESERVED = 2'd3
  } fw_type_e;

  typedef enum logic [1:0] {
    LVL_CRATE    = 2'd0,
    LVL_SYSTEM   = 2'd1,
    LVL_RESERVED = 2'd2
  } fw_level_e;

  typedef struct packed {
    fw_type_e  ftype;
    fw_level_e level;
  } cmm_func_t;

  // Energy crate sum as carried on the cable pair: 50 bits, one component
  // per field, each with its overflow bit and an odd parity bit covering the
  // component's value and overflow bit.
  typedef struct packed {
    logic               pt;
    logic               ot;
    logic [ET_W-1:0]    et;
    logic               py;
    logic               oy;
    logic [EXY_W-1:0]   ey;
    logic               px;
    logic               ox;
    logic [EXY_W-1:0]   ex;
  } energy_word_t;   // 50 bits: cable 0 = bits 24:0, cable 1 = bits 49:25

  // One readout slice: what the scrolling memories hold for one bunch
  // crossing. bp: recorded backplane words {pe, parity, data}; crate: the
  // crate-sum cable words; cab: recorded remote cable words {pe, word};
  // sys: system results (layout per function, see slice_format).
  typedef struct packed {
    logic [63:0]                 sys;
    logic [N_CABLES-1:0][25:0]   cab;
    logic [1:0][CABLE_W-1:0]     crate;
    logic [N_SLOTS-1:0][REC_W-1:0] bp;
  } slice_t;

  localparam int unsigned SLICE_W = $bits(slice_t);

  // Table 1: module function from the geographical address.
  // geo[3:1] = GEOADD(6:4), geo[0] = GEOADD(0).
  function automatic cmm_func_t decode_geoadd(input logic [3:0] geo);
    cmm_func_t f;
    unique case (geo[3:1])
      3'b111, 3'b110, 3'b101: f = '{ftype: FW_CP,     level: LVL_CRATE};
      3'b100:                 f = '{ftype: FW_CP,     level: LVL_SYSTEM};
      3'b011:                 f = geo[0] ? '{ftype: FW_JET,    level: LVL_CRATE}
                                         : '{ftype: FW_ENERGY, level: LVL_CRATE};
      3'b010:                 f = geo[0] ? '{ftype: FW_JET,    level: LVL_SYSTEM}
                                         : '{ftype: FW_ENERGY, level: LVL_SYSTEM};
      default:                f = '{ftype: FW_RESERVED, level: LVL_RESERVED};
    endcase
    return f;
  endfunction

  // Quad-linear energy code: 2-bit scale (bits 7:6), 6-bit magnitude.
  // Scale factors 1, 4, 16, 64.
  function automatic logic [LIN_W-1:0] quadlin_to_linear(input logic [7:0] code);
    logic [LIN_W-1:0] mag;
    mag = {{(LIN_W-6){1'b0}}, code[5:0]};
    return mag << (2 * code[7:6]);
  endfunction

endpackage
