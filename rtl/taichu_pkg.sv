// taichu_pkg: constants and types shared by the TaichuPix3 readout RTL.
//
// Widths follow the sensor: 1024 pixels per double column (10-bit address),
// 512 double columns (9-bit column index), 8-bit timestamps of 25 ns steps and
// a 4-bit compression pattern (5 adjacent addresses per word). The hit word
// grows by two group bits at each level of the readout hierarchy:
//   32-column level : {dcol[4:0], ts[7:0], pat[3:0], addr[9:0]}  27 bits
//   128-column level: {dcol[6:0], ...}                            29 bits
//   512-column level: {dcol[8:0], ...}                            31 bits
// The column index sits on top so that each level only prefixes its group
// index. The field order is this design's choice.
package taichu_pkg;

  localparam int unsigned AW      = 10;  // pixel address inside a double column
  localparam int unsigned TSW     = 8;   // timestamp
  localparam int unsigned PATW    = 4;   // compression pattern
  localparam int unsigned LATW    = 8;   // TRIGGER_LATENCY
  localparam int unsigned UNCW    = 3;   // TRIGGER_UNCERTAIN
  localparam int unsigned RDW     = AW + TSW + PATW;  // reader word: 22 bits
  localparam int unsigned W32     = RDW + 5;          // 27
  localparam int unsigned W128    = RDW + 7;          // 29
  localparam int unsigned W512    = RDW + 9;          // 31
  localparam int unsigned OUTW    = 32;               // output word

  // Word produced by a Dcol reader.
  typedef struct packed {
    logic [TSW-1:0]  ts;
    logic [PATW-1:0] pat;
    logic [AW-1:0]   addr;
  } rd_word_t;

  // TEST field values.
  typedef enum logic [1:0] {
    TEST_NORMAL = 2'b00,
    TEST_RSVD1  = 2'b01,
    TEST_RSVD2  = 2'b10,
    TEST_SPI    = 2'b11    // slow control: data out through SPI_DO
  } test_mode_e;

  // Configuration registers.
  typedef struct packed {
    logic             trigger_mode;  // 1: trigger mode, 0: triggerless
    logic             compress_en;   // COMPRESS_EN
    test_mode_e       test;          // TEST
    logic [LATW-1:0]  latency;       // TRIGGER_LATENCY, 25 ns steps
    logic [UNCW-1:0]  uncertain;     // TRIGGER_UNCERTAIN, 25 ns steps
  } cfg_t;

  // Check bit of a 31-bit output word: odd parity, so that a valid 32-bit
  // output word is never all zeros (the idle word of the serial link).
  function automatic logic check_bit(input logic [W512-1:0] d);
    return ~^d;
  endfunction

endpackage
