// Shared constants of the real-time performance analysis chip.
//
// The chip counts, per programmable address range, how many bus addresses
// fell in the range (or how many clock cycles the range was active) and how
// often the range was left. Every count is split: the low byte lives in a
// fast counter inside each range recognizer, the upper bits in a small RAM
// that one shared incrementer updates on a 4x slower clock.
//
// The sizes below are the chip's own: 16 recognizers, 32-bit addresses,
// 48-bit address/time count, 32-bit entry/exit count, 8-bit low counters.
package rtspa_pkg;
  localparam int unsigned NUM_RR   = 16;  // range recognizers on one chip
  localparam int unsigned RR_SEL_W = 4;   // width of d[3:0] and m[3:0]
  localparam int unsigned ADDR_W   = 32;  // input address / limit width
  localparam int unsigned LOW_W    = 8;   // low counter inside each recognizer
  localparam int unsigned CC_W     = 48;  // full address/time count
  localparam int unsigned EC_W     = 32;  // full entry/exit count
  localparam int unsigned CC_HI_W  = CC_W - LOW_W;  // 40 bits kept in RAM
  localparam int unsigned EC_HI_W  = EC_W - LOW_W;  // 24 bits kept in RAM

  // chip_mode pin: low counts addresses in a range, high times a range
  typedef enum logic {
    COUNT_ADDR   = 1'b0,
    TIME_A_RANGE = 1'b1
  } chip_mode_e;
endpackage
