// bsm_pkg: constants and types shared by the base station modulator.
//
// The modulator runs on one clock, the 1.2288 MHz chip clock. A code
// symbol lasts 64 chips (19.2 ksps, 64-ary Walsh covering), and a traffic
// frame is 384 symbols (20 ms). The data rates, the symbol rate, the chip
// rate, the 64 Walsh codes, the 192 channel cards and the three sectors
// follow the modulator described in the source design; the 20 ms frame and the
// 24-symbol power-control group are IS-95 values.
package bsm_pkg;

  localparam int unsigned CHIPS_PER_SYM   = 64;   // 1.2288 Mcps / 19.2 ksps
  localparam int unsigned SYMS_PER_FRAME  = 384;  // 20 ms at 19.2 ksps
  localparam int unsigned SYMS_PER_PCG    = 24;   // 1.25 ms power-control group (800 Hz)
  localparam int unsigned LC_LEN          = 42;   // long code shift register length
  localparam int unsigned PN_LEN          = 15;   // pilot (short) PN register length
  localparam int unsigned GAIN_W          = 8;    // gain factor width
  localparam int unsigned COEF_W          = 10;   // FIR coefficient width (signed)
  localparam int unsigned FIR_OUT_W       = 32;   // FIR output width (signed)

  // Vocoder data rate of a traffic channel. The repetition factor is
  // 2**rate: full rate symbols are sent once, eighth rate ones 8 times.
  typedef enum logic [1:0] {
    RATE_9600 = 2'd0,
    RATE_4800 = 2'd1,
    RATE_2400 = 2'd2,
    RATE_1200 = 2'd3
  } rate_e;

  // Configuration of one channel card.
  typedef struct packed {
    rate_e             rate;    // vocoder rate
    logic              pcb;     // power-control bit to insert
    logic [LC_LEN-1:0] mask;    // user long code mask
  } card_cfg_t;

  // Configuration of one Walsh slot of a sector (sector s, Walsh code n).
  typedef struct packed {
    logic              en;      // slot in use
    logic [7:0]        card;    // index of the card feeding the slot
    logic [GAIN_W-1:0] gain;    // gain factor G
  } slot_cfg_t;

  // Walsh chip j of 64-ary Walsh function n (Hadamard ordering).
  function automatic logic walsh_chip(input logic [5:0] n, input logic [5:0] j);
    return ^(n & j);
  endfunction

endpackage
