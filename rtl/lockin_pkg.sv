// lockin_pkg: types and constants shared by the digital lock-in controller.
//
// The controller drives the resonators of a resonant switched-capacitor
// converter. Every tank is switched in two switching states (charging and
// discharging) and has a separately tuned on-time per state. On-times are
// held as a coarse count of controller clocks plus a fine count of
// delay-line taps: {coarse, fine}, so one LSB is one delay element.
//
// From the design description: two resonators, a 20 MHz controller clock,
// the 2-bit ZCD code (00 late, 11 early, 01 ZCS) and a 10-bit OP word.
// Own choices: 16 delay taps per clock (4 fine bits), 8 coarse bits, the
// field layout of the OP word and the enum encodings.
`timescale 1ps/1ps
package lockin_pkg;

  localparam int unsigned N_TANKS     = 2;   // resonators of the 4:1 STC
  localparam int unsigned N_STATES    = 2;   // charging / discharging
  localparam int unsigned COARSE_BITS = 8;   // clocks of the on-time
  localparam int unsigned FINE_BITS   = 4;   // delay-line taps of the on-time
  localparam int unsigned T_BITS      = COARSE_BITS + FINE_BITS;
  localparam int unsigned OP_BITS     = 10;  // single-pin configuration word
  localparam int unsigned LPF_MAX     = 8;   // deepest tune filter
  localparam int unsigned LL_SKIP     = 2;   // light-load idle cycles

  typedef logic [T_BITS-1:0] ontime_t;       // {coarse, fine}

  // 2-bit zero-current-detection code
  typedef enum logic [1:0] {
    ZCD_LATE  = 2'b00,
    ZCD_ZCS   = 2'b01,
    ZCD_BAD   = 2'b10,   // not produced by the sensor; ignored
    ZCD_EARLY = 2'b11
  } zcd_t;

  typedef enum logic [2:0] {
    GOV_OFF,
    GOV_START,
    GOV_EST,
    GOV_LOCKIN,
    GOV_RUN,
    GOV_STOP
  } gov_state_t;

  // Fields decoded from the OP word. The eight upper bits are used, so the
  // pin distinguishes 256 voltage levels, each four ADC counts wide.
  typedef struct packed {
    logic       enable;       // OP[9]
    logic       single_samp;  // OP[8]  1: single-sample + delay estimation
    logic [1:0] dt_code;      // OP[7:6] dead-time   = 2*(code+1) clocks
    logic       nest_code;    // OP[5]   N_est       = 256 or 1024 cycles
    logic [1:0] lpf_code;     // OP[4:3] LPF depth   = 2*(code+1) stages
    logic       light_load;   // OP[2]   light-load: LL_SKIP idle cycles per active one
    logic [1:0] guard;        // OP[1:0] ignored: absorb the count error of the ADC
  } op_cfg_t;

endpackage
