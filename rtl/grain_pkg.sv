// grain_pkg - constants and types shared by the Grain-128AEAD core.
//
// The sizes are those of the cipher: 128-bit LFSR and NFSR, 128-bit key,
// 96-bit nonce, 64-bit register and accumulator. A run of the core is
// divided into a loading phase (128 bits of key and nonce shifted in), an
// initialization phase (256 clocks with the pre-output fed back), a key
// re-introduction phase (128 clocks in which the authentication register
// and accumulator are filled) and a running phase. All phase lengths are
// counted in cipher steps; a core that advances P steps per clock needs
// 1/P as many clocks.
package grain_pkg;

  localparam int unsigned FSR_BITS    = 128;  // LFSR and NFSR length
  localparam int unsigned KEY_BITS    = 128;
  localparam int unsigned IV_BITS     = 96;
  localparam int unsigned TAG_BITS    = 64;   // register and accumulator
  localparam int unsigned LOAD_BITS   = 128;  // steps of the loading phase
  localparam int unsigned INIT_BITS   = 256;  // steps with pre-output feedback
  localparam int unsigned KEYMIX_BITS = 128;  // steps with key re-introduction

  // What the shift registers do in one step.
  typedef enum logic [1:0] {
    MODE_LOAD,    // shift in key (NFSR) and nonce/padding (LFSR)
    MODE_INIT,    // feedback plus pre-output
    MODE_KEYMIX,  // LFSR feedback plus key bit, NFSR plain
    MODE_RUN      // plain feedback
  } fsr_mode_e;

  // Phase of the whole core, produced by the controller.
  typedef enum logic [2:0] {
    PH_IDLE,
    PH_LOAD,
    PH_INIT,
    PH_KEYMIX,
    PH_RUN,
    PH_DONE
  } phase_e;

endpackage
