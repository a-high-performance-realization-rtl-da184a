// Shared constants and types of the reversible-LFSR image cipher.
//
// The cipher splits every 8-bit pixel into two 4-bit nibbles and puts each
// nibble through a 4-bit maximal-length LFSR (feedback Q3 xor Q4, period 15).
// Encryption advances the LFSR DEF_ENC_SHIFTS steps from the loaded nibble,
// decryption advances it DEF_DEC_SHIFTS more, so that the two together make one
// full period and give the nibble back. The image size, pixel width and the
// step counts follow the published design; the controller state encoding is
// this implementation's own.
package lfsr_crypt_pkg;

  localparam int unsigned NIBBLE_W    = 4;   // width of one LFSR
  localparam int unsigned PIXEL_W     = 8;   // one pixel = two nibbles
  localparam int unsigned DEF_NUM_PIXELS = 64;  // image size held in each memory
  localparam int unsigned LFSR_PERIOD = 15;  // 2**NIBBLE_W - 1, maximal length
  localparam int unsigned DEF_ENC_SHIFTS = 7;   // steps from plain to cipher nibble
  localparam int unsigned DEF_DEC_SHIFTS = LFSR_PERIOD - DEF_ENC_SHIFTS;  // = 8

  // Controller states. LOAD shifts the four nibble bits in serially, SHIFT
  // lets the LFSRs free-run, WRITE stores the LFSR outputs.
  typedef enum logic [2:0] {
    S_IDLE  = 3'd0,
    S_ADDR  = 3'd1,
    S_READ  = 3'd2,
    S_LOAD  = 3'd3,
    S_SHIFT = 3'd4,
    S_WRITE = 3'd5,
    S_DONE  = 3'd6
  } ctrl_state_t;

  // Which half of the run the controller is in.
  typedef enum logic {
    PH_ENC = 1'b0,   // input ROM -> encryption LFSRs -> encrypted RAM
    PH_DEC = 1'b1    // encrypted RAM -> decryption LFSRs -> decrypted RAM
  } phase_t;

  // One LFSR step of the 4-bit register as seen on its parallel output
  // {Q1,Q2,Q3,Q4}: the bits move towards Q4 and Q1 takes Q3 xor Q4.
  function automatic logic [NIBBLE_W-1:0] lfsr4_step(input logic [NIBBLE_W-1:0] v);
    return {v[1] ^ v[0], v[3:1]};
  endfunction

endpackage
