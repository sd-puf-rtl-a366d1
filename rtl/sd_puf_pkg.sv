// sd_puf_pkg: sizes, current encoding and the process-variation model shared by
// the SD-PUF blocks.
//
// The PUF works on the write delay of spin-transfer-torque mCell buffers, which is
// an analog quantity. Signals that carry a buffer current (scan flip-flop contents,
// buffer outputs, the absolute value circuit) are modelled here as signed integers
// in units of 10 nA, so a full +10 uA write current is +1000 and the sense
// amplifier threshold of 9.56 uA is 956. Times are integers in picoseconds.
//
// From the design description: 64 response bits, a 16-bit seed into a 16-stage
// LFSR, a 6-bit mask, +/-10 uA write currents, a 9.56 uA threshold and a nominal
// buffer write delay of 2.5 ns. Own choices: the 10 nA current unit, the 12-bit
// current word, the 5 % delay spread and the hash that turns a chip number and a
// cell index into a delay (cell_delay_ps below).
package sd_puf_pkg;

  // Response length n and mask length m (the recommended 64/6 configuration).
  localparam int unsigned N_BITS   = 64;
  localparam int unsigned MASK_W   = 6;
  localparam int unsigned SEED_W   = 16;

  // Current words: signed, 10 nA per LSB.
  localparam int unsigned CUR_W    = 12;
  typedef logic signed [CUR_W-1:0] cur_t;
  localparam int signed   I_FULL   = 1000;  // +/-10 uA write current
  localparam int signed   I_REF    = 956;   // 9.56 uA sense threshold

  // Write-delay model (ps).
  localparam int unsigned T_NOM_PS = 2500;  // nominal buffer write delay
  // Default interval between the challenge edge and the write-back edge: the time
  // at which a nominal buffer has reached I_REF, so a nominal cell sits on the
  // decision point and faster/slower cells give 1/0.
  localparam int unsigned T_REF_PS = 2390;
  localparam int unsigned TIME_W   = 16;

  // Operations of the control unit.
  typedef enum logic [3:0] {
    ST_IDLE,     // waiting for a command
    ST_CLEAR,    // scan flip-flops, counter and signature register cleared
    ST_SEED,     // external seed loaded into the LFSR
    ST_GEN,      // LFSR produces the 64-bit internal challenge
    ST_CHAL,     // 1st edge: challenge captured through D (TE = 1)
    ST_WB,       // 2nd edge: responses written back through SI (TE = 0, S open)
    ST_MASK_LD,  // mask read from the mCell memory into the shift register
    ST_SHIFT,    // responses shifted out (S closed), counted or masked
    ST_STORE,    // counter value written to the mCell memory as the mask
    ST_DONE      // scan chain cleared, done pulse
  } cu_state_e;

  // 32-bit integer mixer (murmur3 finaliser).
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    h = h * 32'hC2B2_AE35;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Write delay in ps of buffer `idx` of chip `chip` when written towards logic
  // `bit_val`. The four bytes of a hash are summed (mean 510, sigma ~148) to get a
  // roughly normal variate, scaled to sigma ~125 ps (5 % of the nominal delay).
  // Writing '0' and writing '1' get independent delays, which is what makes the
  // challenge bit matter.
  function automatic int unsigned cell_delay_ps(input int unsigned chip,
                                                input int unsigned idx,
                                                input logic        bit_val);
    logic [31:0] h;
    int signed   s;
    h = mix32(chip * 32'h9E37_79B1 ^ idx * 32'h7F4A_7C15 ^ {31'd0, bit_val} * 32'h1656_67B1 ^ 32'h2545_F491);
    s = int'(h[7:0]) + int'(h[15:8]) + int'(h[23:16]) + int'(h[31:24]) - 510;
    return int'(T_NOM_PS) + (s * 27) / 32;
  endfunction

endpackage
