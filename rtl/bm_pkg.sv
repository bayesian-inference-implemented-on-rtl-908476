// bm_pkg: constants and helper functions shared by the stochastic Bayesian
// machine. It fixes the sizes of the robot obstacle-avoidance machine (216
// binary inputs of 32 bits, 5 outputs of 32 bits, 32-bit LFSRs), the memory
// layout of the 216 input probabilities and the LFSR polynomial.
//
// Robot model (this design's reconstruction; the sizes 216, 5, 3 sensors of
// each modality and 3 distance levels follow the source):
//   P(V ^ D0..D2 ^ IR0..IR2 ^ US0..US2) =
//       P(D0)P(D1)P(D2) P(V | D0 D1 D2) prod_j P(IRj | Dj) P(USj | Dj)
// with V the rotation velocity (5 values), Dj the distance seen in direction
// j (close/medium/far) and IRj, USj the infrared and ultrasonic readings
// (3 levels). Soft evidence is given on every IRj and USj. That model needs
// exactly 216 probabilities:
//   135 P(V|D)  +  9 P(Dj)  +  27 P(IRj|Dj)  +  27 P(USj|Dj)
//   +  9 soft evidence on IR  +  9 soft evidence on US.
package bm_pkg;

  localparam int unsigned PW      = 32;   // binary probability width
  localparam int unsigned N_IN    = 216;  // probabilities fed to the machine
  localparam int unsigned N_OUT   = 5;    // values of the rotation velocity
  localparam int unsigned N_DIR   = 3;    // directions (one IR + one US each)
  localparam int unsigned N_LVL   = 3;    // distance / reading levels
  localparam int unsigned N_DCOMB = N_LVL * N_LVL * N_LVL;  // 27

  // Base addresses of the six groups in the 216-word input memory.
  localparam int unsigned A_PV   = 0;    // P(V=m | d0,d1,d2): m*27 + d0*9 + d1*3 + d2
  localparam int unsigned A_PD   = 135;  // P(Dj=d)          : j*3 + d
  localparam int unsigned A_PIR  = 144;  // P(IRj=x | Dj=d)  : j*9 + d*3 + x
  localparam int unsigned A_PUS  = 171;  // P(USj=x | Dj=d)  : j*9 + d*3 + x
  localparam int unsigned A_EIR  = 198;  // soft P~(IRj=x)   : j*3 + x
  localparam int unsigned A_EUS  = 207;  // soft P~(USj=x)   : j*3 + x

  // Galois form of x^32 + x^22 + x^2 + x + 1 (maximal length).
  localparam logic [31:0] LFSR_MASK = 32'h8020_0003;

  // Fixed per-converter seed offset: a 32-bit integer hash of the index.
  // It is evaluated at elaboration time only (idx is a constant).
  function automatic logic [31:0] seed_offset(input int unsigned idx);
    logic [31:0] h;
    h = (idx + 1) * 32'h9E37_79B9;
    h = h ^ (h >> 16);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    return h;
  endfunction

  // Control register addresses on the host bus (word addresses).
  localparam logic [8:0] ADR_CTRL   = 9'h100;  // write bit0=1: start a run
  localparam logic [8:0] ADR_SEED   = 9'h101;  // base seed of all LFSRs
  localparam logic [8:0] ADR_LENGTH = 9'h102;  // bitstream length in bits
  localparam logic [8:0] ADR_STATUS = 9'h103;  // bit0 busy, bit1 done
  localparam logic [8:0] ADR_OUT    = 9'h110;  // 0x110..0x114 output counts

endpackage
