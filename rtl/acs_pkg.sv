// acs_pkg: types, constants and fixed-point helpers shared by the ACS datapath.
//
// Number format: 16-bit words are Q15 fractions, 32-bit words are Q31, as in the
// speech-codec reference arithmetic the datapath replaces. Every unit saturates to
// 7FFFh/8000h (16 bit) or 7FFFFFFFh/80000000h (32 bit) instead of wrapping.
//
// The configuration word (acs_cfg_t) is the full set of "configuration bits" the
// host writes to reconfigure the datapath: one select per operand multiplexer, an
// enable per unit (a disabled unit has its operands forced to zero, i.e. isolated),
// shift amounts, add/subtract modes and the write enables of REG1..REG3 and o_CMP.
// The source numbering of the operand multiplexers is this design's own choice:
// a multiplexer only offers sources that are computed earlier in the datapath, so
// that no configuration can close a combinational loop.
package acs_pkg;

  localparam int unsigned NUM_SAC  = 9;   // SAC units in the datapath
  localparam int unsigned NUM_RD   = 10;  // memory read ports feeding the core
  localparam int unsigned NUM_HD   = 2;   // words the host drives directly into the core
  localparam int unsigned RND1_TAP = 4;   // ROUND1 reads SAC1..SAC4; SAC5..SAC9 may read ROUND1

  // 16-bit sources, in datapath order.
  typedef enum logic [4:0] {
    S16_ZERO  = 5'd0,
    S16_H0    = 5'd1,   // memory read port 0
    S16_H1    = 5'd2,
    S16_H2    = 5'd3,
    S16_H3    = 5'd4,
    S16_H4    = 5'd5,
    S16_H5    = 5'd6,
    S16_H6    = 5'd7,
    S16_H7    = 5'd8,
    S16_H8    = 5'd9,
    S16_H9    = 5'd10,
    S16_HD0   = 5'd11,  // direct host data word 0
    S16_HD1   = 5'd12,
    S16_REG3  = 5'd13,
    S16_ADD16A = 5'd14,
    S16_ADD16B = 5'd15,
    S16_SQ    = 5'd16,
    S16_RND1  = 5'd17,
    S16_RND2  = 5'd18
  } src16_e;
  localparam int unsigned N_SRC16 = 19;

  // 32-bit sources, in datapath order.
  typedef enum logic [4:0] {
    S32_ZERO  = 5'd0,
    S32_HP0   = 5'd1,   // {H1,H0}
    S32_HP1   = 5'd2,   // {H3,H2}
    S32_HP2   = 5'd3,   // {H5,H4}
    S32_HP3   = 5'd4,   // {H7,H6}
    S32_HP4   = 5'd5,   // {H9,H8}
    S32_HDP   = 5'd6,   // {HD1,HD0}
    S32_REG1  = 5'd7,
    S32_REG2  = 5'd8,
    S32_SHIFT = 5'd9,
    S32_SAC1  = 5'd10,
    S32_SAC2  = 5'd11,
    S32_SAC3  = 5'd12,
    S32_SAC4  = 5'd13,
    S32_SAC5  = 5'd14,
    S32_SAC6  = 5'd15,
    S32_SAC7  = 5'd16,
    S32_SAC8  = 5'd17,
    S32_SAC9  = 5'd18,
    S32_MULT  = 5'd19,
    S32_ADD32 = 5'd20
  } src32_e;
  localparam int unsigned N_SRC32 = 21;

  // MUXREG1 inputs: select 0..8 = SAC1..SAC9, 9 = ROUND1 (sign-extended).

  // MUXREG2 inputs.
  typedef enum logic [2:0] {
    MR2_MULT = 3'd0, MR2_ADD32 = 3'd1, MR2_ADD16 = 3'd2, MR2_SHIFT = 3'd3,
    MR2_SAC3 = 3'd4, MR2_SAC5 = 3'd5, MR2_SAC7 = 3'd6, MR2_SAC9 = 3'd7
  } mr2_e;

  // MUXREG3 inputs.
  typedef enum logic [1:0] {
    MR3_ADD16 = 2'd0, MR3_SQ = 2'd1, MR3_RND2 = 2'd2
  } mr3_e;

  typedef struct packed {
    logic   en;
    logic   sub;
    src16_e a;
    src16_e b;
  } cfg_add16_t;

  typedef struct packed {
    logic   en;
    src16_e in;
  } cfg_u16_t;

  typedef struct packed {
    logic       en;
    src16_e     in;
    logic [3:0] n;        // scale by 2^-n
  } cfg_shift_t;

  typedef struct packed {
    logic       en;
    src16_e     d;        // 16-bit data operand
    src32_e     acc;      // 32-bit accumulator operand
    logic [3:0] n;        // data scaled by 2^-n
  } cfg_sac_t;

  typedef struct packed {
    logic   en;
    src32_e in;
  } cfg_u32_t;

  typedef struct packed {
    logic   en;
    src16_e a;
    src16_e b;
  } cfg_mult_t;

  typedef struct packed {
    logic   en;
    logic   sub;
    src32_e a;
    src32_e b;
  } cfg_add32_t;

  typedef struct packed {
    logic   en;           // also the write enable of the o_CMP flag
    src32_e a;
    src32_e b;
  } cfg_cmp_t;

  typedef struct packed {
    logic       we1;
    logic [3:0] sel1;
    logic       we2;
    mr2_e       sel2;
    logic       we3;
    mr3_e       sel3;
  } cfg_reg_t;

  typedef struct packed {
    cfg_add16_t            add16a;
    cfg_add16_t            add16b;
    cfg_u16_t              sq;
    cfg_shift_t            shift;
    cfg_sac_t [NUM_SAC-1:0] sac;   // sac[0] is SAC1
    cfg_u32_t              rnd1;
    cfg_u32_t              rnd2;
    cfg_mult_t             mult;
    cfg_add32_t            add32;
    cfg_cmp_t              cmp;
    cfg_reg_t              regs;
  } acs_cfg_t;

  // Saturate a wider signed value to 16 / 32 bits.
  function automatic logic [15:0] sat16(input logic signed [33:0] v);
    if (v > 34'sd32767)       return 16'h7FFF;
    else if (v < -34'sd32768) return 16'h8000;
    else                      return v[15:0];
  endfunction

  function automatic logic [31:0] sat32(input logic signed [33:0] v);
    if (v > 34'sd2147483647)       return 32'h7FFF_FFFF;
    else if (v < -34'sd2147483648) return 32'h8000_0000;
    else                           return v[31:0];
  endfunction

endpackage
