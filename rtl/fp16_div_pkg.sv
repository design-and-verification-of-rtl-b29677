// fp16_div_pkg: types and constants shared by the binary16 divider.
//
// The operand format is IEEE-754 binary16 (1 sign bit, 5 exponent bits with
// bias 15, 10 fraction bits). The 3-bit status codes are the divider's
// exception encoding; every sub-block reports its exception in this encoding
// and the packer picks the one with the highest priority. The stage structs
// describe the contents of the pipeline registers between the four layers.
// The status codes and their priority follow the reference design; grouping
// the register sets into structs is this design's own.
package fp16_div_pkg;

  localparam int unsigned EXP_W   = 5;            // exponent field width
  localparam int unsigned FRAC_W  = 10;           // stored fraction width
  localparam int unsigned MANT_W  = FRAC_W + 1;   // mantissa with hidden bit
  localparam int unsigned BIAS    = 15;           // 2^(EXP_W-1) - 1
  localparam int unsigned EXP_TOP = 30;           // largest exponent of a finite result

  // Status / exception codes. Priority (highest first) as resolved by the
  // packer: DIV_BY_ZERO, ZERO, OVERFLOW, UNDERFLOW, NORMAL.
  typedef enum logic [2:0] {
    ST_ZERO        = 3'b000,
    ST_OVERFLOW    = 3'b001,
    ST_UNDERFLOW   = 3'b010,
    ST_NORMAL      = 3'b011,
    ST_DIV_BY_ZERO = 3'b100
  } status_e;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp16_t;

  // Special results.
  localparam logic [15:0] DIV_BY_ZERO_RESULT = 16'hFFFF;           // all ones
  localparam logic [14:0] MAX_MAGNITUDE      = {5'b11110, 10'h3FF}; // 65504

  // Register set after layer 1 (unpacker).
  typedef struct packed {
    logic              s1, s2;
    logic [EXP_W-1:0]  e1, e2;
    logic [MANT_W-1:0] m1, m2;
  } stage1_t;

  // Register set after layer 2 (sign calculator, exponent subtractor,
  // mantissa divider).
  typedef struct packed {
    logic              sc;
    logic [EXP_W-1:0]  e;
    status_e           ex_es;
    logic [MANT_W-1:0] q;
    status_e           ex_md;
  } stage2_t;

  // Register set after layer 3 (normalizer); the sign and the layer-2
  // exceptions travel along to the packer.
  typedef struct packed {
    logic              sc;
    logic [EXP_W-1:0]  en;
    logic [MANT_W-1:0] mn;
    status_e           ex_nm;
    status_e           ex_es;
    status_e           ex_md;
  } stage3_t;

endpackage
