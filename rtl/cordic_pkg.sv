// cordic_pkg: types and constants shared by the general-purpose CORDIC cell.
//
// Number formats. Streams carry IEEE-754 single-precision values. Inside the
// cell the converters produce a 32-bit signed fixed-point word with one sign
// bit, one integer bit and 30 fraction bits (Q2.30), the format the design is
// specified for. The CORDIC datapath extends that word by two guard bits at
// the top (34-bit Q4.30) so that the CORDIC gain (about 1.647) and the
// quarter-turn pre-rotation cannot overflow. The guard-bit count of two is the
// design's; the exact way guard bits are placed is this implementation's choice.
//
// Arctangent constants are hard-wired per pipeline stage rather than read from
// a lookup table. They are round(atan(2^-i) * 2^30), i = 0..31; the hyperbolic
// ones are round(atanh(2^-i) * 2^30), i = 1..31.
//
// Three functional modes are provided, as in the design's parameter set:
// circular, linear and hyperbolic. Hyperbolic stages follow the usual shift
// sequence 1, 2, 3, 4, 4, 5, ..., 13, 13, 14, ... (shifts 4, 13 and 40 are
// repeated so that the sum of the remaining angles always covers the next
// one); circular and linear stages use shift i in stage i.
package cordic_pkg;

  localparam int DW    = 32;          // external fixed-point width (Q2.30)
  localparam int FRAC  = 30;          // fraction bits
  localparam int GUARD = 2;           // guard bits added inside the datapath
  localparam int IW    = DW + GUARD;  // internal width (Q4.30)

  typedef logic signed [IW-1:0] fx_t;  // internal fixed-point word

  // x, y, z vector that moves through the CORDIC pipeline
  typedef struct packed {
    fx_t x;
    fx_t y;
    fx_t z;
  } cvec_t;

  // Direction rule of the micro-rotations
  typedef enum logic {
    ROTATION = 1'b0,   // drive z to zero
    VECTOR   = 1'b1    // drive y to zero
  } cordic_mode_e;

  // Evaluation mode of the micro-rotations
  typedef enum logic [1:0] {
    PIPELINED     = 2'd0,  // one registered stage per micro-rotation, a vector per cycle
    ITERATED      = 2'd1,  // one stage reused STAGES times, a vector per STAGES cycles
    COMBINATIONAL = 2'd2   // the stages without registers, no latency
  } cordic_eval_e;

  // Functional (coordinate) mode
  typedef enum logic [1:0] {
    CIRCULAR   = 2'd0,   // trigonometric: sin, cos, atan, magnitude
    LINEAR     = 2'd1,   // multiply, divide
    HYPERBOLIC = 2'd2    // sinh, cosh, exp, atanh, ln, square root
  } cordic_func_e;

  localparam fx_t HALF_PI = 34'sd1686629713;  // pi/2 in Q4.30
  localparam fx_t ONE     = 34'sd1073741824;  // 1.0 in Q4.30

  // atan(2^-i) in Q4.30
  function automatic fx_t atan_q30(input int i);
    case (i)
      0:  return 34'sd843314857;
      1:  return 34'sd497837829;
      2:  return 34'sd263043837;
      3:  return 34'sd133525159;
      4:  return 34'sd67021687;
      5:  return 34'sd33543516;
      6:  return 34'sd16775851;
      7:  return 34'sd8388437;
      8:  return 34'sd4194283;
      9:  return 34'sd2097149;
      default: return (i < FRAC) ? (ONE >>> i) : '0;  // atan(2^-i) = 2^-i to 30 bits
    endcase
  endfunction

  // atanh(2^-i) in Q4.30, i >= 1
  function automatic fx_t atanh_q30(input int i);
    case (i)
      1:  return 34'sd589812981;
      2:  return 34'sd274247419;
      3:  return 34'sd134923406;
      4:  return 34'sd67196451;
      5:  return 34'sd33565361;
      6:  return 34'sd16778582;
      7:  return 34'sd8388779;
      8:  return 34'sd4194325;
      9:  return 34'sd2097155;
      default: return (i < FRAC) ? (ONE >>> i) : '0;  // atanh(2^-i) = 2^-i to 30 bits
    endcase
  endfunction

  // Angle constant of a stage with shift i for the chosen functional mode
  function automatic fx_t alpha_q30(input cordic_func_e func, input int i);
    case (func)
      CIRCULAR:   return atan_q30(i);
      HYPERBOLIC: return atanh_q30(i);
      default:    return (i < FRAC) ? (ONE >>> i) : '0;
    endcase
  endfunction

  // Shift of pipeline stage k (k = 0, 1, ...)
  function automatic int stage_shift(input cordic_func_e func, input int k);
    if (func != HYPERBOLIC) return k;
    return k + 1 - ((k >= 4) ? 1 : 0) - ((k >= 14) ? 1 : 0) - ((k >= 42) ? 1 : 0);
  endfunction

endpackage
