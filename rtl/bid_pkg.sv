// bid_pkg: constants and types shared by the decimal32 BID multiplier.
//
// Decimal32 in the binary-integer-decimal (BID) encoding holds a value
// (-1)^s * 10^(E-101) * c with a 7-digit integer coefficient c (stored in
// binary) and an 8-bit biased exponent E in 0..191. The precision, bias and
// exponent range follow the IEEE 754-2008 decimal32 format.
//
// The 3-bit rounding-mode code is this design's own choice: it follows the
// IEEE 754-2008 decimal rounding-mode numbering used by common decimal
// hardware (000 ties-to-even, 001 toward zero, 010 toward +inf,
// 011 toward -inf, 100 ties-to-away). Codes 101..111 are treated as
// ties-to-even.
package bid_pkg;

  // Format parameters of decimal32
  localparam int unsigned PREC    = 7;       // decimal digits in the coefficient
  localparam int unsigned BIAS    = 101;     // exponent bias
  localparam int unsigned EMAX_B  = 191;     // largest biased exponent
  localparam int unsigned CW      = 24;      // coefficient width inside the datapath
  localparam int unsigned EW      = 8;       // biased exponent width
  localparam int unsigned PW      = 50;      // carry-save product width (PS, PC)
  localparam int unsigned UBITS   = 47;      // u = ceil(2p * log2(10)), discarded field width
  localparam logic [23:0] TEN_P   = 24'd10_000_000;  // 10^7
  localparam logic [23:0] TEN_PM1 = 24'd1_000_000;   // 10^6

  typedef enum logic [2:0] {
    RM_RTE = 3'b000,   // roundTiesToEven
    RM_RTZ = 3'b001,   // roundTowardZero
    RM_RTP = 3'b010,   // roundTowardPositive
    RM_RTN = 3'b011,   // roundTowardNegative
    RM_RTA = 3'b100    // roundTiesToAway
  } round_mode_e;

  // Partial-product reduction tree of the binary multiplier
  typedef enum logic {TREE_DADDA, TREE_WALLACE} tree_e;

  // Final-stage carry-propagate adder
  typedef enum logic [1:0] {ADD_RCA, ADD_CLA, ADD_CSEL} adder_e;

  // Class of a decoded operand
  typedef enum logic [1:0] {CLS_FINITE, CLS_INF, CLS_NAN} operand_class_e;

  // Unpacked decimal32 operand or result
  typedef struct packed {
    logic           s;     // sign
    logic [EW-1:0]  e;     // biased exponent
    logic [CW-1:0]  c;     // coefficient, 0 .. 10^7-1
    operand_class_e cls;   // finite, infinity or NaN
  } bid_fields_t;

endpackage
