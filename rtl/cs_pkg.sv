// cs_pkg: constants and types shared by the conditional-stalling design.
//
// The conditional-stalling (CS) system places a small stall stage in front
// of a processing pipeline that carries a read-after-write (RAW) dependency
// through memory. The stall stage keeps the addresses it sent in the last
// DD slots and holds back any packet whose read address matches one of them,
// sending "bubble" packets meanwhile, so the processing pipeline can run at
// one packet per cycle with no dependency logic of its own.
//
// The defaults below are the larger of the two configurations the technique
// was characterised with: a dependency distance of 16 cycles and 16-bit
// addresses. The float64 field layout is IEEE-754 binary64.
package cs_pkg;

  // Dependency distance: the largest number of cycles between a read and a
  // later read of the same address that still misses the first one's write.
  localparam int unsigned DD_DEFAULT = 16;
  // Address (group identifier) width in bits.
  localparam int unsigned AW_DEFAULT = 16;
  // Depth of the stream FIFOs around the stall stage (a free choice).
  localparam int unsigned FIFO_DEPTH_DEFAULT = 16;

  typedef logic [63:0] f64_t;

  typedef struct packed {
    logic        sign;
    logic [10:0] exp;
    logic [51:0] frac;
  } f64_fields_t;

  localparam f64_t F64_QNAN = 64'h7FF8_0000_0000_0000;
  localparam logic [10:0] F64_EXP_MAX = 11'h7FF;

endpackage
