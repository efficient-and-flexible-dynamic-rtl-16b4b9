// Constants of the DART cluster with DUCK reconfiguration.
//
// One DPR (reconfigurable datapath) has 38 unit configuration bits: four
// address generators (1 bit each), six registers (1 bit each), two
// add/subtract units (3 bits each) and two multiplier units (11 bits each),
// plus 50 bits for its internal multi-bus (10 outputs x ceil(log2 18)).
// The cluster crossbar needs 8 x ceil(log2 30) = 40 bits, so a cluster
// context is 6 x 88 + 40 = 568 bits, carried on an 8-bit configuration path.
// These sizes are published; the bit layout inside a DPR word and the
// operation encodings are this design's choices.
package dart_pkg;

  localparam int unsigned DW          = 16;  // data width
  localparam int unsigned NDPR        = 6;
  localparam int unsigned DPR_UNIT_BITS = 38;
  localparam int unsigned DBDPR_N     = 18;
  localparam int unsigned DBDPR_M     = 10;
  localparam int unsigned DBDPR_BITS  = 50;
  localparam int unsigned DPR_BITS    = DPR_UNIT_BITS + DBDPR_BITS;  // 88
  localparam int unsigned DBCL_N      = 60;
  localparam int unsigned DBCL_M      = 8;
  localparam int unsigned DBCL_P      = 30;
  localparam int unsigned DBCL_BITS   = 40;
  localparam int unsigned CFGW        = 8;   // configuration path width

  // unit fields inside the 38 DPR unit bits
  localparam int unsigned F_AG   = 0;   // 4 x 1 bit: address generator k steps
  localparam int unsigned F_REG  = 4;   // 6 x 1 bit: reg1, reg2, FU1..FU4 output load enables
  localparam int unsigned F_FU1  = 10;  // 3 bits add/sub
  localparam int unsigned F_FU2  = 13;  // 11 bits multiplier
  localparam int unsigned F_FU3  = 24;  // 3 bits add/sub
  localparam int unsigned F_FU4  = 27;  // 11 bits multiplier

  typedef enum logic [1:0] {AS_ADD = 2'd0, AS_SUB = 2'd1, AS_ABS = 2'd2, AS_AND = 2'd3} addsub_op_e;
  typedef enum logic [1:0] {MU_MUL = 2'd0, MU_MAC = 2'd1, MU_ADD = 2'd2, MU_SUB = 2'd3} mul_op_e;

endpackage
