// Shared constants and types of the DUCK reconfiguration fabric.
//
// A DUCK (Dynamic Unifier and reConfiguration blocK) sits next to every
// reconfigurable resource. It holds a shadow copy of the resource's
// configuration, reachable over a scan path, so that the next context can be
// shifted in (and the previous one shifted out) while the resource computes,
// and then exchanged with the live configuration registers in one step.
//
// The numbers below are those of the embedded-FPGA implementation: a logic
// cell carries 20 configuration bits, its interconnection box 10, and the
// configuration path of a domain is 6 bits wide. The command encoding of the
// configuration controller is this design's own choice.
package duck_pkg;

  // e-FPGA resource sizes
  localparam int unsigned LC_CFG_BITS  = 20;  // logic cell configuration bits
  localparam int unsigned LUT_BITS     = 16;  // 4-input LUT contents
  localparam int unsigned DRB_CFG_BITS = 10;  // DyRIBox of a tile: 5 outputs x 2 bits
  localparam int unsigned TILE_BITS    = LC_CFG_BITS + DRB_CFG_BITS;
  localparam int unsigned CFG_W        = 6;   // width of the configuration path

  // Logic-cell configuration word layout (bit positions inside the 20 bits)
  localparam int unsigned LC_CARRY_SEL = 16;  // 1: LUT input 0 comes from carry-in
  localparam int unsigned LC_INIT      = 17;  // set (1) / reset (0) value of the output register
  localparam int unsigned LC_SEQ       = 18;  // 1: registered output, 0: combinational
  localparam int unsigned LC_RAM       = 19;  // 1: LUT writable as a 16x1 RAM

  // Commands of a domain configuration controller
  typedef enum logic [1:0] {
    CMD_NOP       = 2'd0,
    CMD_PROPAGATE = 2'd1,  // shift a stored context into the DUCKs, saving what comes out
    CMD_SWAP      = 2'd2   // exchange DUCK and configuration registers
  } cfg_cmd_e;

  function automatic int unsigned clog2_min1(input int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
