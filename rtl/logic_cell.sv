// Logic cell of the e-FPGA: a 4-input LUT with carry logic, a RAM mode and
// an output register, configured by a 20-bit serial configuration chain.
//
// Configuration (20 bits, held in the cell itself):
//   bits 15:0  LUT contents, bit a = value for LUT address a
//   bit 16     carry select: 1 = LUT address bit 0 and the carry logic take
//              carry_in, 0 = they take input i[0]
//   bit 17     set/reset value loaded into the output register by ff_init
//   bit 18     output select: 1 = registered, 0 = combinational
//   bit 19     RAM mode: the LUT bits become a 16x1 RAM written through
//              ram_we/ram_din at address i[3:0]
// The chain shifts towards bit 0: with cfg_shift_en high, cfg_in enters bit
// 19 and bit 0 leaves on cfg_out. Twenty shifts therefore replace the whole
// configuration, and the bits leaving the cell are the old configuration in
// order bit 0 first; the tile DUCK uses this to exchange contexts.
//
// While the chain shifts, the output register holds its value and drives
// the cell output, whatever bit 18 says: a half-loaded context can then
// neither glitch the computing path nor close a combinational loop. During
// reset the output is forced low, so that whatever the configuration
// registers hold at power-up cannot oscillate through the routing mesh
// before reset has cleared them.
//
// The LUT address is {i[3], i[2], i[1], a0} where a0 is i[0] or carry_in
// (bit 16). carry_out is the carry of i[1] + i[2] + a0, so a column of cells
// with the LUT set to the 3-input XOR forms a ripple adder.
//
// The partition into configuration path, memory, carry and LUT areas and the
// 20-bit configuration are published; the assignment of the four control
// bits, the carry function and the RAM write port are this design's reading
// of a cell that the publication only sketches. The output register samples
// every clock; ram writes and LUT reads are synchronous/combinational.
module logic_cell
  import duck_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // configuration chain
  input  logic       cfg_shift_en,
  input  logic       cfg_in,
  output logic       cfg_out,
  // RAM mode write port
  input  logic       ram_we,
  input  logic       ram_din,
  // loads the output register with its configured set/reset value
  input  logic       ff_init,
  // computing path
  input  logic [3:0] i,
  input  logic       carry_in,
  output logic       carry_out,
  output logic       out
);

  logic [LC_CFG_BITS-1:0] cfg;
  logic                   a0, lut_out, out_ff;
  logic [3:0]             addr;

  assign a0       = cfg[LC_CARRY_SEL] ? carry_in : i[0];
  assign addr     = {i[3], i[2], i[1], a0};
  assign lut_out  = cfg[{1'b0, addr}];
  assign carry_out = (i[1] & i[2]) | (a0 & (i[1] ^ i[2]));
  assign out      = !rst_n ? 1'b0 : (cfg[LC_SEQ] || cfg_shift_en) ? out_ff : lut_out;
  assign cfg_out  = cfg[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg <= '0;
    end else if (cfg_shift_en) begin
      cfg <= {cfg_in, cfg[LC_CFG_BITS-1:1]};
    end else if (cfg[LC_RAM] && ram_we) begin
      cfg[{1'b0, i}] <= ram_din;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       out_ff <= 1'b0;
    else if (ff_init)      out_ff <= cfg[LC_INIT];
    else if (!cfg_shift_en) out_ff <= lut_out;
  end

endmodule
