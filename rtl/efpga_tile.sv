// One tile of the e-FPGA: a logic cell, its DyRIBox and their shared DUCK.
//
// Routing: the tile's DyRIBox has five 1-bit inputs, the route outputs of
// the west, north, east and south neighbours (nbr_in[0..3]) and the tile's
// own cell output (input 4), and five outputs: the four LUT inputs of the
// cell (outputs 0..3) and the tile's route output seen by the neighbours
// (output 4). Each output reaches P = 4 of the 5 inputs, which gives
// 5 x 2 = 10 configuration bits, the published size of a tile's DyRIBox
// context; with the 20 cell bits the tile context is 30 bits, five words of
// the 6-bit configuration path. Carry runs west to east through carry_in /
// carry_out.
//
// Configuration: shift_en/scan_in/scan_out make the tile one link of the
// domain's configuration path; conf_en exchanges the shadow and live
// contexts (DyRIBox in that cycle, logic cell over 20 cycles, busy meanwhile).
// The neighbour pattern of the mesh is this design's choice; the publication
// gives only the bit counts. Route outputs are combinational, so a
// configuration that routes a signal around a ring of tiles forms a
// combinational loop, as in any island-style FPGA; the reset configuration
// has none.
module efpga_tile
  import duck_pkg::*;
#(
  parameter int unsigned W = CFG_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // configuration path and exchange
  input  logic         shift_en,
  input  logic [W-1:0] scan_in,
  output logic [W-1:0] scan_out,
  input  logic         conf_en,
  output logic         busy,
  input  logic         ff_init,
  // RAM mode write strobe and data
  input  logic         ram_we,
  input  logic         ram_din,
  // computing path
  input  logic [3:0]   nbr_in,     // 0 west, 1 north, 2 east, 3 south
  output logic         route_out,
  input  logic         carry_in,
  output logic         carry_out
);

  logic                    drb_swap_en;
  logic [DRB_CFG_BITS-1:0] drb_duck_q, drb_cfg_q;
  logic                    lc_shift_en, lc_cfg_in, lc_cfg_out;
  logic                    cell_out;
  logic [4:0][0:0]         drb_in, drb_out;
  logic [3:0]              cell_i;

  tile_duck #(.LC_BITS(LC_CFG_BITS), .DRB_BITS(DRB_CFG_BITS), .W(W)) u_duck (
    .clk, .rst_n, .shift_en, .scan_in, .scan_out, .conf_en, .busy,
    .drb_swap_en, .drb_duck_q, .drb_cfg_q,
    .lc_shift_en, .lc_cfg_in, .lc_cfg_out
  );

  assign drb_in = {cell_out, nbr_in[3], nbr_in[2], nbr_in[1], nbr_in[0]};

  dyribox #(.N(5), .M(5), .P(4), .B(1)) u_drb (
    .clk, .rst_n, .swap_en(drb_swap_en), .duck_q(drb_duck_q), .cfg_q(drb_cfg_q),
    .in_data(drb_in), .out_data(drb_out)
  );

  assign cell_i    = {drb_out[3], drb_out[2], drb_out[1], drb_out[0]};
  assign route_out = drb_out[4];

  logic_cell u_lc (
    .clk, .rst_n,
    .cfg_shift_en(lc_shift_en), .cfg_in(lc_cfg_in), .cfg_out(lc_cfg_out),
    .ram_we, .ram_din, .ff_init,
    .i(cell_i), .carry_in, .carry_out, .out(cell_out)
  );

endmodule
