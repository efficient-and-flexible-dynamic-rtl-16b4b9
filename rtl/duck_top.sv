// Top level: the two DUCK-reconfigured accelerators side by side.
//
// * efpga: a fine-grain embedded FPGA of 4960 logic cells in 8 domains,
//   every logic cell and interconnection box shadowed by a DUCK, each
//   domain with its own 6-bit configuration path, configuration memory and
//   controller. Ports prefixed fp_.
// * dart_cluster: a coarse-grain DART cluster of six DPRs and a cluster
//   crossbar, shadowed by DUCKs on an 8-bit configuration path split into
//   three domains. Ports prefixed da_.
// The two share only clock and reset. Commands use the encoding 0 = no
// operation, 1 = propagate (and optionally save the displaced context),
// 2 = swap; see config_ctrl for the protocol and timing.
module duck_top
  import duck_pkg::*;
  import dart_pkg::*;
#(
  localparam int unsigned FD   = 8,                 // e-FPGA domains
  localparam int unsigned FTR  = 40,                // e-FPGA tile rows
  localparam int unsigned FTC  = 124,               // e-FPGA tile columns
  localparam int unsigned FAW  = $clog2(4 * 3100),
  localparam int unsigned DAW  = $clog2(8 * 27)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // ---------------- e-FPGA ----------------
  input  logic [FD-1:0]             fp_cmd_valid,
  output logic [FD-1:0]             fp_cmd_ready,
  input  logic [FD-1:0][1:0]        fp_cmd,
  input  logic [FD-1:0][1:0]        fp_cmd_ctx,
  input  logic [FD-1:0]             fp_cmd_save,
  input  logic [FD-1:0][1:0]        fp_cmd_save_ctx,
  input  logic [FD-1:0]             fp_cmd_ff_init,
  output logic [FD-1:0]             fp_done,
  input  logic                      fp_h_en,
  input  logic                      fp_h_we,
  input  logic [2:0]                fp_h_dom,
  input  logic [FAW-1:0]            fp_h_addr,
  input  logic [5:0]                fp_h_wdata,
  output logic [5:0]                fp_h_rdata,
  input  logic [FD-1:0]             fp_ram_we,
  input  logic [FD-1:0]             fp_ram_din,
  input  logic [FTR-1:0]            fp_west_in,
  input  logic [FTR-1:0]            fp_east_in,
  input  logic [FTC-1:0]            fp_north_in,
  input  logic [FTC-1:0]            fp_south_in,
  output logic [FTR-1:0]            fp_west_out,
  output logic [FTR-1:0]            fp_east_out,
  output logic [FTC-1:0]            fp_north_out,
  output logic [FTC-1:0]            fp_south_out,
  input  logic [FTR-1:0]            fp_carry_in,
  output logic [FTR-1:0]            fp_carry_out,
  // ---------------- DART cluster ----------------
  input  logic [2:0]                da_cmd_valid,
  output logic [2:0]                da_cmd_ready,
  input  logic [2:0][1:0]           da_cmd,
  input  logic [2:0][2:0]           da_cmd_ctx,
  input  logic [2:0]                da_cmd_save,
  input  logic [2:0][2:0]           da_cmd_save_ctx,
  output logic [2:0]                da_done,
  input  logic                      da_h_en,
  input  logic                      da_h_we,
  input  logic [1:0]                da_h_dom,
  input  logic [DAW-1:0]            da_h_addr,
  input  logic [7:0]                da_h_wdata,
  output logic [7:0]                da_h_rdata,
  input  logic                      da_dm_we,
  input  logic [2:0]                da_dm_dpr,
  input  logic [1:0]                da_dm_bank,
  input  logic [5:0]                da_dm_addr,
  input  logic [15:0]               da_dm_wdata,
  output logic [7:0][15:0]          da_lanes
);

  cfg_cmd_e [FD-1:0] fp_cmd_e;
  cfg_cmd_e [2:0]    da_cmd_e;

  for (genvar i = 0; i < FD; i++) begin : g_fcmd
    assign fp_cmd_e[i] = cfg_cmd_e'(fp_cmd[i]);
  end
  for (genvar i = 0; i < 3; i++) begin : g_dcmd
    assign da_cmd_e[i] = cfg_cmd_e'(da_cmd[i]);
  end

  efpga u_efpga (
    .clk, .rst_n,
    .cmd_valid(fp_cmd_valid), .cmd_ready(fp_cmd_ready), .cmd(fp_cmd_e),
    .cmd_ctx(fp_cmd_ctx), .cmd_save(fp_cmd_save), .cmd_save_ctx(fp_cmd_save_ctx),
    .cmd_ff_init(fp_cmd_ff_init), .done(fp_done),
    .h_en(fp_h_en), .h_we(fp_h_we), .h_dom(fp_h_dom), .h_addr(fp_h_addr),
    .h_wdata(fp_h_wdata), .h_rdata(fp_h_rdata),
    .ram_we(fp_ram_we), .ram_din(fp_ram_din),
    .west_in(fp_west_in), .east_in(fp_east_in), .north_in(fp_north_in), .south_in(fp_south_in),
    .west_out(fp_west_out), .east_out(fp_east_out), .north_out(fp_north_out),
    .south_out(fp_south_out), .carry_in(fp_carry_in), .carry_out(fp_carry_out)
  );

  dart_cluster u_dart (
    .clk, .rst_n,
    .cmd_valid(da_cmd_valid), .cmd_ready(da_cmd_ready), .cmd(da_cmd_e),
    .cmd_ctx(da_cmd_ctx), .cmd_save(da_cmd_save), .cmd_save_ctx(da_cmd_save_ctx), .done(da_done),
    .h_en(da_h_en), .h_we(da_h_we), .h_dom(da_h_dom), .h_addr(da_h_addr),
    .h_wdata(da_h_wdata), .h_rdata(da_h_rdata),
    .dm_we(da_dm_we), .dm_dpr(da_dm_dpr), .dm_bank(da_dm_bank), .dm_addr(da_dm_addr),
    .dm_wdata(da_dm_wdata), .cl_lanes(da_lanes)
  );

endmodule
