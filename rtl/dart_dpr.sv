// DART reconfigurable datapath (DPR) with its DUCK.
//
// Units: four address generators, each driving one local data memory;
// two registers reg1/reg2; four functional units, FU1 and FU3 add/subtract,
// FU2 and FU4 multipliers, each with an output register; and a multi-bus
// (a DyRIBox with 18 inputs and 10 outputs, every output able to take any
// input) that connects them. Bus inputs: 0-3 data memories, 4-5 reg1/reg2,
// 6-9 FU1-FU4 outputs, 10-17 the eight lanes of the cluster network
// (cl_in). Bus outputs: 0-1 reg1/reg2 inputs, 2-9 operands a/b of FU1..FU4.
// The DPR offers its ten sources (memories, registers, FUs, same order) to
// the cluster network on src_out.
//
// Configuration: 38 unit bits (layout in dart_pkg) plus the 50 multi-bus
// bits. An 88-bit DUCK (eleven 8-bit words) is this DPR's link of the
// configuration path; conf_en swaps DUCK and configuration registers of all
// units and of the multi-bus in one clock cycle, while the DPR computes on.
// An address generator with its bit set steps its address by one each cycle
// (wrapping at DM_DEPTH); otherwise it holds. Every swap restarts all
// address generators at 0. Register and FU output enables are the six
// "register" bits. Memories are filled through the dm_* port and read
// synchronously, so a memory word reaches the bus one cycle after its
// address.
//
// Published: the unit set, the bit counts and the one-cycle DUCK swap. This
// design's choices: memory depth, the address generators' behaviour (a
// linear +1 step when enabled, restarted by every swap), the operations and
// the bus numbering.
module dart_dpr
  import dart_pkg::*;
#(
  parameter int unsigned DM_DEPTH = 64,
  localparam int unsigned DMA = $clog2(DM_DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration path
  input  logic                     shift_en,
  input  logic [CFGW-1:0]          scan_in,
  output logic [CFGW-1:0]          scan_out,
  input  logic                     conf_en,
  // data memory fill port
  input  logic                     dm_we,
  input  logic [1:0]               dm_bank,
  input  logic [DMA-1:0]           dm_addr,
  input  logic [DW-1:0]            dm_wdata,
  // cluster network
  input  logic [DBCL_M-1:0][DW-1:0] cl_in,
  output logic [9:0][DW-1:0]        src_out
);

  logic [DPR_BITS-1:0]      duck_q;
  logic [DPR_UNIT_BITS-1:0] ucfg;
  logic [DBDPR_BITS-1:0]    bus_cfg;
  logic [DBDPR_N-1:0][DW-1:0] bus_in;
  logic [DBDPR_M-1:0][DW-1:0] bus_out;

  logic [3:0][DMA-1:0] ag;
  logic [3:0][DW-1:0]  dm_q;
  logic [DW-1:0]       reg1, reg2;
  logic [3:0][DW-1:0]  fu_q, fu_y;
  logic [DW-1:0]       dmem [4][DM_DEPTH];

  duck_reg #(.NBITS(DPR_BITS), .W(CFGW)) u_duck (
    .clk, .rst_n, .shift_en, .scan_in, .scan_out,
    .swap_en(conf_en), .swap_d({bus_cfg, ucfg}), .q(duck_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)       ucfg <= '0;
    else if (conf_en) ucfg <= duck_q[DPR_UNIT_BITS-1:0];
  end

  dyribox #(.N(DBDPR_N), .M(DBDPR_M), .P(DBDPR_N), .B(DW)) u_bus (
    .clk, .rst_n, .swap_en(conf_en), .duck_q(duck_q[DPR_BITS-1:DPR_UNIT_BITS]), .cfg_q(bus_cfg),
    .in_data(bus_in), .out_data(bus_out)
  );

  // address generators and data memories
  for (genvar k = 0; k < 4; k++) begin : g_ag
    always_ff @(posedge clk) begin
      if (!rst_n || conf_en)     ag[k] <= '0;
      else if (ucfg[F_AG + k])   ag[k] <= ag[k] + 1'b1;
    end
    always_ff @(posedge clk) begin
      if (dm_we && dm_bank == 2'(k)) dmem[k][dm_addr] <= dm_wdata;
      dm_q[k] <= dmem[k][ag[k]];
    end
  end

  // functional units
  dart_fu_addsub u_fu1 (.cfg(ucfg[F_FU1 +: 3]),  .a(bus_out[2]), .b(bus_out[3]), .y(fu_y[0]));
  dart_fu_mul    u_fu2 (.cfg(ucfg[F_FU2 +: 11]), .a(bus_out[4]), .b(bus_out[5]), .acc_in(fu_q[1]), .y(fu_y[1]));
  dart_fu_addsub u_fu3 (.cfg(ucfg[F_FU3 +: 3]),  .a(bus_out[6]), .b(bus_out[7]), .y(fu_y[2]));
  dart_fu_mul    u_fu4 (.cfg(ucfg[F_FU4 +: 11]), .a(bus_out[8]), .b(bus_out[9]), .acc_in(fu_q[3]), .y(fu_y[3]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg1 <= '0;
      reg2 <= '0;
      fu_q <= '0;
    end else begin
      if (ucfg[F_REG + 0]) reg1 <= bus_out[0];
      if (ucfg[F_REG + 1]) reg2 <= bus_out[1];
      for (int k = 0; k < 4; k++)
        if (ucfg[F_REG + 2 + k]) fu_q[k] <= fu_y[k];
    end
  end

  assign src_out = {fu_q[3], fu_q[2], fu_q[1], fu_q[0], reg2, reg1, dm_q[3], dm_q[2], dm_q[1], dm_q[0]};
  assign bus_in  = {cl_in, src_out};

endmodule
