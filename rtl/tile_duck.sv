// DUCK of one e-FPGA tile (a logic cell and its DyRIBox).
//
// It holds LC_BITS + DRB_BITS shadow bits: bits LC_BITS-1:0 mirror the logic
// cell configuration, the bits above mirror the DyRIBox configuration. The
// whole bank is one W-bit link of the domain's configuration path
// (shift_en, scan_in at the low end, scan_out = top W bits).
//
// conf_en starts a context exchange:
//  * DyRIBox: in the conf_en cycle drb_swap_en is high, the box loads
//    drb_duck_q and its old configuration drb_cfg_q is written back here, a
//    parallel one-cycle swap.
//  * Logic cell: its configuration registers form a serial chain, so a
//    counter walks k = 0..LC_BITS-1, one bit per cycle starting in the
//    conf_en cycle: shadow bit k is sent into the cell chain and the bit
//    leaving the cell is stored in shadow bit k. After LC_BITS cycles the
//    cell holds the former shadow context and the shadow holds the former
//    cell context, bit for bit. busy is high for the LC_BITS-1 cycles after
//    conf_en; the controller must neither shift nor raise conf_en then.
//
// The counter-selected serial transfer into the cell, the parallel swap of
// the interconnect and the 20 + 10 bits on a 6-bit path are published; the
// bit order and the write-back of the old context into the same shadow
// positions are this design's choices.
module tile_duck
  import duck_pkg::*;
#(
  parameter int unsigned LC_BITS  = LC_CFG_BITS,
  parameter int unsigned DRB_BITS = DRB_CFG_BITS,
  parameter int unsigned W        = CFG_W,
  localparam int unsigned NB = LC_BITS + DRB_BITS,
  localparam int unsigned CW = clog2_min1(LC_BITS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration path
  input  logic                shift_en,
  input  logic [W-1:0]        scan_in,
  output logic [W-1:0]        scan_out,
  // context exchange
  input  logic                conf_en,
  output logic                busy,
  // DyRIBox side
  output logic                drb_swap_en,
  output logic [DRB_BITS-1:0] drb_duck_q,
  input  logic [DRB_BITS-1:0] drb_cfg_q,
  // logic cell side
  output logic                lc_shift_en,
  output logic                lc_cfg_in,
  input  logic                lc_cfg_out
);

  logic [NB-1:0] d;
  logic [CW-1:0] cnt;
  logic [CW-1:0] k;

  initial begin
    assert (NB % W == 0) else $error("tile_duck: LC_BITS+DRB_BITS must be a multiple of W");
  end

  assign busy        = (cnt != '0);
  assign k           = conf_en ? '0 : cnt;
  assign lc_shift_en = conf_en | busy;
  assign lc_cfg_in   = d[k];
  assign drb_swap_en = conf_en;
  assign drb_duck_q  = d[NB-1:LC_BITS];
  assign scan_out    = d[NB-1 -: W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d   <= '0;
      cnt <= '0;
    end else begin
      if (lc_shift_en) begin
        d[k] <= lc_cfg_out;
        cnt  <= (32'(k) == LC_BITS - 1) ? '0 : k + 1'b1;
      end
      if (conf_en)
        d[NB-1:LC_BITS] <= drb_cfg_q;
      else if (shift_en && !busy)
        d <= {d[NB-W-1:0], scan_in};
    end
  end

  a_no_shift_when_busy: assert property (@(posedge clk) disable iff (!rst_n) !(busy && (shift_en || conf_en)));
  a_no_shift_with_conf: assert property (@(posedge clk) disable iff (!rst_n) !(conf_en && shift_en));

endmodule
