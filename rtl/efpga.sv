// DUCK-based embedded FPGA: DR x DC reconfiguration domains, each with its
// own configuration memory, configuration controller and configuration
// path, tiled into one computing array.
//
// The default is the published implementation: 8 domains of 620 logic cells
// (4960 cells), a 6-bit configuration path and 30 configuration bits per
// tile, so one domain context is 620 x 30 / 6 = 3100 words and all eight
// domains propagate in parallel (24800 words per full context). Each
// domain is commanded separately (propagate/preempt, swap), so a domain can
// keep computing or idle while another is reconfigured, and a context can
// cover several domains by commanding them together.
//
// The computing array is (DR*ROWS) x (DC*COLS) tiles; domains are joined
// edge to edge, so a computing path may cross domain borders. The array's
// outer edges are brought out as the ports *_in/*_out, and each row's carry
// chain enters on the west (carry_in) and leaves on the east (carry_out).
// The host loads and reads back contexts through one memory port: h_dom
// picks the domain, h_addr = context*WORDS + word, read data one cycle
// later.
//
// Domain placement (two rows of four) follows the published floor plan; the
// static computing memories beside the domains are not part of this RTL.
module efpga
  import duck_pkg::*;
#(
  parameter int unsigned DR       = 2,
  parameter int unsigned DC       = 4,
  parameter int unsigned ROWS     = 20,
  parameter int unsigned COLS     = 31,
  parameter int unsigned W        = CFG_W,
  parameter int unsigned CONTEXTS = 4,
  localparam int unsigned D     = DR * DC,
  localparam int unsigned TR    = DR * ROWS,
  localparam int unsigned TC    = DC * COLS,
  localparam int unsigned WORDS = ROWS * COLS * TILE_BITS / W,
  localparam int unsigned AW    = $clog2(CONTEXTS * WORDS),
  localparam int unsigned CXW   = clog2_min1(CONTEXTS),
  localparam int unsigned DW    = clog2_min1(D)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // per-domain command interface
  input  logic [D-1:0]             cmd_valid,
  output logic [D-1:0]             cmd_ready,
  input  cfg_cmd_e [D-1:0]         cmd,
  input  logic [D-1:0][CXW-1:0]    cmd_ctx,
  input  logic [D-1:0]             cmd_save,
  input  logic [D-1:0][CXW-1:0]    cmd_save_ctx,
  input  logic [D-1:0]             cmd_ff_init,
  output logic [D-1:0]             done,
  // host access to the configuration memories
  input  logic                     h_en,
  input  logic                     h_we,
  input  logic [DW-1:0]            h_dom,
  input  logic [AW-1:0]            h_addr,
  input  logic [W-1:0]             h_wdata,
  output logic [W-1:0]             h_rdata,
  // RAM-mode write strobe and data, per domain
  input  logic [D-1:0]             ram_we,
  input  logic [D-1:0]             ram_din,
  // computing array edges
  input  logic [TR-1:0]            west_in,
  input  logic [TR-1:0]            east_in,
  input  logic [TC-1:0]            north_in,
  input  logic [TC-1:0]            south_in,
  output logic [TR-1:0]            west_out,
  output logic [TR-1:0]            east_out,
  output logic [TC-1:0]            north_out,
  output logic [TC-1:0]            south_out,
  input  logic [TR-1:0]            carry_in,
  output logic [TR-1:0]            carry_out
);

  // edge signals of every domain, indexed [domain row][domain column]
  logic [DR-1:0][DC-1:0][ROWS-1:0] d_win, d_ein, d_wout, d_eout, d_cin, d_cout;
  logic [DR-1:0][DC-1:0][COLS-1:0] d_nin, d_sin, d_nout, d_sout;
  logic [D-1:0][W-1:0]             h_rd;
  logic [DW-1:0]                   h_dom_q;

  always_ff @(posedge clk) if (h_en) h_dom_q <= h_dom;
  assign h_rdata = h_rd[h_dom_q];

  for (genvar dr = 0; dr < DR; dr++) begin : g_dr
    for (genvar dc = 0; dc < DC; dc++) begin : g_dc
      localparam int unsigned DI = dr * DC + dc;

      logic [AW-1:0] m_raddr, m_waddr;
      logic [W-1:0]  m_rdata, m_wdata, s_in, s_out;
      logic          m_we, s_en, c_en, f_init, f_busy;

      // stitching of the computing array
      assign d_win[dr][dc] = (dc == 0)      ? west_in[dr*ROWS +: ROWS] : d_eout[dr][dc-1];
      assign d_ein[dr][dc] = (dc == DC - 1) ? east_in[dr*ROWS +: ROWS] : d_wout[dr][dc+1];
      assign d_cin[dr][dc] = (dc == 0)      ? carry_in[dr*ROWS +: ROWS] : d_cout[dr][dc-1];
      assign d_nin[dr][dc] = (dr == 0)      ? north_in[dc*COLS +: COLS] : d_sout[dr-1][dc];
      assign d_sin[dr][dc] = (dr == DR - 1) ? south_in[dc*COLS +: COLS] : d_nout[dr+1][dc];

      config_memory #(.W(W), .WORDS(WORDS), .CONTEXTS(CONTEXTS)) u_mem (
        .clk,
        .h_en(h_en && (h_dom == DW'(DI))), .h_we, .h_addr, .h_wdata, .h_rdata(h_rd[DI]),
        .c_raddr(m_raddr), .c_rdata(m_rdata), .c_we(m_we), .c_waddr(m_waddr), .c_wdata(m_wdata)
      );

      config_ctrl #(.W(W), .WORDS(WORDS), .CONTEXTS(CONTEXTS)) u_ctrl (
        .clk, .rst_n,
        .cmd_valid(cmd_valid[DI]), .cmd_ready(cmd_ready[DI]), .cmd(cmd[DI]),
        .cmd_ctx(cmd_ctx[DI]), .cmd_save(cmd_save[DI]), .cmd_save_ctx(cmd_save_ctx[DI]),
        .cmd_ff_init(cmd_ff_init[DI]), .done(done[DI]),
        .mem_raddr(m_raddr), .mem_rdata(m_rdata), .mem_we(m_we), .mem_waddr(m_waddr),
        .mem_wdata(m_wdata),
        .shift_en(s_en), .scan_in(s_in), .scan_out(s_out), .conf_en(c_en), .ff_init(f_init),
        .fabric_busy(f_busy)
      );

      efpga_domain #(.ROWS(ROWS), .COLS(COLS), .W(W)) u_dom (
        .clk, .rst_n,
        .shift_en(s_en), .scan_in(s_in), .scan_out(s_out), .conf_en(c_en), .busy(f_busy),
        .ff_init(f_init), .ram_we(ram_we[DI]), .ram_din(ram_din[DI]),
        .west_in(d_win[dr][dc]), .east_in(d_ein[dr][dc]),
        .north_in(d_nin[dr][dc]), .south_in(d_sin[dr][dc]),
        .west_out(d_wout[dr][dc]), .east_out(d_eout[dr][dc]),
        .north_out(d_nout[dr][dc]), .south_out(d_sout[dr][dc]),
        .carry_in(d_cin[dr][dc]), .carry_out(d_cout[dr][dc])
      );

      // outer edges
      if (dc == 0)      begin : g_w assign west_out[dr*ROWS +: ROWS]  = d_wout[dr][dc]; end
      if (dc == DC - 1) begin : g_e assign east_out[dr*ROWS +: ROWS]  = d_eout[dr][dc];
                                    assign carry_out[dr*ROWS +: ROWS] = d_cout[dr][dc]; end
      if (dr == 0)      begin : g_n assign north_out[dc*COLS +: COLS] = d_nout[dr][dc]; end
      if (dr == DR - 1) begin : g_s assign south_out[dc*COLS +: COLS] = d_sout[dr][dc]; end
    end
  end

endmodule
