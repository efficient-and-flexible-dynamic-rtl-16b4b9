// DART cluster with DUCK reconfiguration: six DPRs joined by a cluster
// crossbar, configured over three parallel reconfiguration domains.
//
// Computing path: each DPR offers ten 16-bit sources (memories, registers,
// FUs); the cluster crossbar is a DyRIBox with those 60 inputs and 8 output
// lanes, each lane able to take one of 30 sources (lane j reaches sources
// floor(j*60/8) + s, s = 0..29, modulo 60). The eight lanes go to every DPR's multi-bus and are
// also brought out on cl_lanes.
//
// Configuration: a cluster context is 568 bits, 71 words of the 8-bit
// configuration path. It is split into NDOM = 3 domains, each with its own
// configuration memory and controller working in parallel: domain 0 holds
// DPR0-DPR1 (22 words), domain 1 DPR2-DPR3 (22 words), domain 2 DPR4-DPR5
// and the crossbar DUCK (27 words). A swap exchanges every DUCK of a
// domain with its configuration registers in one clock cycle; commanding
// all three domains together reconfigures the whole cluster in one cycle.
// Host ports: h_* loads and reads contexts (h_dom selects the domain,
// h_addr = context*WORDS_of_domain + word, read data one cycle later);
// dm_* fills the DPR data memories.
//
// Published: the six DPRs, the crossbar sizes, the 568-bit context, the
// 8-bit path and the three domains. This design's choices: which DPRs form
// which domain, the memory organisation and the command interface (the same
// controller as the e-FPGA domains). The cluster controller, DMA controller,
// dedicated processing core and cluster data memory of the DART cluster are
// not part of this RTL.
module dart_cluster
  import duck_pkg::*;
  import dart_pkg::*;
#(
  parameter int unsigned CONTEXTS = 8,
  parameter int unsigned DM_DEPTH = 64,
  localparam int unsigned NDOM  = 3,
  localparam int unsigned DPD   = NDPR / NDOM,           // DPRs per domain
  localparam int unsigned WDPR  = DPR_BITS / CFGW,       // 11 words per DPR
  localparam int unsigned WCL   = DBCL_BITS / CFGW,      // 5 words for the crossbar
  localparam int unsigned WMAX  = DPD * WDPR + WCL,      // 27
  localparam int unsigned HAW   = $clog2(CONTEXTS * WMAX),
  localparam int unsigned CXW   = clog2_min1(CONTEXTS),
  localparam int unsigned DMA   = $clog2(DM_DEPTH)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // per-domain command interface
  input  logic [NDOM-1:0]              cmd_valid,
  output logic [NDOM-1:0]              cmd_ready,
  input  cfg_cmd_e [NDOM-1:0]          cmd,
  input  logic [NDOM-1:0][CXW-1:0]     cmd_ctx,
  input  logic [NDOM-1:0]              cmd_save,
  input  logic [NDOM-1:0][CXW-1:0]     cmd_save_ctx,
  output logic [NDOM-1:0]              done,
  // host access to the configuration memories
  input  logic                         h_en,
  input  logic                         h_we,
  input  logic [1:0]                   h_dom,
  input  logic [HAW-1:0]               h_addr,
  input  logic [CFGW-1:0]              h_wdata,
  output logic [CFGW-1:0]              h_rdata,
  // data memory fill
  input  logic                         dm_we,
  input  logic [2:0]                   dm_dpr,
  input  logic [1:0]                   dm_bank,
  input  logic [DMA-1:0]               dm_addr,
  input  logic [DW-1:0]                dm_wdata,
  // cluster network lanes
  output logic [DBCL_M-1:0][DW-1:0]    cl_lanes
);

  logic [NDPR-1:0][9:0][DW-1:0] src;
  logic [DBCL_N-1:0][DW-1:0]    cl_src;
  logic [NDOM-1:0]              s_en, c_en;
  logic [NDOM-1:0][CFGW-1:0]    s_in, s_out;
  logic [NDPR:0][CFGW-1:0]      chain;      // chain[i] feeds DPR i
  logic [NDOM-1:0][CFGW-1:0]    h_rd;
  logic [1:0]                   h_dom_q;
  logic [DBCL_BITS-1:0]         cl_duck_q, cl_cfg_q;
  logic [CFGW-1:0]              cl_scan_out;

  always_ff @(posedge clk) if (h_en) h_dom_q <= h_dom;
  assign h_rdata = h_rd[h_dom_q];

  for (genvar dm = 0; dm < NDOM; dm++) begin : g_dom
    localparam int unsigned WORDS = (dm == NDOM - 1) ? WMAX : DPD * WDPR;
    localparam int unsigned AW    = $clog2(CONTEXTS * WORDS);
    logic [AW-1:0]   m_raddr, m_waddr;
    logic [CFGW-1:0] m_rdata, m_wdata;
    logic            m_we, f_init_unused;

    config_memory #(.W(CFGW), .WORDS(WORDS), .CONTEXTS(CONTEXTS)) u_mem (
      .clk,
      .h_en(h_en && h_dom == 2'(dm)), .h_we, .h_addr(h_addr[AW-1:0]), .h_wdata, .h_rdata(h_rd[dm]),
      .c_raddr(m_raddr), .c_rdata(m_rdata), .c_we(m_we), .c_waddr(m_waddr), .c_wdata(m_wdata)
    );

    config_ctrl #(.W(CFGW), .WORDS(WORDS), .CONTEXTS(CONTEXTS)) u_ctrl (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[dm]), .cmd_ready(cmd_ready[dm]), .cmd(cmd[dm]),
      .cmd_ctx(cmd_ctx[dm]), .cmd_save(cmd_save[dm]), .cmd_save_ctx(cmd_save_ctx[dm]),
      .cmd_ff_init(1'b0), .done(done[dm]),
      .mem_raddr(m_raddr), .mem_rdata(m_rdata), .mem_we(m_we), .mem_waddr(m_waddr),
      .mem_wdata(m_wdata),
      .shift_en(s_en[dm]), .scan_in(s_in[dm]), .scan_out(s_out[dm]), .conf_en(c_en[dm]),
      .ff_init(f_init_unused), .fabric_busy(1'b0)
    );
  end

  // configuration paths: domain dm enters at DPR dm*DPD and leaves after
  // DPR dm*DPD+DPD-1 (the last domain continues through the crossbar DUCK)
  for (genvar i = 0; i < NDPR; i++) begin : g_dpr
    localparam int unsigned DM = i / DPD;
    logic [CFGW-1:0] sin;
    assign sin = (i % DPD == 0) ? s_in[DM] : chain[i];

    dart_dpr #(.DM_DEPTH(DM_DEPTH)) u_dpr (
      .clk, .rst_n,
      .shift_en(s_en[DM]), .scan_in(sin), .scan_out(chain[i+1]), .conf_en(c_en[DM]),
      .dm_we(dm_we && dm_dpr == 3'(i)), .dm_bank, .dm_addr, .dm_wdata,
      .cl_in(cl_lanes), .src_out(src[i])
    );
    assign cl_src[i*10 +: 10] = src[i];
  end
  assign chain[0] = s_in[0];

  for (genvar dm = 0; dm < NDOM - 1; dm++) begin : g_out
    assign s_out[dm] = chain[(dm + 1) * DPD];
  end

  duck_reg #(.NBITS(DBCL_BITS), .W(CFGW)) u_cl_duck (
    .clk, .rst_n, .shift_en(s_en[NDOM-1]), .scan_in(chain[NDPR]), .scan_out(cl_scan_out),
    .swap_en(c_en[NDOM-1]), .swap_d(cl_cfg_q), .q(cl_duck_q)
  );
  assign s_out[NDOM-1] = cl_scan_out;

  dyribox #(.N(DBCL_N), .M(DBCL_M), .P(DBCL_P), .B(DW)) u_xbar (
    .clk, .rst_n, .swap_en(c_en[NDOM-1]), .duck_q(cl_duck_q), .cfg_q(cl_cfg_q),
    .in_data(cl_src), .out_data(cl_lanes)
  );

endmodule
