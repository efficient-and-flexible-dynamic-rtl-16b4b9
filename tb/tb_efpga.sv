// Self-checking testbench of efpga at a reduced size (2 x 2 domains of
// 2 x 3 tiles, 30 words per domain context, 4 contexts).
// The host writes two contexts into every domain's configuration memory:
// P routes every tile's west input east, Q routes north to south. Checks:
// all domains propagate in parallel (done WORDS+2 cycles after acceptance);
// the 20-cycle exchange; P carries west_in to east_out across domain
// borders; P keeps computing while Q propagates; after the exchange Q
// carries north_in to south_out; the displaced context P is saved word for
// word in a spare context (preemption); a swap commanded on one domain
// only changes that domain (partial reconfiguration).
module tb_efpga;
  import duck_pkg::*;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int DR = 2, DC = 2, ROWS = 2, COLS = 3, CTX = 4;
  localparam int D = DR * DC, TR = DR * ROWS, TC = DC * COLS;
  localparam int WORDS = ROWS * COLS * 5, AW = $clog2(CTX * WORDS);

  logic [D-1:0]        cmd_valid, cmd_ready, cmd_save, cmd_ff_init, done, ram_we, ram_din;
  cfg_cmd_e [D-1:0]    cmd;
  logic [D-1:0][1:0]   cmd_ctx, cmd_save_ctx;
  logic                h_en, h_we;
  logic [1:0]          h_dom;
  logic [AW-1:0]       h_addr;
  logic [5:0]          h_wdata, h_rdata;
  logic [TR-1:0]       west_in, east_in, west_out, east_out, carry_in, carry_out;
  logic [TC-1:0]       north_in, south_in, north_out, south_out;

  efpga #(.DR(DR), .DC(DC), .ROWS(ROWS), .COLS(COLS), .CONTEXTS(CTX)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .cmd_ctx, .cmd_save, .cmd_save_ctx, .cmd_ff_init, .done,
    .h_en, .h_we, .h_dom, .h_addr, .h_wdata, .h_rdata, .ram_we, .ram_din,
    .west_in, .east_in, .north_in, .south_in, .west_out, .east_out, .north_out, .south_out,
    .carry_in, .carry_out);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // tile contexts: route output select (bits 29:28) 1 = west, 2 = north
  localparam logic [29:0] CTX_P = {2'd1, 8'd0, 20'd0};
  localparam logic [29:0] CTX_Q = {2'd2, 8'd0, 20'd0};
  function automatic logic [5:0] word_of(input logic [29:0] c, input int k);
    return c[29 - 6 * (k % 5) -: 6];
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic command(input logic [D-1:0] mask, input cfg_cmd_e c, input int ctx, input bit save,
                         input int sctx, output int cyc);
    int n;
    while ((cmd_ready & mask) != mask) @(posedge clk);
    #1;
    cmd_valid = mask;
    for (int d = 0; d < D; d++) begin
      cmd[d] = c; cmd_ctx[d] = 2'(ctx); cmd_save[d] = save; cmd_save_ctx[d] = 2'(sctx); cmd_ff_init[d] = 0;
    end
    @(posedge clk); #1;
    cmd_valid = '0; n = 1;
    while ((done & mask) != mask) begin n++; @(posedge clk); #1; end
    cyc = n;
  endtask

  initial begin
    int cyc;
    logic [D-1:0] all = '1;
    cmd_valid = '0; cmd = '{default: CMD_NOP}; cmd_ctx = '0; cmd_save = '0; cmd_save_ctx = '0; cmd_ff_init = '0;
    h_en = 0; h_we = 0; h_dom = 0; h_addr = 0; h_wdata = 0; ram_we = '0; ram_din = '0;
    west_in = '0; east_in = '0; north_in = '0; south_in = '0; carry_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int d = 0; d < D; d++)
      for (int k = 0; k < WORDS; k++) begin
        h_en = 1; h_we = 1; h_dom = 2'(d);
        h_addr = AW'(k);         h_wdata = word_of(CTX_P, k); @(posedge clk); #1;
        h_addr = AW'(WORDS + k); h_wdata = word_of(CTX_Q, k); @(posedge clk); #1;
      end
    h_en = 0; h_we = 0;
    command(all, CMD_PROPAGATE, 0, 0, 0, cyc);
    chk(cyc == WORDS + 2, $sformatf("parallel propagation done after %0d", cyc));
    command(all, CMD_SWAP, 0, 0, 0, cyc);
    chk(cyc == 22, $sformatf("exchange done after %0d", cyc));
    for (int v = 0; v < 10; v++) begin
      west_in = TR'($urandom); #1;
      chk(east_out == west_in, "P: west to east across domains");
      @(posedge clk); #1;
    end
    // propagate Q while P computes, saving the displaced words in context 3
    fork
      command(all, CMD_PROPAGATE, 1, 1, 3, cyc);
      for (int v = 0; v < WORDS; v++) begin
        west_in = TR'($urandom); #1;
        chk(east_out == west_in, "P computes during propagation");
        @(posedge clk); #1;
      end
    join
    command(all, CMD_SWAP, 0, 0, 0, cyc);
    for (int v = 0; v < 10; v++) begin
      north_in = TC'($urandom); #1;
      chk(south_out == north_in, "Q: north to south across domains");
      @(posedge clk); #1;
    end
    // preemption of P: propagate P again, saving what leaves into context 2
    command(all, CMD_PROPAGATE, 0, 1, 2, cyc);
    for (int d = 0; d < D; d++)
      for (int k = 0; k < WORDS; k++) begin
        h_en = 1; h_we = 0; h_dom = 2'(d); h_addr = AW'(2 * WORDS + k);
        @(posedge clk); #1;
        chk(h_rdata == word_of(CTX_P, k), "preempted context saved");
      end
    h_en = 0;
    // partial reconfiguration: swap P back into domain 0 only
    command(4'b0001, CMD_SWAP, 0, 0, 0, cyc);
    for (int v = 0; v < 10; v++) begin
      north_in = TC'($urandom); west_in = TR'($urandom); #1;
      // domains 1..3 still route north to south; columns of domain 1 reach the south edge
      chk(south_out[TC-1:COLS] == north_in[TC-1:COLS], "untouched domains keep their context");
      // domain 0 (top left) now routes west to east: its east edge feeds domain 1
      chk(dut.d_eout[0][0] == west_in[ROWS-1:0], "reconfigured domain routes west to east");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
