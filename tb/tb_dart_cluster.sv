// Self-checking testbench of dart_cluster (six DPRs, crossbar, three
// configuration domains with memories and controllers).
// Two cluster contexts are written through the host port: A streams each
// DPR's first data memory onto crossbar lanes, B makes every DPR add its
// first two memories in FU1 and puts the sums on the lanes. Checks: the
// three domains propagate in parallel (22, 22 and 27 words, done 24, 24
// and 29 cycles after acceptance); a swap commanded on all domains at once
// changes the whole cluster in one cycle; the lanes carry the expected
// values cycle by cycle; context A, displaced by B and propagated out,
// is saved word for word in a spare context (preemption).
module tb_dart_cluster;
  import duck_pkg::*;
  import dart_pkg::*;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [2:0]        cmd_valid, cmd_ready, cmd_save, done;
  cfg_cmd_e [2:0]    cmd;
  logic [2:0][2:0]   cmd_ctx, cmd_save_ctx;
  logic              h_en, h_we, dm_we;
  logic [1:0]        h_dom, dm_bank;
  logic [7:0]        h_addr, h_wdata, h_rdata;
  logic [2:0]        dm_dpr;
  logic [5:0]        dm_addr;
  logic [15:0]       dm_wdata;
  logic [7:0][15:0]  lanes;

  dart_cluster dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .cmd_ctx, .cmd_save, .cmd_save_ctx, .done,
    .h_en, .h_we, .h_dom, .h_addr, .h_wdata, .h_rdata, .dm_we, .dm_dpr, .dm_bank, .dm_addr, .dm_wdata,
    .cl_lanes(lanes));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  localparam int WD [3] = '{22, 22, 27};
  logic [15:0] mem [6][2][64];
  logic [87:0] dpr_a, dpr_b;
  logic [39:0] xb_a, xb_b;
  int          lane_src_a [8] = '{0, 10, 20, 30, 40, 50, 51, 0};
  int          lane_src_b [8] = '{6, 16, 26, 36, 46, 56, 56, 6};

  function automatic logic [39:0] xbar_ctx(input int srcs [8]);
    logic [39:0] c;
    for (int j = 0; j < 8; j++) c[5*j +: 5] = 5'((srcs[j] - j * 60 / 8 + 60) % 60);
    return c;
  endfunction

  // word k of domain dm's stream for a cluster context (same DPR context everywhere)
  function automatic logic [7:0] dom_word(input logic [87:0] dctx, input logic [39:0] xctx, input int dm, input int k);
    if (dm == 2) begin
      if (k < 5) return xctx[39 - 8*k -: 8];
      k -= 5;
    end
    return dctx[87 - 8*(k % 11) -: 8];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input int dm, input int addr, input logic [7:0] d);
    h_en = 1; h_we = 1; h_dom = 2'(dm); h_addr = 8'(addr); h_wdata = d;
    @(posedge clk); #1;
    h_en = 0; h_we = 0;
  endtask

  task automatic host_read(input int dm, input int addr, output logic [7:0] d);
    h_en = 1; h_we = 0; h_dom = 2'(dm); h_addr = 8'(addr);
    @(posedge clk); #1;
    h_en = 0;
    d = h_rdata;
  endtask

  // command all three domains at once; returns the cycles until each is done
  task automatic command_all(input cfg_cmd_e c, input int ctx, input bit save, input int sctx, output int cyc [3]);
    int n;
    bit fin [3];
    while (cmd_ready != 3'b111) @(posedge clk);
    #1;
    cmd_valid = 3'b111;
    for (int d = 0; d < 3; d++) begin
      cmd[d] = c; cmd_ctx[d] = 3'(ctx); cmd_save[d] = save; cmd_save_ctx[d] = 3'(sctx);
      fin[d] = 0; cyc[d] = 0;
    end
    @(posedge clk); #1;
    cmd_valid = 0; n = 1;
    while (!(fin[0] && fin[1] && fin[2])) begin
      for (int d = 0; d < 3; d++) if (done[d] && !fin[d]) begin fin[d] = 1; cyc[d] = n; end
      if (!(fin[0] && fin[1] && fin[2])) begin n++; @(posedge clk); #1; end
    end
  endtask

  initial begin
    int cyc [3];
    logic [7:0] rd;
    int ins_a [10] = '{0, 0, 2, 3, 4, 5, 6, 7, 8, 9};
    int ins_b [10] = '{0, 0, 0, 1, 4, 5, 6, 7, 8, 9};   // FU1 a = mem0, b = mem1
    cmd_valid = 0; cmd = '{CMD_NOP, CMD_NOP, CMD_NOP}; cmd_ctx = '0; cmd_save = '0; cmd_save_ctx = '0;
    h_en = 0; h_we = 0; h_dom = 0; h_addr = 0; h_wdata = 0;
    dm_we = 0; dm_dpr = 0; dm_bank = 0; dm_addr = 0; dm_wdata = 0;
    // DPR contexts: A = AGs step; B = AGs step, FU1 adds mem0 + mem1 into its register
    dpr_a = '0; dpr_b = '0;
    dpr_a[3:0] = 4'hf; dpr_b[3:0] = 4'hf; dpr_b[F_REG + 2] = 1'b1;
    for (int j = 0; j < 10; j++) begin
      dpr_a[38 + 5*j +: 5] = 5'((ins_a[j] - j * 18 / 10 + 18) % 18);
      dpr_b[38 + 5*j +: 5] = 5'((ins_b[j] - j * 18 / 10 + 18) % 18);
    end
    xb_a = xbar_ctx(lane_src_a);
    xb_b = xbar_ctx(lane_src_b);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // data memories of all DPRs
    for (int d = 0; d < 6; d++)
      for (int b = 0; b < 2; b++)
        for (int a = 0; a < 64; a++) begin
          dm_we = 1; dm_dpr = 3'(d); dm_bank = 2'(b); dm_addr = 6'(a); dm_wdata = 16'($urandom);
          mem[d][b][a] = dm_wdata;
          @(posedge clk); #1;
        end
    dm_we = 0;
    // contexts A (0) and B (1) in every domain
    for (int dm = 0; dm < 3; dm++)
      for (int k = 0; k < WD[dm]; k++) begin
        host_write(dm, k, dom_word(dpr_a, xb_a, dm, k));
        host_write(dm, WD[dm] + k, dom_word(dpr_b, xb_b, dm, k));
      end
    // propagate A in parallel on the three domains
    command_all(CMD_PROPAGATE, 0, 0, 0, cyc);
    for (int d = 0; d < 3; d++) chk(cyc[d] == WD[d] + 2, $sformatf("domain %0d propagation done after %0d", d, cyc[d]));
    command_all(CMD_SWAP, 0, 0, 0, cyc);
    for (int d = 0; d < 3; d++) chk(cyc[d] == 3, $sformatf("domain %0d swap done after %0d", d, cyc[d]));
    // A is live. The swap edge is the second after acceptance and done is
    // seen after the third, so the memories now show address 0.
    for (int t = 2; t < 40; t++) begin
      for (int j = 0; j < 8; j++) begin
        automatic int s = lane_src_a[j];
        chk(lanes[j] == mem[s / 10][s % 10][(t - 2) % 64], $sformatf("context A lane %0d t %0d", j, t));
      end
      @(posedge clk); #1;
    end
    // propagate B while A computes; save what leaves into context 3
    command_all(CMD_PROPAGATE, 1, 1, 3, cyc);
    command_all(CMD_SWAP, 0, 0, 0, cyc);
    for (int t = 2; t < 40; t++) begin
      for (int j = 0; j < 8; j++) begin
        automatic int d = lane_src_b[j] / 10;
        automatic logic [15:0] e = (t < 3) ? 16'hxxxx : mem[d][0][(t - 3) % 64] + mem[d][1][(t - 3) % 64];
        if (t >= 3) chk(lanes[j] == e, $sformatf("context B lane %0d t %0d", j, t));
      end
      @(posedge clk); #1;
    end
    // preempt A: propagate A again (from 0) saving the displaced words into 2
    command_all(CMD_PROPAGATE, 0, 1, 2, cyc);
    for (int dm = 0; dm < 3; dm++)
      for (int k = 0; k < WD[dm]; k++) begin
        host_read(dm, 2 * WD[dm] + k, rd);
        chk(rd == dom_word(dpr_a, xb_a, dm, k), $sformatf("preempted word %0d of domain %0d", k, dm));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
