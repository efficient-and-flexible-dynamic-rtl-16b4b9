// End-to-end testbench of duck_top at its default (full) size: the e-FPGA
// of 8 domains x 620 tiles (3100 six-bit words per domain context) and the
// DART cluster (three domains of 22, 22 and 27 eight-bit words).
//
// e-FPGA sequence: three contexts (P west to east, Q north to south, R
// registered RAM-mode cells) are written into domain 0 through the host
// port and preloaded directly into the memories of domains 1..7 (the host
// port is the same for all domains; the preload saves 65k cycles); P is propagated
// on all eight domains in parallel and exchanged; Q is propagated while P
// computes, saving the displaced words; after the exchange the displaced
// context is checked word for word (preemption); a swap on domain 0 alone
// brings P back there while the other domains keep Q (partial
// reconfiguration); R is then loaded everywhere with ff_init and a RAM
// write into domain 0 only is seen on its west edge two cycles later.
// DART sequence: two contexts are written, propagated on the three domains
// in parallel, swapped in one cycle, checked on the crossbar lanes, and the
// displaced context is saved. Every mechanism is counted and a mechanism
// that never happened counts as a failure.
module tb_duck_top;
  import duck_pkg::*;
  import dart_pkg::*;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int FD = 8, FTR = 40, FTC = 124, FW = 3100, FAW = 14, DAW = 8;

  logic [FD-1:0]       fp_cmd_valid, fp_cmd_ready, fp_cmd_save, fp_cmd_ff_init, fp_done, fp_ram_we, fp_ram_din;
  logic [FD-1:0][1:0]  fp_cmd, fp_cmd_ctx, fp_cmd_save_ctx;
  logic                fp_h_en, fp_h_we;
  logic [2:0]          fp_h_dom;
  logic [FAW-1:0]      fp_h_addr;
  logic [5:0]          fp_h_wdata, fp_h_rdata;
  logic [FTR-1:0]      fp_west_in, fp_east_in, fp_west_out, fp_east_out, fp_carry_in, fp_carry_out;
  logic [FTC-1:0]      fp_north_in, fp_south_in, fp_north_out, fp_south_out;
  logic [2:0]          da_cmd_valid, da_cmd_ready, da_cmd_save, da_done;
  logic [2:0][1:0]     da_cmd;
  logic [2:0][2:0]     da_cmd_ctx, da_cmd_save_ctx;
  logic                da_h_en, da_h_we, da_dm_we;
  logic [1:0]          da_h_dom, da_dm_bank;
  logic [DAW-1:0]      da_h_addr;
  logic [7:0]          da_h_wdata, da_h_rdata;
  logic [2:0]          da_dm_dpr;
  logic [5:0]          da_dm_addr;
  logic [15:0]         da_dm_wdata;
  logic [7:0][15:0]    da_lanes;

  duck_top dut (.*);

  // mechanism counters
  int n_prop, n_swap, n_busy_compute, n_preempt, n_partial, n_ffinit, n_ram, n_da_prop, n_da_swap, n_da_preempt;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [5:0] fword(input logic [29:0] c, input int k);
    return c[29 - 6 * (k % 5) -: 6];
  endfunction

  // tile contexts: {route selects out4..out0, cell bits}
  localparam logic [29:0] CTX_P = {2'd1, 8'd0, 20'd0};                       // route = west
  localparam logic [29:0] CTX_Q = {2'd2, 8'd0, 20'd0};                       // route = north
  localparam logic [29:0] CTX_R = {2'd0, 8'd0, 1'b1, 1'b1, 1'b0, 1'b0, 16'h0}; // RAM, registered, own output

  event preload;
  for (genvar g = 1; g < FD; g++) begin : g_preload
    initial begin
      @(preload);
      for (int k = 0; k < FW; k++) begin
        dut.u_efpga.g_dr[g / 4].g_dc[g % 4].u_mem.mem[k]          = fword(CTX_P, k);
        dut.u_efpga.g_dr[g / 4].g_dc[g % 4].u_mem.mem[FW + k]     = fword(CTX_Q, k);
        dut.u_efpga.g_dr[g / 4].g_dc[g % 4].u_mem.mem[2 * FW + k] = fword(CTX_R, k);
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fp_command(input logic [FD-1:0] mask, input int c, input int ctx, input bit save,
                            input int sctx, input bit init, output int cyc);
    int n;
    while ((fp_cmd_ready & mask) != mask) @(posedge clk);
    #1;
    fp_cmd_valid = mask;
    for (int d = 0; d < FD; d++) begin
      fp_cmd[d] = 2'(c); fp_cmd_ctx[d] = 2'(ctx); fp_cmd_save[d] = save; fp_cmd_save_ctx[d] = 2'(sctx);
      fp_cmd_ff_init[d] = init;
    end
    @(posedge clk); #1;
    fp_cmd_valid = '0; n = 1;
    while ((fp_done & mask) != mask) begin n++; @(posedge clk); #1; end
    cyc = n;
  endtask

  task automatic da_command(input int c, input int ctx, input bit save, input int sctx, output int cyc [3]);
    int n;
    bit fin [3];
    while (da_cmd_ready != 3'b111) @(posedge clk);
    #1;
    da_cmd_valid = 3'b111;
    for (int d = 0; d < 3; d++) begin
      da_cmd[d] = 2'(c); da_cmd_ctx[d] = 3'(ctx); da_cmd_save[d] = save; da_cmd_save_ctx[d] = 3'(sctx);
      fin[d] = 0; cyc[d] = 0;
    end
    @(posedge clk); #1;
    da_cmd_valid = 0; n = 1;
    while (!(fin[0] && fin[1] && fin[2])) begin
      for (int d = 0; d < 3; d++) if (da_done[d] && !fin[d]) begin fin[d] = 1; cyc[d] = n; end
      if (!(fin[0] && fin[1] && fin[2])) begin n++; @(posedge clk); #1; end
    end
  endtask

  // ---------------- DART data ----------------
  localparam int WD [3] = '{22, 22, 27};
  logic [15:0] dmem [6][2][64];
  logic [87:0] dpr_a, dpr_b;
  logic [39:0] xb_a, xb_b;
  int          lane_a [8] = '{0, 10, 20, 30, 40, 50, 51, 0};
  int          lane_b [8] = '{6, 16, 26, 36, 46, 56, 56, 6};

  function automatic logic [7:0] dword(input logic [87:0] dctx, input logic [39:0] xctx, input int dm, input int k);
    if (dm == 2) begin
      if (k < 5) return xctx[39 - 8*k -: 8];
      k -= 5;
    end
    return dctx[87 - 8*(k % 11) -: 8];
  endfunction

  initial begin
    int cyc;
    int dcyc [3];
    logic [FD-1:0] all = '1;
    int ins_a [10] = '{0, 0, 2, 3, 4, 5, 6, 7, 8, 9};
    int ins_b [10] = '{0, 0, 0, 1, 4, 5, 6, 7, 8, 9};
    n_prop = 0; n_swap = 0; n_busy_compute = 0; n_preempt = 0; n_partial = 0; n_ffinit = 0; n_ram = 0;
    n_da_prop = 0; n_da_swap = 0; n_da_preempt = 0;
    fp_cmd_valid = '0; fp_cmd = '0; fp_cmd_ctx = '0; fp_cmd_save = '0; fp_cmd_save_ctx = '0; fp_cmd_ff_init = '0;
    fp_h_en = 0; fp_h_we = 0; fp_h_dom = 0; fp_h_addr = 0; fp_h_wdata = 0; fp_ram_we = '0; fp_ram_din = '0;
    fp_west_in = '0; fp_east_in = '0; fp_north_in = '0; fp_south_in = '0; fp_carry_in = '0;
    da_cmd_valid = 0; da_cmd = '0; da_cmd_ctx = '0; da_cmd_save = 0; da_cmd_save_ctx = '0;
    da_h_en = 0; da_h_we = 0; da_h_dom = 0; da_h_addr = 0; da_h_wdata = 0;
    da_dm_we = 0; da_dm_dpr = 0; da_dm_bank = 0; da_dm_addr = 0; da_dm_wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ================= e-FPGA =================
    // domain 0 is loaded through the host port; domains 1..7 receive the
    // same words by a direct preload of their memories (saves 65k cycles)
    -> preload;
    for (int d = 0; d < 1; d++)
      for (int k = 0; k < FW; k++) begin
        fp_h_en = 1; fp_h_we = 1; fp_h_dom = 3'(d);
        fp_h_addr = FAW'(k);          fp_h_wdata = fword(CTX_P, k); @(posedge clk); #1;
        fp_h_addr = FAW'(FW + k);     fp_h_wdata = fword(CTX_Q, k); @(posedge clk); #1;
        fp_h_addr = FAW'(2 * FW + k); fp_h_wdata = fword(CTX_R, k); @(posedge clk); #1;
      end
    fp_h_en = 0; fp_h_we = 0;

    fp_command(all, 1, 0, 0, 0, 0, cyc);
    chk(cyc == FW + 2, $sformatf("e-FPGA: 8 domains propagate 3100 words in parallel (%0d)", cyc));
    n_prop++;
    fp_command(all, 2, 0, 0, 0, 0, cyc);
    chk(cyc == 22, $sformatf("e-FPGA: exchange done after %0d", cyc));
    n_swap++;
    for (int v = 0; v < 5; v++) begin
      fp_west_in = {$urandom, $urandom}; #1;
      chk(fp_east_out == fp_west_in, "P: west to east through 124 tiles");
      @(posedge clk); #1;
    end
    fork
      begin fp_command(all, 1, 1, 1, 3, 0, cyc); n_prop++; end
      for (int v = 0; v < FW; v++) begin
        fp_west_in = {$urandom, $urandom}; #1;
        chk(fp_east_out == fp_west_in, "P computes during propagation");
        n_busy_compute++;
        @(posedge clk); #1;
      end
    join
    fp_command(all, 2, 0, 0, 0, 0, cyc);
    n_swap++;
    for (int v = 0; v < 5; v++) begin
      fp_north_in = {$urandom, $urandom, $urandom, $urandom}; #1;
      chk(fp_south_out == fp_north_in, "Q: north to south through 40 tiles");
      @(posedge clk); #1;
    end
    // preemption: P is now in the DUCKs; propagate R, saving P into context 3
    fp_command(all, 1, 2, 1, 3, 0, cyc);
    n_prop++;
    for (int d = 0; d < FD; d += 3)
      for (int k = 0; k < FW; k += 7) begin
        fp_h_en = 1; fp_h_we = 0; fp_h_dom = 3'(d); fp_h_addr = FAW'(3 * FW + k);
        @(posedge clk); #1;
        chk(fp_h_rdata == fword(CTX_P, k), "e-FPGA: preempted context saved");
      end
    fp_h_en = 0;
    n_preempt++;
    // partial reconfiguration: domain 0 only takes R from its DUCKs
    fp_west_in = '0; fp_north_in = '0; fp_east_in = '0; fp_south_in = '0;
    fp_command(8'h01, 2, 0, 0, 0, 1, cyc);
    n_partial++;
    n_ffinit++;
    for (int v = 0; v < 5; v++) begin
      fp_north_in[FTC-1:31] = {$urandom, $urandom, $urandom}; #1;
      chk(fp_south_out[FTC-1:31] == fp_north_in[FTC-1:31], "untouched domains keep Q");
      @(posedge clk); #1;
    end
    fp_north_in = '0; #1;
    // domain 0 now holds R (registered RAM cells, LUT all zero, output register set to 0)
    chk(fp_west_out[19:0] == '0, "R: outputs start at the set/reset value 0");
    fp_ram_we = 8'h01; fp_ram_din = 8'h01;
    @(posedge clk); #1;          // write edge: LUT[0] = 1 in every domain-0 cell
    fp_ram_we = '0;
    chk(fp_west_out[19:0] == '0, "R: register still shows the old LUT value");
    @(posedge clk); #1;          // register samples the written LUT bit
    chk(fp_west_out[19:0] == '1, "R: RAM write seen on the west edge");
    n_ram++;

    // ================= DART =================
    dpr_a = '0; dpr_b = '0;
    dpr_a[3:0] = 4'hf; dpr_b[3:0] = 4'hf; dpr_b[F_REG + 2] = 1'b1;
    for (int j = 0; j < 10; j++) begin
      dpr_a[38 + 5*j +: 5] = 5'((ins_a[j] - j * 18 / 10 + 18) % 18);
      dpr_b[38 + 5*j +: 5] = 5'((ins_b[j] - j * 18 / 10 + 18) % 18);
    end
    for (int j = 0; j < 8; j++) begin
      xb_a[5*j +: 5] = 5'((lane_a[j] - j * 60 / 8 + 60) % 60);
      xb_b[5*j +: 5] = 5'((lane_b[j] - j * 60 / 8 + 60) % 60);
    end
    for (int d = 0; d < 6; d++)
      for (int b = 0; b < 2; b++)
        for (int a = 0; a < 64; a++) begin
          da_dm_we = 1; da_dm_dpr = 3'(d); da_dm_bank = 2'(b); da_dm_addr = 6'(a); da_dm_wdata = 16'($urandom);
          dmem[d][b][a] = da_dm_wdata;
          @(posedge clk); #1;
        end
    da_dm_we = 0;
    for (int dm = 0; dm < 3; dm++)
      for (int k = 0; k < WD[dm]; k++) begin
        da_h_en = 1; da_h_we = 1; da_h_dom = 2'(dm);
        da_h_addr = DAW'(k);          da_h_wdata = dword(dpr_a, xb_a, dm, k); @(posedge clk); #1;
        da_h_addr = DAW'(WD[dm] + k); da_h_wdata = dword(dpr_b, xb_b, dm, k); @(posedge clk); #1;
      end
    da_h_en = 0; da_h_we = 0;
    da_command(1, 0, 0, 0, dcyc);
    for (int d = 0; d < 3; d++) chk(dcyc[d] == WD[d] + 2, "DART: domains propagate in parallel");
    n_da_prop++;
    da_command(2, 0, 0, 0, dcyc);
    n_da_swap++;
    for (int t = 2; t < 20; t++) begin
      for (int j = 0; j < 8; j++)
        chk(da_lanes[j] == dmem[lane_a[j] / 10][lane_a[j] % 10][(t - 2) % 64], "DART context A on the lanes");
      @(posedge clk); #1;
    end
    da_command(1, 1, 1, 3, dcyc);
    n_da_prop++;
    da_command(2, 0, 0, 0, dcyc);
    n_da_swap++;
    for (int t = 3; t < 20; t++) begin
      @(posedge clk); #1;
      for (int j = 0; j < 8; j++) begin
        automatic int d = lane_b[j] / 10;
        chk(da_lanes[j] == dmem[d][0][(t - 3) % 64] + dmem[d][1][(t - 3) % 64], "DART context B on the lanes");
      end
    end
    da_command(1, 0, 1, 2, dcyc);
    for (int dm = 0; dm < 3; dm++)
      for (int k = 0; k < WD[dm]; k++) begin
        da_h_en = 1; da_h_we = 0; da_h_dom = 2'(dm); da_h_addr = DAW'(2 * WD[dm] + k);
        @(posedge clk); #1;
        chk(da_h_rdata == dword(dpr_a, xb_a, dm, k), "DART: preempted context saved");
      end
    da_h_en = 0;
    n_da_preempt++;

    $display("mechanisms: propagate=%0d exchange=%0d compute-during-propagation=%0d preempt=%0d partial=%0d ff_init=%0d ram=%0d dart-propagate=%0d dart-swap=%0d dart-preempt=%0d",
             n_prop, n_swap, n_busy_compute, n_preempt, n_partial, n_ffinit, n_ram, n_da_prop, n_da_swap, n_da_preempt);
    if (n_prop == 0 || n_swap == 0 || n_busy_compute == 0 || n_preempt == 0 || n_partial == 0 || n_ffinit == 0 ||
        n_ram == 0 || n_da_prop == 0 || n_da_swap == 0 || n_da_preempt == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
