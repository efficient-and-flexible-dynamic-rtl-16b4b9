// Self-checking testbench of config_ctrl (reduced to 12 words per context,
// 4 contexts). The controller drives a reference memory with one cycle of
// read latency and a reference configuration path of 12 words whose
// exchange keeps busy high for 19 cycles. Checks: a propagation shifts
// WORDS times, ends with done WORDS+2 cycles after acceptance and shifts the context's words in address order; the
// words displaced from the path are written to the save context in order
// (and nothing is written when saving is off); a swap raises conf_en once,
// ends with done 22 cycles after acceptance (20-cycle exchange), and pulses ff_init only when requested;
// cmd_ready is low while a command runs.
module tb_config_ctrl;
  import duck_pkg::*;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int W = 6, WORDS = 12, CTX = 4, AW = $clog2(WORDS * CTX);
  logic          cmd_valid, cmd_ready, cmd_save, cmd_ff_init, done;
  cfg_cmd_e      cmd;
  logic [1:0]    cmd_ctx, cmd_save_ctx;
  logic [AW-1:0] mem_raddr, mem_waddr;
  logic [W-1:0]  mem_rdata, mem_wdata, scan_in, scan_out;
  logic          mem_we, shift_en, conf_en, ff_init, fabric_busy;

  config_ctrl #(.W(W), .WORDS(WORDS), .CONTEXTS(CTX)) dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd,
    .cmd_ctx, .cmd_save, .cmd_save_ctx, .cmd_ff_init, .done, .mem_raddr, .mem_rdata, .mem_we,
    .mem_waddr, .mem_wdata, .shift_en, .scan_in, .scan_out, .conf_en, .ff_init, .fabric_busy);

  // reference memory and path
  logic [W-1:0] mem [WORDS * CTX];
  logic [W-1:0] path [WORDS];
  int           busy_cnt, conf_seen, init_seen, shifts;
  always_ff @(posedge clk) begin
    mem_rdata <= mem[mem_raddr];
    if (mem_we) mem[mem_waddr] <= mem_wdata;
    if (shift_en) begin
      shifts <= shifts + 1;
      for (int k = WORDS - 1; k > 0; k--) path[k] <= path[k-1];
      path[0] <= scan_in;
    end
    if (conf_en) begin busy_cnt <= 19; conf_seen <= conf_seen + 1; end
    else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
    if (ff_init) init_seen <= init_seen + 1;
  end
  assign scan_out    = path[WORDS-1];
  assign fabric_busy = (busy_cnt != 0);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic issue(input cfg_cmd_e c, input int ctx, input bit save, input int sctx, input bit init,
                       output int cycles);
    while (!cmd_ready) @(posedge clk);
    #1;
    cmd_valid = 1; cmd = c; cmd_ctx = 2'(ctx); cmd_save = save; cmd_save_ctx = 2'(sctx); cmd_ff_init = init;
    @(posedge clk); #1;
    cmd_valid = 0;
    chk(!cmd_ready, "busy after accepting a command");
    cycles = 1;
    while (!done) begin cycles++; @(posedge clk); #1; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [W-1:0] prev_path [WORDS];
    logic [W-1:0] mem_ref [WORDS * CTX];
    cmd_valid = 0; cmd = CMD_NOP; cmd_ctx = 0; cmd_save = 0; cmd_save_ctx = 0; cmd_ff_init = 0;
    busy_cnt = 0; conf_seen = 0; init_seen = 0; shifts = 0;
    for (int a = 0; a < WORDS * CTX; a++) begin mem[a] = W'($urandom); mem_ref[a] = mem[a]; end
    for (int k = 0; k < WORDS; k++) path[k] = W'($urandom);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 12; it++) begin
      automatic int c  = it % 3;
      automatic int sc = 3;
      automatic bit sv = (it % 2 == 0);
      for (int k = 0; k < WORDS; k++) prev_path[k] = path[k];
      shifts = 0;
      issue(CMD_PROPAGATE, c, sv, sc, 0, cyc);
      chk(cyc == WORDS + 2, $sformatf("propagation done after %0d cycles", cyc));
      chk(shifts == WORDS, $sformatf("%0d shifts per propagation", shifts));
      // path holds the context, first word farthest from the input
      for (int k = 0; k < WORDS; k++)
        chk(path[WORDS - 1 - k] == mem_ref[c * WORDS + k], "context word in the path");
      // displaced words saved in order of leaving
      if (sv) for (int k = 0; k < WORDS; k++) mem_ref[sc * WORDS + k] = prev_path[WORDS - 1 - k];
      for (int a = 0; a < WORDS * CTX; a++) chk(mem[a] == mem_ref[a], "memory after propagation");
      // swap
      begin
        automatic int cs = conf_seen, is = init_seen;
        issue(CMD_SWAP, 0, 0, 0, it[0], cyc);
        chk(cyc == 22, $sformatf("swap done after %0d cycles", cyc));
        @(posedge clk); #1;
        chk(conf_seen == cs + 1, "exactly one conf_en per swap");
        chk(init_seen == is + int'(it[0]), "ff_init only when requested");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
