// Self-checking testbench of efpga_domain, at reduced sizes.
// DUT A is a 3 x 4 domain. Context P routes every tile's west input to its
// route output (east_out must equal west_in); context Q routes north to
// south (south_out must equal north_in). The test loads P, swaps, then
// propagates Q while P keeps computing (P's behaviour is checked on every
// propagation cycle), swaps again, and finally shifts the domain once more
// to check that the words leaving the path are exactly context P
// (preemption of the displaced context).
// DUT B is a 1 x 4 domain configured as a 4-bit ripple adder: LUT = XOR of
// carry, north and south inputs, carry chain west to east; north_out is the
// sum and carry_out the carry.
module tb_efpga_domain;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int R = 3, C = 4, T = R * C, S = 5 * T;

  logic             sh, conf_en, busy;
  logic [5:0]       sin, sout;
  logic [R-1:0]     win, ein, wout, eout, cin, cout;
  logic [C-1:0]     nin, sin_e, nout, sout_e;

  efpga_domain #(.ROWS(R), .COLS(C)) dut_a (
    .clk, .rst_n, .shift_en(sh), .scan_in(sin), .scan_out(sout), .conf_en, .busy,
    .ff_init(1'b0), .ram_we(1'b0), .ram_din(1'b0),
    .west_in(win), .east_in(ein), .north_in(nin), .south_in(sin_e),
    .west_out(wout), .east_out(eout), .north_out(nout), .south_out(sout_e),
    .carry_in(cin), .carry_out(cout));

  logic       sh_b, conf_b, busy_b, cy_in, cy_out, unused_w, unused_e;
  logic [5:0] sin_b, sout_b;
  logic [3:0] a_v, b_v, sum_v, unused_s;
  efpga_domain #(.ROWS(1), .COLS(4)) dut_b (
    .clk, .rst_n, .shift_en(sh_b), .scan_in(sin_b), .scan_out(sout_b), .conf_en(conf_b), .busy(busy_b),
    .ff_init(1'b0), .ram_we(1'b0), .ram_din(1'b0),
    .west_in(1'b0), .east_in(1'b0), .north_in(a_v), .south_in(b_v),
    .west_out(unused_w), .east_out(unused_e), .north_out(sum_v), .south_out(unused_s),
    .carry_in(cy_in), .carry_out(cy_out));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // tile context: route selects (2 bits each, outputs 0..4) and 20 cell bits
  function automatic logic [29:0] tile_ctx(input logic [1:0] s4, input logic [1:0] s3, input logic [1:0] s2,
                                           input logic [1:0] s1, input logic [1:0] s0, input logic [19:0] lc);
    return {s4, s3, s2, s1, s0, lc};
  endfunction

  // word k of the stream for a domain of n tiles, all tiles holding ctx
  function automatic logic [5:0] word_of(input logic [29:0] ctx, input int k);
    return ctx[29 - 6 * (k % 5) -: 6];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic swap_a();
    int n;
    conf_en = 1;
    @(posedge clk); #1;
    conf_en = 0; n = 1;
    while (busy) begin n++; @(posedge clk); #1; end
    chk(n == 20, "domain exchange takes 20 cycles");
  endtask

  initial begin
    logic [29:0] ctx_p, ctx_q;
    sh = 0; conf_en = 0; sin = '0; win = '0; ein = '0; nin = '0; sin_e = '0; cin = '0;
    sh_b = 0; conf_b = 0; sin_b = '0; a_v = '0; b_v = '0; cy_in = 0;
    // P: route output takes west (select 1); Q: route output takes north (select 2)
    ctx_p = tile_ctx(2'd1, 2'd0, 2'd0, 2'd0, 2'd0, 20'h0);
    ctx_q = tile_ctx(2'd2, 2'd0, 2'd0, 2'd0, 2'd0, 20'h0);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // load P
    for (int k = 0; k < S; k++) begin
      sh = 1; sin = word_of(ctx_p, k);
      @(posedge clk); #1;
    end
    sh = 0;
    swap_a();
    for (int v = 0; v < 20; v++) begin
      win = R'($urandom); #1;
      chk(eout == win, "context P: west to east");
    end
    // propagate Q while P computes
    for (int k = 0; k < S; k++) begin
      sh = 1; sin = word_of(ctx_q, k);
      win = R'($urandom); #1;
      chk(eout == win, "context P keeps computing during propagation");
      @(posedge clk); #1;
    end
    sh = 0;
    swap_a();
    for (int v = 0; v < 20; v++) begin
      nin = C'($urandom); #1;
      chk(sout_e == nin, "context Q: north to south");
    end
    // preemption: the displaced context P leaves the path in stream order
    for (int k = 0; k < S; k++) begin
      sh = 1; sin = 6'($urandom);
      #1 chk(sout == word_of(ctx_p, k), $sformatf("preempted word %0d", k));
      @(posedge clk); #1;
    end
    sh = 0;

    // adder on DUT B: i1 = north (select 0), i2 = south (select 1), route = own output
    begin
      logic [29:0] ctx_add;
      int n;
      ctx_add = tile_ctx(2'd0, 2'd0, 2'd1, 2'd0, 2'd0, {1'b0, 1'b0, 1'b0, 1'b1, 16'h9696});
      for (int k = 0; k < 20; k++) begin
        sh_b = 1; sin_b = word_of(ctx_add, k);
        @(posedge clk); #1;
      end
      sh_b = 0; conf_b = 1;
      @(posedge clk); #1;
      conf_b = 0;
      while (busy_b) @(posedge clk);
      #1;
      for (int v = 0; v < 100; v++) begin
        a_v = 4'($urandom); b_v = 4'($urandom); cy_in = 1'($urandom);
        #1 chk({cy_out, sum_v} == 5'(a_v) + 5'(b_v) + 5'(cy_in), "ripple adder across tiles");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
