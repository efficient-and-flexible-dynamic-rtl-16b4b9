// Self-checking testbench of efpga_tile (logic cell + DyRIBox + DUCK).
// Random 30-bit tile contexts are shifted in as five 6-bit words and
// exchanged; the exchange must take 20 cycles. The tile is then driven with
// random neighbour and carry inputs and compared with a reference model of
// the routing rule (output j takes input (j+s) mod 5), the LUT, the carry
// and the output register. Contexts whose LUT inputs select the cell's own
// output use the registered output, so the reference never meets a
// combinational loop. After each exchange the previous context must come
// back out of the configuration path (preemption).
module tb_efpga_tile;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       shift_en, conf_en, busy, ff_init, ram_we, ram_din, route_out, carry_in, carry_out;
  logic [5:0] scan_in, scan_out;
  logic [3:0] nbr_in;

  efpga_tile dut (.clk, .rst_n, .shift_en, .scan_in, .scan_out, .conf_en, .busy, .ff_init,
                  .ram_we, .ram_din, .nbr_in, .route_out, .carry_in, .carry_out);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference: returns {route_out, carry_out, lut_out}
  function automatic logic [2:0] ref_tile(input logic [29:0] c, input logic [3:0] nb,
                                          input logic ci, input logic ff);
    logic [4:0] din;
    logic [4:0] dout;
    logic [3:0] ii;
    logic       a0, lut, cell_out;
    // the cell output only matters through input 4; with registered output it is ff
    cell_out = c[18] ? ff : 1'b0;
    din = {cell_out, nb};
    for (int j = 0; j < 5; j++) dout[j] = din[(j + int'(c[20 + 2*j +: 2])) % 5];
    ii  = dout[3:0];
    a0  = c[16] ? ci : ii[0];
    lut = c[{1'b0, ii[3:1], a0}];
    if (!c[18]) begin
      // combinational output: recompute route output with the LUT value
      din[4] = lut;
      dout[4] = din[(4 + int'(c[28 +: 2])) % 5];
    end
    return {dout[4], (ii[1] & ii[2]) | (a0 & (ii[1] ^ ii[2])), lut};
  endfunction

  function automatic bit self_loop(input logic [29:0] c);
    for (int j = 0; j < 4; j++) if ((j + int'(c[20 + 2*j +: 2])) % 5 == 4) return 1;
    return 0;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [29:0] ctx, live, prev;
    logic        ff;
    int          n;
    shift_en = 0; conf_en = 0; scan_in = '0; ff_init = 0; ram_we = 0; ram_din = 0;
    nbr_in = '0; carry_in = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; live = '0; prev = '0; ff = 0;
    for (int it = 0; it < 80; it++) begin
      ctx = 30'({$urandom, $urandom});
      ctx[19] = 1'b0;                         // no RAM writes here
      if (self_loop(ctx)) ctx[18] = 1'b1;     // break loops through the register
      // propagate: five words, first word ends on top
      for (int w = 0; w < 5; w++) begin
        scan_in = ctx[29 - 6*w -: 6]; shift_en = 1;
        #1 chk(scan_out == prev[29 - 6*w -: 6], "previous context leaves on scan_out");
        @(posedge clk); #1;
      end
      shift_en = 0;
      // exchange
      conf_en = 1;
      @(posedge clk); #1;
      conf_en = 0; n = 1;
      while (busy) begin n++; @(posedge clk); #1; end
      chk(n == 20, $sformatf("exchange takes %0d cycles", n));
      prev = live; live = ctx;
      ff_init = 1;
      @(posedge clk); #1;
      ff_init = 0; ff = live[17];
      for (int v = 0; v < 30; v++) begin
        logic [2:0] r;
        nbr_in = 4'($urandom); carry_in = 1'($urandom);
        #1;
        r = ref_tile(live, nbr_in, carry_in, ff);
        chk(route_out == r[2], "route output");
        chk(carry_out == r[1], "carry output");
        @(posedge clk); #1;
        ff = r[0];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
