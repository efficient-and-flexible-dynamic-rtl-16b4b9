// Self-checking testbench of tile_duck.
// The DUCK is connected to a reference 20-bit serial chain standing in for
// the logic-lc_chain configuration and to a 10-bit register standing in for the
// DyRIBox configuration. Random contexts are shifted in over the 6-bit
// path (five words per tile), then exchanged. Checks: scan_out follows a
// reference shift register; after conf_en the DyRIBox side swaps in the
// same cycle; the lc_chain side ends with exactly the shadow context and the
// shadow with the old lc_chain context; busy lasts 19 cycles after conf_en, so
// the exchange takes 20 cycles.
module tb_tile_duck;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic        shift_en, conf_en, busy, drb_swap_en, lc_shift_en, lc_cfg_in, lc_cfg_out;
  logic [5:0]  scan_in, scan_out;
  logic [9:0]  drb_duck_q, drb_cfg_q;
  logic [19:0] lc_chain;          // stand-in for the cell chain
  logic [29:0] model;         // reference shadow bits

  tile_duck dut (.clk, .rst_n, .shift_en, .scan_in, .scan_out, .conf_en, .busy,
                 .drb_swap_en, .drb_duck_q, .drb_cfg_q, .lc_shift_en, .lc_cfg_in, .lc_cfg_out);

  assign lc_cfg_out = lc_chain[0];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lc_chain <= '0; drb_cfg_q <= '0;
    end else begin
      if (lc_shift_en) lc_chain <= {lc_cfg_in, lc_chain[19:1]};
      if (drb_swap_en) drb_cfg_q <= drb_duck_q;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] old_cell;
    logic [9:0]  old_drb;
    int          busy_cycles;
    shift_en = 0; conf_en = 0; scan_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; model = '0;
    for (int it = 0; it < 50; it++) begin
      for (int w = 0; w < 5; w++) begin
        scan_in = 6'($urandom); shift_en = 1;
        #1 chk(scan_out == model[29:24], $sformatf("scan_out it %0d w %0d %h %h", it, w, scan_out, model[29:24]));
        @(posedge clk); #1;
        model = {model[23:0], scan_in};
      end
      shift_en = 0;
      old_cell = lc_chain; old_drb = drb_cfg_q;
      conf_en = 1;
      @(posedge clk); #1;
      conf_en = 0;
      chk(drb_cfg_q == model[29:20], "DyRIBox loads shadow bits in the conf_en cycle");
      busy_cycles = 0;
      while (busy) begin
        busy_cycles++;
        @(posedge clk); #1;
      end
      chk(busy_cycles == 19, $sformatf("exchange length %0d", busy_cycles + 1));
      chk(lc_chain == model[19:0], "lc_chain holds the new context");
      model = {old_drb, old_cell};
      // the shadow now holds the old contexts: shift them out and compare
      for (int w = 0; w < 5; w++) begin
        scan_in = 6'($urandom); shift_en = 1;
        #1 chk(scan_out == model[29:24], "old context leaves on scan_out");
        @(posedge clk); #1;
        model = {model[23:0], scan_in};
      end
      shift_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
