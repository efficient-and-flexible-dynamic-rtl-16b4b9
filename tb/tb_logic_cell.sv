// Self-checking testbench of logic_cell.
// Random 20-bit configurations are shifted in through the configuration
// chain (checking that the old configuration leaves bit 0 first), then the
// cell is exercised with random inputs and compared with a reference model:
// LUT lookup with the carry-in select, the carry function, combinational and
// registered output, the set/reset value loaded by ff_init, and RAM-mode
// writes (which must be ignored when RAM mode is off). A 4-bit ripple adder
// built from four cells checks the carry chain end to end.
module tb_logic_cell;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       sh, cin_b, cout_b, ram_we, ram_din, ff_init, carry_in, carry_out, out;
  logic [3:0] i;
  logic [19:0] model;
  logic        ff_model;

  logic_cell dut (.clk, .rst_n, .cfg_shift_en(sh), .cfg_in(cin_b), .cfg_out(cout_b),
                  .ram_we, .ram_din, .ff_init, .i, .carry_in, .carry_out, .out);

  // 4-bit adder of four cells, configured directly by shifting
  logic        ash, acin;
  logic [3:0]  a_bits, b_bits, sum;
  logic [4:0]  carry;
  logic [3:0]  acout_unused;
  for (genvar k = 0; k < 4; k++) begin : g_add
    logic_cell u (.clk, .rst_n, .cfg_shift_en(ash), .cfg_in(acin), .cfg_out(acout_unused[k]),
                  .ram_we(1'b0), .ram_din(1'b0), .ff_init(1'b0),
                  .i({1'b0, b_bits[k], a_bits[k], 1'b0}), .carry_in(carry[k]),
                  .carry_out(carry[k+1]), .out(sum[k]));
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic ref_a0(input logic [19:0] c, input logic [3:0] ii, input logic ci);
    return c[16] ? ci : ii[0];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] nc;
    sh = 0; cin_b = 0; ram_we = 0; ram_din = 0; ff_init = 0; i = '0; carry_in = 0;
    ash = 0; acin = 0; a_bits = '0; b_bits = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; model = '0; ff_model = 0;
    for (int it = 0; it < 60; it++) begin
      nc = 20'($urandom);
      if (it < 4) nc[19] = 1'b1;  // make sure RAM mode is exercised
      // shift the new configuration in, bit 0 first
      for (int k = 0; k < 20; k++) begin
        sh = 1; cin_b = nc[k];
        #1 chk(cout_b == model[0], "configuration chain output");
        @(posedge clk); #1;
        model = {nc[k], model[19:1]};
        #0 chk(out == ff_model, "output held by the register while the chain shifts");
      end
      sh = 0;
      chk(model == nc, "model sanity");
      // ff_init loads the set/reset value
      ff_init = 1;
      @(posedge clk); #1;
      ff_init = 0; ff_model = nc[17];
      if (nc[18]) chk(out == ff_model, "output register set/reset value");
      for (int v = 0; v < 40; v++) begin
        logic a0, lut, cy;
        i = 4'($urandom); carry_in = 1'($urandom);
        ram_we = (v % 5 == 4); ram_din = 1'($urandom);
        #1;
        a0  = ref_a0(model, i, carry_in);
        lut = model[{1'b0, i[3:1], a0}];
        cy  = (i[1] & i[2]) | (a0 & (i[1] ^ i[2]));
        chk(carry_out == cy, "carry out");
        chk(out == (model[18] ? ff_model : lut), "cell output");
        @(posedge clk); #1;
        ff_model = lut;
        if (ram_we && model[19]) model[{1'b0, i}] = ram_din;
        ram_we = 0;
      end
    end
    // ripple adder: LUT = XOR of i1, i2, a0 (= carry_in); combinational
    begin
      automatic logic [19:0] xcfg = {1'b0, 1'b0, 1'b0, 1'b1, 16'h9696};
      // 4 cells share the shift input: all get the same configuration
      for (int k = 0; k < 20; k++) begin
        ash = 1; acin = xcfg[k];
        @(posedge clk); #1;
      end
      ash = 0;
    end
    for (int v = 0; v < 200; v++) begin
      a_bits = 4'($urandom); b_bits = 4'($urandom); carry[0] = 1'($urandom);
      #1;
      chk({carry[4], sum} == 5'(a_bits) + 5'(b_bits) + 5'(carry[0]), "ripple adder");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
