// Self-checking testbench of dyribox.
// Two boxes are checked: the e-FPGA tile size (5 in, 5 out, 4 reachable,
// 1 bit) and a box with 7 inputs, 4 outputs of 8 bits and 5 reachable
// inputs, where select values 5..7 must give zero. Random DUCK contexts are
// swapped in; the test checks that the box only changes on swap_en, that
// the old configuration comes back on cfg_q, and that every output equals
// the input the reference rule (input (floor(j*N/M)+s) mod N) selects.
module tb_dyribox;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  // box A: defaults
  logic        swa;
  logic [9:0]  dqa, cqa;
  logic [4:0][0:0] ina, outa;
  dyribox dut_a (.clk, .rst_n, .swap_en(swa), .duck_q(dqa), .cfg_q(cqa), .in_data(ina), .out_data(outa));

  // box B: 7 x 4, P = 5, 8 bits, 3 select bits
  logic        swb;
  logic [11:0] dqb, cqb;
  logic [6:0][7:0] inb;
  logic [3:0][7:0] outb;
  dyribox #(.N(7), .M(4), .P(5), .B(8)) dut_b (.clk, .rst_n, .swap_en(swb), .duck_q(dqb), .cfg_q(cqb), .in_data(inb), .out_data(outb));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0]  cfga_model, olda;
    logic [11:0] cfgb_model, oldb;
    swa = 0; swb = 0; dqa = '0; dqb = '0; ina = '0; inb = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    cfga_model = '0; cfgb_model = '0;
    for (int it = 0; it < 300; it++) begin
      // new context in the DUCK; swap on two iterations out of three
      dqa = 10'($urandom); dqb = 12'($urandom);
      swa = (it % 3 != 0); swb = (it % 3 != 1);
      olda = cfga_model; oldb = cfgb_model;
      @(posedge clk); #1;
      if (swa) cfga_model = dqa;
      if (swb) cfgb_model = dqb;
      swa = 0; swb = 0;
      chk(cqa == cfga_model, "box A configuration register");
      chk(cqb == cfgb_model, "box B configuration register");
      for (int v = 0; v < 4; v++) begin
        ina = 5'($urandom);
        for (int k = 0; k < 7; k++) inb[k] = 8'($urandom);
        #1;
        for (int j = 0; j < 5; j++) begin
          automatic int s = cfga_model[j*2 +: 2];
          chk(outa[j] == ina[(j * 5 / 5 + s) % 5], $sformatf("box A output %0d sel %0d", j, s));
        end
        for (int j = 0; j < 4; j++) begin
          automatic int s = cfgb_model[j*3 +: 3];
          automatic logic [7:0] exp = (s < 5) ? inb[(j * 7 / 4 + s) % 7] : 8'h00;
          chk(outb[j] == exp, $sformatf("box B output %0d sel %0d", j, s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
