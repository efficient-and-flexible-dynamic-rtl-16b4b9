// Self-checking testbench of duck_reg (88 bits on an 8-bit path, the DART
// DPR size). It shifts random contexts through the scan path and checks
// scan_out word by word against a reference shift register, checks that a
// full pass of 11 words delivers the previous contents in order, and checks
// the one-cycle swap in both directions.
module tb_duck_reg;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int NB = 88, W = 8, NW = NB / W;
  logic          shift_en, swap_en;
  logic [W-1:0]  scan_in, scan_out;
  logic [NB-1:0] swap_d, q, model;

  duck_reg #(.NBITS(NB), .W(W)) dut (.clk, .rst_n, .shift_en, .scan_in, .scan_out, .swap_en, .swap_d, .q);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] words [NW];
    shift_en = 0; swap_en = 0; scan_in = '0; swap_d = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; model = '0;
    @(posedge clk); #1;
    chk(q == '0, "reset value");
    for (int ctx = 0; ctx < 20; ctx++) begin
      // shift in a context; words that come out must be the previous one
      for (int w = 0; w < NW; w++) begin
        words[w] = W'($urandom);
        scan_in = words[w]; shift_en = 1;
        #1 chk(scan_out == model[NB-1 -: W], "scan_out before shift");
        @(posedge clk); #1;
        model = {model[NB-W-1:0], words[w]};
      end
      shift_en = 0;
      chk(q == model, "context after shifting");
      // first word shifted in must sit at the top
      chk(q[NB-1 -: W] == words[0], "word order");
      // swap: DUCK takes swap_d
      swap_d = {$urandom, $urandom, $urandom};
      swap_en = 1;
      @(posedge clk); #1;
      swap_en = 0;
      model = swap_d;
      chk(q == model, "swap loads swap_d");
      // hold when idle
      @(posedge clk); #1;
      chk(q == model, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
