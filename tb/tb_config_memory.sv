// Self-checking testbench of config_memory (6-bit words, 3100 words per
// context, 4 contexts). The host port fills the memory with a pattern and
// reads it back with one cycle of latency; the controller port reads with
// one cycle of latency and writes; a simultaneous write to one address by
// both ports must leave the controller's data.
module tb_config_memory;
  logic clk = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int W = 6, WORDS = 3100, CTX = 4, N = WORDS * CTX, AW = $clog2(N);
  logic          h_en, h_we, c_we;
  logic [AW-1:0] h_addr, c_raddr, c_waddr;
  logic [W-1:0]  h_wdata, h_rdata, c_rdata, c_wdata;

  config_memory #(.W(W), .WORDS(WORDS), .CONTEXTS(CTX)) dut (.clk, .h_en, .h_we, .h_addr, .h_wdata,
    .h_rdata, .c_raddr, .c_rdata, .c_we, .c_waddr, .c_wdata);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [W-1:0] pat(input int a, input int salt);
    return W'((a * 7 + salt * 13 + (a >> 5)) ^ salt);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h_en = 0; h_we = 0; c_we = 0; h_addr = '0; c_raddr = '0; c_waddr = '0; h_wdata = '0; c_wdata = '0;
    @(posedge clk); #1;
    for (int a = 0; a < N; a++) begin
      h_en = 1; h_we = 1; h_addr = AW'(a); h_wdata = pat(a, 1);
      @(posedge clk); #1;
    end
    h_we = 0;
    // read back on both ports at once, staggered addresses
    for (int a = 0; a < N; a += 3) begin
      h_en = 1; h_addr = AW'(a); c_raddr = AW'(N - 1 - a);
      @(posedge clk); #1;
      chk(h_rdata == pat(a, 1), "host read");
      chk(c_rdata == pat(N - 1 - a, 1), "controller read");
    end
    // controller writes a context region, host reads it
    for (int a = WORDS; a < 2 * WORDS; a++) begin
      c_we = 1; c_waddr = AW'(a); c_wdata = pat(a, 5); h_en = 0;
      @(posedge clk); #1;
    end
    c_we = 0;
    for (int a = WORDS - 2; a < 2 * WORDS + 2; a++) begin
      h_en = 1; h_addr = AW'(a);
      @(posedge clk); #1;
      chk(h_rdata == ((a >= WORDS && a < 2 * WORDS) ? pat(a, 5) : pat(a, 1)), "region written by controller");
    end
    // collision: controller wins
    h_en = 1; h_we = 1; h_addr = AW'(17); h_wdata = 6'h2a;
    c_we = 1; c_waddr = AW'(17); c_wdata = 6'h15;
    @(posedge clk); #1;
    h_we = 0; c_we = 0;
    @(posedge clk); #1;
    chk(h_rdata == 6'h15, "controller write wins a collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
