// Self-checking testbench of dart_fu_addsub: random operands under every
// configuration (4 operations x SIMD on/off), compared with a reference
// written lane by lane with integer arithmetic.
module tb_dart_fu_addsub;
  int checks = 0, failures = 0;
  logic [2:0]  cfg;
  logic [15:0] a, b, y;
  dart_fu_addsub dut (.cfg, .a, .b, .y);

  function automatic logic [15:0] ref_lane(input int op, input int bits, input logic [15:0] x, input logic [15:0] z);
    longint sx, sz, r;
    longint m = (longint'(1) << bits);
    sx = x; sz = z;
    if (sx >= m / 2) sx -= m;      // signed view for the absolute difference
    if (sz >= m / 2) sz -= m;
    case (op)
      0: r = x + z;
      1: r = x - z;
      2: r = (sx >= sz) ? sx - sz : sz - sx;
      default: r = x & z;
    endcase
    return 16'(r & (m - 1));
  endfunction

  initial begin
    for (int it = 0; it < 4000; it++) begin
      logic [15:0] e;
      cfg = 3'(it % 8); a = 16'($urandom); b = 16'($urandom);
      if (it % 50 == 0) b = a;
      #1;
      if (cfg[2]) e = {ref_lane(cfg[1:0], 8, {8'h0, a[15:8]}, {8'h0, b[15:8]})[7:0],
                       ref_lane(cfg[1:0], 8, {8'h0, a[7:0]},  {8'h0, b[7:0]})[7:0]};
      else        e = ref_lane(cfg[1:0], 16, a, b);
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL cfg=%0d a=%h b=%h y=%h expected %h", cfg, a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
