// Self-checking testbench of dart_fu_mul: random operands, accumulator and
// random 11-bit configurations (input shift, operation, SIMD, output shift),
// compared with a reference computed with signed 64-bit integers.
module tb_dart_fu_mul;
  int checks = 0, failures = 0;
  logic [10:0] cfg;
  logic [15:0] a, b, acc, y;
  dart_fu_mul dut (.cfg, .a, .b, .acc_in(acc), .y);

  function automatic longint sext(input longint v, input int bits);
    longint m = longint'(1) << bits;
    v = v & (m - 1);
    return (v >= m / 2) ? v - m : v;
  endfunction

  function automatic longint ref_lane(input int op, input int si, input int so, input int bits,
                                      input longint x, input longint z, input longint ac);
    longint xs, p, m;
    m  = longint'(1) << bits;
    xs = sext(x, bits) >>> si;
    case (op)
      0, 1: p = xs * sext(z, bits);
      2:    p = xs + sext(z, bits);
      default: p = xs - sext(z, bits);
    endcase
    p = sext(p, 2 * bits) >>> so;
    if (op == 1) p = ac + p;
    return p & (m - 1);
  endfunction

  initial begin
    for (int it = 0; it < 6000; it++) begin
      logic [15:0] e;
      int si, so, op;
      cfg = 11'($urandom); a = 16'($urandom); b = 16'($urandom); acc = 16'($urandom);
      if (it % 4 == 0) cfg[10:7] = 0;
      if (it % 5 == 0) cfg[3:0] = 0;
      si = cfg[3:0]; op = cfg[5:4]; so = cfg[10:7];
      #1;
      if (cfg[6]) e = {8'(ref_lane(op, si, so, 8, a[15:8], b[15:8], acc[15:8])),
                       8'(ref_lane(op, si, so, 8, a[7:0],  b[7:0],  acc[7:0]))};
      else        e = 16'(ref_lane(op, si, so, 16, a, b, acc));
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL cfg=%h a=%h b=%h acc=%h y=%h expected %h", cfg, a, b, acc, y, e);
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
