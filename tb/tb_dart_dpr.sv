// Self-checking testbench of dart_dpr.
// A cycle-level reference model of the DPR (address generators, memories
// with one cycle of read latency, multi-bus select rule, registers, FU
// operations add/sub/multiply/multiply-accumulate) runs beside the DUT and
// the ten DPR sources are compared every cycle. Two contexts are used:
// the first is shifted in (11 words of 8 bits) and swapped; the second is
// shifted in while the first computes, and the swap must change behaviour
// from one cycle to the next (one-cycle reconfiguration); finally the
// first context must come back out of the configuration path.
module tb_dart_dpr;
  import dart_pkg::*;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic              shift_en, conf_en, dm_we;
  logic [7:0]        scan_in, scan_out;
  logic [1:0]        dm_bank;
  logic [5:0]        dm_addr;
  logic [15:0]       dm_wdata;
  logic [7:0][15:0]  cl_in;
  logic [9:0][15:0]  src_out;

  dart_dpr dut (.clk, .rst_n, .shift_en, .scan_in, .scan_out, .conf_en, .dm_we, .dm_bank, .dm_addr,
                .dm_wdata, .cl_in, .src_out);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- reference model ----------------
  logic [15:0] mem [4][64];
  logic [87:0] live;
  logic [5:0]  m_ag [4];
  logic [15:0] m_dq [4];
  logic [15:0] m_r1, m_r2;
  logic [15:0] m_fq [4];
  logic [9:0][15:0] m_src;

  function automatic logic [15:0] fu_ref(input bit is_mul, input logic [10:0] c, input logic [15:0] x,
                                         input logic [15:0] z, input logic [15:0] acc);
    if (!is_mul) begin
      case (c[1:0])
        2'd0: return x + z;
        2'd1: return x - z;
        default: return 16'hxxxx;   // not used by this test
      endcase
    end
    case (c[5:4])
      2'd0: return 16'($signed(x) * $signed(z));
      2'd1: return acc + 16'($signed(x) * $signed(z));
      2'd2: return x + z;
      default: return x - z;
    endcase
  endfunction

  always_comb begin
    for (int k = 0; k < 4; k++) m_src[k] = m_dq[k];
    m_src[4] = m_r1; m_src[5] = m_r2;
    for (int k = 0; k < 4; k++) m_src[6 + k] = m_fq[k];
  end

  always @(posedge clk) begin
    logic [17:0][15:0] bin;
    logic [9:0][15:0]  bout;
    logic [15:0]       fy [4];
    if (!rst_n) begin
      live = '0;
      for (int k = 0; k < 4; k++) begin m_ag[k] = 0; m_dq[k] = mem[k][0]; m_fq[k] = 0; end
      m_r1 = 0; m_r2 = 0;
    end else begin
      bin = {cl_in, m_src};
      for (int j = 0; j < 10; j++) begin
        automatic int s = live[38 + 5*j +: 5];
        bout[j] = (s < 18) ? bin[(j * 18 / 10 + s) % 18] : 16'h0;
      end
      fy[0] = fu_ref(0, 11'(live[10 +: 3]), bout[2], bout[3], m_fq[0]);
      fy[1] = fu_ref(1, live[13 +: 11],     bout[4], bout[5], m_fq[1]);
      fy[2] = fu_ref(0, 11'(live[24 +: 3]), bout[6], bout[7], m_fq[2]);
      fy[3] = fu_ref(1, live[27 +: 11],     bout[8], bout[9], m_fq[3]);
      for (int k = 0; k < 4; k++) m_dq[k] = mem[k][m_ag[k]];
      if (live[4]) m_r1 = bout[0];
      if (live[5]) m_r2 = bout[1];
      for (int k = 0; k < 4; k++) if (live[6 + k]) m_fq[k] = fy[k];
      for (int k = 0; k < 4; k++) m_ag[k] = conf_en ? 6'd0 : (live[k] ? m_ag[k] + 1 : m_ag[k]);
      if (conf_en) live = next_ctx;
    end
  end

  logic [87:0] next_ctx;

  // bus select so that output j takes input i
  function automatic logic [4:0] sel(input int j, input int i);
    return 5'((i - j * 18 / 10 + 18) % 18);
  endfunction

  function automatic logic [87:0] make_ctx(input logic [3:0] ag, input logic [5:0] regs,
                                           input logic [2:0] f1, input logic [10:0] f2,
                                           input logic [2:0] f3, input logic [10:0] f4,
                                           input int ins [10]);
    logic [87:0] c;
    c[3:0] = ag; c[9:4] = regs; c[12:10] = f1; c[23:13] = f2; c[26:24] = f3; c[37:27] = f4;
    for (int j = 0; j < 10; j++) c[38 + 5*j +: 5] = sel(j, ins[j]);
    return c;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare every cycle after reset
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < 10; k++) chk(src_out[k] == m_src[k], $sformatf("source %0d at %0t", k, $time));
  end

  always @(posedge clk) cl_in <= {$urandom, $urandom, $urandom, $urandom};

  task automatic shift_ctx(input logic [87:0] c, input logic [87:0] expect_out, input bit check_out);
    for (int w = 0; w < 11; w++) begin
      shift_en = 1; scan_in = c[87 - 8*w -: 8];
      #1 if (check_out) chk(scan_out == expect_out[87 - 8*w -: 8], "preempted context word");
      @(posedge clk); #1;
    end
    shift_en = 0;
  endtask

  initial begin
    logic [87:0] c1, c2;
    int ins1 [10] = '{10, 6, 2, 3, 0, 1, 4, 5, 7, 11};
    int ins2 [10] = '{12, 13, 0, 9, 2, 3, 6, 4, 1, 0};
    shift_en = 0; conf_en = 0; scan_in = 0; dm_we = 0; dm_bank = 0; dm_addr = 0; dm_wdata = 0;
    next_ctx = '0;
    // FU1 add, FU2 multiply, FU3 subtract, FU4 multiply-accumulate
    c1 = make_ctx(4'b1111, 6'b111111, 3'd0, 11'h000, 3'd1, 11'h010, ins1);
    // FU1 subtract, FU2 multiply-accumulate, FU3 add, FU4 add; AG2 holds, reg2 held
    c2 = make_ctx(4'b1011, 6'b111101, 3'd1, 11'h010, 3'd0, 11'h020, ins2);
    repeat (3) @(posedge clk);
    // fill the data memories (memory fill does not depend on reset)
    for (int k = 0; k < 4; k++)
      for (int a = 0; a < 64; a++) begin
        dm_we = 1; dm_bank = 2'(k); dm_addr = 6'(a); dm_wdata = 16'($urandom);
        mem[k][a] = dm_wdata;
        @(posedge clk); #1;
      end
    dm_we = 0;
    #1 rst_n = 1;
    shift_ctx(c1, '0, 0);
    next_ctx = c1; conf_en = 1;
    @(posedge clk); #1;
    conf_en = 0;
    repeat (30) @(posedge clk);
    #1;
    shift_ctx(c2, '0, 0);            // propagate while computing
    repeat (5) @(posedge clk);
    #1;
    next_ctx = c2; conf_en = 1;
    @(posedge clk); #1;
    conf_en = 0;
    repeat (30) @(posedge clk);
    #1;
    shift_ctx(c2, c1, 1);            // old context leaves the path
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
