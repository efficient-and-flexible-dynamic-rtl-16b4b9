// Configuration memory of one reconfiguration domain.
//
// CONTEXTS x WORDS words of W bits: one region per context, word a of
// context c at address c*WORDS + a. It is filled and read back by the host
// through port h (one access per cycle, read data one cycle later). The
// domain's configuration controller reads the context it propagates through
// port c (read data one cycle later) and, in the same cycles, writes back
// the words that leave the configuration path, which stores a preempted
// context. When both ports write the same address in one cycle, port c wins.
//
// The published architecture places a static configuration memory beside
// each domain; its organisation, the number of contexts and the port set
// are this design's choices.
module config_memory #(
  parameter int unsigned W        = 6,
  parameter int unsigned WORDS    = 3100,  // 620 tiles x 30 bits / 6
  parameter int unsigned CONTEXTS = 4,
  localparam int unsigned AW = $clog2(CONTEXTS * WORDS)
) (
  input  logic          clk,
  // host port
  input  logic          h_en,
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  logic [W-1:0]  h_wdata,
  output logic [W-1:0]  h_rdata,
  // controller port
  input  logic [AW-1:0] c_raddr,
  output logic [W-1:0]  c_rdata,
  input  logic          c_we,
  input  logic [AW-1:0] c_waddr,
  input  logic [W-1:0]  c_wdata
);

  logic [W-1:0] mem [CONTEXTS*WORDS];

  always_ff @(posedge clk) begin
    if (h_en && h_we) mem[h_addr] <= h_wdata;
    if (c_we)         mem[c_waddr] <= c_wdata;
  end

  always_ff @(posedge clk) begin
    if (h_en) h_rdata <= mem[h_addr];
    c_rdata <= mem[c_raddr];
  end

endmodule
