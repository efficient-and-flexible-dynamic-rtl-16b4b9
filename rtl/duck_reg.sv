// DUCK register bank with a W-bit scan path and a one-cycle swap port.
//
// The bank is NBITS shadow registers of a resource's configuration. With
// shift_en high the bank is one link of a configuration scan path: every
// cycle it takes W bits on scan_in at the low end and presents its top W bits
// on scan_out, so a chain of banks forms one long shift register. With
// swap_en high the bank loads swap_d (the resource's live configuration)
// while the resource loads q: DUCK and configuration registers exchange their
// contents in one clock cycle, so the previous context can later be shifted
// out for preemption.
//
// Timing: both operations take effect on the rising clock edge; swap_en has
// priority and must not be raised together with shift_en (asserted).
// The shadow-register principle, the scan path and the one-cycle swap are the
// published scheme; the word order on the path (first word in ends up at the
// top) and the synchronous active-low reset to zero are choices of this
// design.
module duck_reg #(
  parameter int unsigned NBITS = 88,  // one DART DPR: 38 unit bits + 50 multi-bus bits
  parameter int unsigned W     = 8    // DART configuration path width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic [W-1:0]     scan_in,
  output logic [W-1:0]     scan_out,
  input  logic             swap_en,
  input  logic [NBITS-1:0] swap_d,
  output logic [NBITS-1:0] q
);

  initial begin
    assert (NBITS % W == 0) else $error("duck_reg: NBITS must be a multiple of W");
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        q <= '0;
    else if (swap_en)  q <= swap_d;
    else if (shift_en) q <= {q[NBITS-W-1:0], scan_in};
  end

  assign scan_out = q[NBITS-1 -: W];

  a_no_shift_during_swap: assert property (@(posedge clk) disable iff (!rst_n) !(swap_en && shift_en));

endmodule
