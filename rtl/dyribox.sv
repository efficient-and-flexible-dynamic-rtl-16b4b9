// DyRIBox: Dynamically Reconfigurable Interconnection Box.
//
// N input ports and M output ports, each B bits wide. Every output has a
// PW-bit configuration register (PW = ceil(log2 P)) that picks one of the P
// inputs the output can reach, so the box needs M*PW configuration bits; one
// input may feed several outputs. The configuration registers are not on any
// scan path: they are loaded only from the DUCK shadow registers (duck_q)
// when swap_en is high, and cfg_q gives their old value back to the DUCK in
// the same cycle, which is the exchange of the published scheme. Because the
// switching path never passes through the configuration path, the DUCK adds
// nothing to the data path delay.
//
// Which P inputs an output reaches is not published; here output j reaches
// inputs (floor(j*N/M) + s) mod N for select value s = 0..P-1, so the
// windows of the outputs are spread evenly over the inputs, and a select
// value of P or more drives zero. The output mux is combinational; the
// configuration registers reset to zero (each output then takes input
// floor(j*N/M)).
// When boxes of neighbouring tiles feed each other, as in the e-FPGA mesh,
// the lint tool reports the output mux as part of a circular combinational
// path (UNOPTFLAT). That path exists in the hardware: routing is
// combinational, and only the configuration decides whether a loop is
// actually closed, as in any island-style FPGA. It is therefore left as is.
module dyribox
  import duck_pkg::*;
#(
  parameter int unsigned N  = 5,   // inputs (tile box of the e-FPGA)
  parameter int unsigned M  = 5,   // outputs
  parameter int unsigned P  = 4,   // inputs reachable from one output
  parameter int unsigned B  = 1,   // bits per port
  localparam int unsigned PW = clog2_min1(P)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    swap_en,
  input  logic [M*PW-1:0]         duck_q,   // next configuration, from the DUCK
  output logic [M*PW-1:0]         cfg_q,    // live configuration, back to the DUCK
  input  logic [N-1:0][B-1:0]     in_data,
  output logic [M-1:0][B-1:0]     out_data
);

  initial begin
    assert (P <= N) else $error("dyribox: P must not exceed N");
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       cfg_q <= '0;
    else if (swap_en) cfg_q <= duck_q;
  end

  always_comb begin
    for (int unsigned j = 0; j < M; j++) begin
      automatic logic [PW-1:0] sel = cfg_q[j*PW +: PW];
      out_data[j] = '0;
      if (32'(sel) < P) out_data[j] = in_data[((j * N) / M + 32'(sel)) % N];
    end
  end

endmodule
