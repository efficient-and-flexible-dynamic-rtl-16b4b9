// Configuration controller of one reconfiguration domain.
//
// It accepts one command at a time (cmd_valid while cmd_ready):
//  * CMD_PROPAGATE: streams context cmd_ctx from the configuration memory
//    into the domain's configuration path, one W-bit word per cycle. The
//    words pushed out at the far end (the context the DUCKs held, normally
//    the one swapped out by the last exchange) are written to context
//    cmd_save_ctx when cmd_save is set: propagation of the next context and
//    preemption of the previous one share the same WORDS shifts. The first
//    memory read costs one more cycle, and done rises WORDS + 2 cycles after
//    the command was accepted.
//  * CMD_SWAP: raises conf_en for one cycle and waits while the fabric is
//    busy (the logic cells take their context serially), then, if
//    cmd_ff_init is set, pulses ff_init so that every output register takes
//    its configured set/reset value. With the e-FPGA tiles the exchange
//    takes 20 cycles and done rises 22 cycles after acceptance; with
//    fabric_busy tied low (one-cycle exchange, DART) done rises after 3.
// done pulses for one cycle when a command ends. The computing path keeps
// running during a propagation; only the exchange touches it.
//
// Propagate-while-computing and the one-step exchange are published; the
// command set, the shared propagate/preempt pass and all timing above are
// this design's choices.
module config_ctrl
  import duck_pkg::*;
#(
  parameter int unsigned W        = CFG_W,
  parameter int unsigned WORDS    = 3100,
  parameter int unsigned CONTEXTS = 4,
  localparam int unsigned AW = $clog2(CONTEXTS * WORDS),
  localparam int unsigned CXW = clog2_min1(CONTEXTS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // command interface
  input  logic           cmd_valid,
  output logic           cmd_ready,
  input  cfg_cmd_e       cmd,
  input  logic [CXW-1:0] cmd_ctx,
  input  logic           cmd_save,
  input  logic [CXW-1:0] cmd_save_ctx,
  input  logic           cmd_ff_init,
  output logic           done,
  // configuration memory, controller port
  output logic [AW-1:0]  mem_raddr,
  input  logic [W-1:0]   mem_rdata,
  output logic           mem_we,
  output logic [AW-1:0]  mem_waddr,
  output logic [W-1:0]   mem_wdata,
  // domain configuration path
  output logic           shift_en,
  output logic [W-1:0]   scan_in,
  input  logic [W-1:0]   scan_out,
  output logic           conf_en,
  output logic           ff_init,
  input  logic           fabric_busy
);

  typedef enum logic [2:0] {S_IDLE, S_PROP, S_SWAP, S_SWAP_WAIT} state_e;

  state_e          state;
  logic [AW-1:0]   rbase, wbase;
  logic [AW:0]     idx;        // number of words already requested
  logic            save, init;

  assign cmd_ready = (state == S_IDLE);
  assign scan_in   = mem_rdata;
  assign mem_wdata = scan_out;

  always_comb begin
    shift_en  = 1'b0;
    conf_en   = 1'b0;
    mem_we    = 1'b0;
    mem_raddr = rbase + AW'(idx);
    mem_waddr = wbase + AW'(idx - 1'b1);
    unique case (state)
      S_PROP: begin
        shift_en = (idx != '0);
        mem_we   = save && (idx != '0);
      end
      S_SWAP:  conf_en = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      idx     <= '0;
      rbase   <= '0;
      wbase   <= '0;
      save    <= 1'b0;
      init    <= 1'b0;
      done    <= 1'b0;
      ff_init <= 1'b0;
    end else begin
      done    <= 1'b0;
      ff_init <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          rbase <= AW'(cmd_ctx) * AW'(WORDS);
          wbase <= AW'(cmd_save_ctx) * AW'(WORDS);
          save  <= cmd_save;
          init  <= cmd_ff_init;
          idx   <= '0;
          if (cmd == CMD_PROPAGATE)  state <= S_PROP;
          else if (cmd == CMD_SWAP)  state <= S_SWAP;
        end
        S_PROP: begin
          if (idx == (AW+1)'(WORDS)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_SWAP: state <= S_SWAP_WAIT;
        S_SWAP_WAIT: if (!fabric_busy) begin
          state   <= S_IDLE;
          done    <= 1'b1;
          ff_init <= init;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_cmd_known: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_valid && cmd_ready) |-> (cmd inside {CMD_NOP, CMD_PROPAGATE, CMD_SWAP}));
  a_ctx_range: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_valid && cmd_ready) |-> (32'(cmd_ctx) < CONTEXTS && 32'(cmd_save_ctx) < CONTEXTS));

endmodule
