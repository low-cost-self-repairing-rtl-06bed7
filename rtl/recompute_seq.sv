// recompute_seq: pass sequencer shared by the three self-repairing adders.
//
// Every addition first runs with the true operands. If any error indicator
// fires, the same operands are applied again, complemented, so that a line
// stuck at the value it should have had in the first pass now carries the
// right value: a single stuck-at or multi-cycle transient fault is masked in
// the second pass. The document's correction algorithms all begin with this
// step; how it is spread over clock cycles is this design's choice:
//
//   IDLE   in_ready = 1; on in_valid the datapath registers the operands
//          (load = 1).
//   PASS1  the adder sees the true operands (inv = 0); the datapath stores
//          the result and indicators (cap1 = 1). No error: go to DONE.
//   PASS2  the adder sees the complemented operands (inv = 1); the datapath
//          stores the second result and indicators (cap2 = 1).
//   DONE   out_valid = 1 for one cycle; the decision logic's outputs are
//          valid. Back to IDLE.
//
// Timing: an operand pair accepted at clock edge k (load high before it)
// gives out_valid in the cycle after edge k+1 when no error is seen, and in
// the cycle after edge k+2 when the second pass runs: 2 or 3 cycles from
// offer to result. One addition is in flight at a time. Synchronous active-low
// reset to IDLE.
module recompute_seq (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic err,          // any error indicator of the pass now running
  output logic load,         // register the operands
  output logic inv,          // 1: complemented pass
  output logic cap1,         // store first-pass result
  output logic cap2,         // store second-pass result
  output logic out_valid
);

  typedef enum logic [1:0] {S_IDLE, S_PASS1, S_PASS2, S_DONE} state_e;
  state_e state, state_nx;

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;
  end

  // Next state: the only place where in_valid and err are looked at.
  always_comb begin
    state_nx = state;
    unique case (state)
      S_IDLE:  if (in_valid) state_nx = S_PASS1;
      S_PASS1: state_nx = err ? S_PASS2 : S_DONE;
      S_PASS2: state_nx = S_DONE;
      S_DONE:  state_nx = S_IDLE;
      default: state_nx = S_IDLE;
    endcase
  end

  // Strobes decoded from the state alone (load also needs in_valid), so the
  // datapath's error output never loops back into inv.
  assign in_ready  = (state == S_IDLE);
  assign load      = (state == S_IDLE) && in_valid;
  assign inv       = (state == S_PASS2);
  assign cap1      = (state == S_PASS1);
  assign cap2      = (state == S_PASS2);
  assign out_valid = (state == S_DONE);

  // A result is announced only after at least the first pass was stored.
  a_done_after_pass: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(cap1) || $past(cap2));

endmodule
