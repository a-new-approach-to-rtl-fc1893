// dec_ctrl_fsm: the DEC's "Control FSM".
//
// Three states:
//   ST_IDLE     no critical task (CT) running; policy Shared (2'b01).
//   ST_SHARED   CT running together with the less-critical cores; policy Shared.
//               The counter counts down the shared-mode budget.
//   ST_ISOLATED CT running alone; policy Isolated (2'b00), so the bus controller
//               serves only the critical core.
// Transitions:
//   IDLE     -> SHARED   on ct_start: the counter is loaded with Delta T and
//                        force_crit asks the bus controller to hand the very next
//                        TDMA slice to the critical core.
//   SHARED   -> ISOLATED when the counter is zero (budget used up).
//   SHARED   -> IDLE     on last_done (CT finished before the budget ran out).
//   ISOLATED -> IDLE     on last_done (CT finished; back to Shared mode).
// In ST_SHARED the counter is decremented in every cycle the critical core's
// last-stage instruction is not annulled (exec).
//
// Outputs are decoded from the state register (Moore), except cnt_load,
// force_crit and cnt_dec, which are combinational from state and inputs and act
// on the next clock edge.
//
// The modes, the switch at counter zero, the return to Shared mode after CT
// completion, the policy codes and the immediate slice for the critical core
// follow the document; the state encoding is this design's choice.
module dec_ctrl_fsm
  import dec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ct_start,
  input  logic       last_done,
  input  logic       exec,
  input  logic       cnt_zero,
  output logic       cnt_load,
  output logic       cnt_dec,
  output logic       force_crit,
  output policy_e    policy,
  output dec_state_e state
);

  dec_state_e nxt;

  always_comb begin
    nxt        = state;
    cnt_load   = 1'b0;
    cnt_dec    = 1'b0;
    force_crit = 1'b0;
    unique case (state)
      ST_IDLE: begin
        if (ct_start) begin
          nxt        = ST_SHARED;
          cnt_load   = 1'b1;
          force_crit = 1'b1;
        end
      end
      ST_SHARED: begin
        cnt_dec = exec;
        if (last_done)     nxt = ST_IDLE;
        else if (cnt_zero) nxt = ST_ISOLATED;
      end
      ST_ISOLATED: begin
        if (last_done) nxt = ST_IDLE;
      end
      default: nxt = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= nxt;
  end

  assign policy = (state == ST_ISOLATED) ? POLICY_ISOLATED : POLICY_SHARED;

endmodule
