// instr_completion: the DEC's "Instruction Completion Indicator".
//
// It watches two signals of the critical core: the Program Counter of the
// instruction in the last pipeline stage and the Annul flag, which is 1 when that
// instruction was dropped (wrong branch path, squashed speculation) instead of
// executed. It produces
//   exec      : 1 in every cycle whose last-stage instruction is not annulled;
//               the DEC counter only counts these cycles, so time spent on
//               flushed instructions is not charged to the critical task;
//   last_done : one-cycle pulse when a not annulled instruction at the
//               configured last CT address reaches the end of the pipeline,
//               i.e. the critical task has completed.
// A cycle that shows the same PC as the previous cycle, and the previous cycle
// was not annulled, is a pipeline stall on the same instruction, so a stall on
// the last instruction gives a single pulse, while an annulled instance of the
// last instruction followed by the executed one still gives it.
//
// Using PC and Annul follows the document. Counting per clock cycle (rather than
// per instruction), the PC-change rule and the combinational outputs are this
// design's choices.
module instr_completion
  import dec_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] pc,
  input  logic              annul,
  input  logic [ADDR_W-1:0] ct_last,
  output logic              exec,
  output logic              last_done
);

  logic [ADDR_W-1:0] pc_q;
  logic              pc_q_valid;
  logic              annul_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q       <= '0;
      pc_q_valid <= 1'b0;
      annul_q    <= 1'b0;
    end else begin
      pc_q       <= pc;
      pc_q_valid <= 1'b1;
      annul_q    <= annul;
    end
  end

  assign exec      = !annul;
  logic stall;  // same instruction as in the previous cycle, already counted
  assign stall     = pc_q_valid && (pc == pc_q) && !annul_q;
  assign last_done = !annul && (pc == ct_last) && !stall;

endmodule
