// tdma_bus_ctrl: the bus access controller (in the two-core system, the AHB
// controller) with a TDMA access policy that the DEC can switch.
//
// Time is cut into slices of TTS clock cycles. In Shared mode (policy 2'b01) the
// slices go round-robin to cores 0, 1, ..., NCORES-1, and only the owner of the
// current slice may start a bus transfer. In Isolated mode (policy 2'b00) only
// the critical core CRIT may start transfers; the slice counter keeps running so
// that Shared mode resumes with the rotation in step. A force_crit pulse (DEC:
// critical task started) restarts the slice counter and gives the slice that
// starts on the next cycle to the critical core, whoever owned the current one.
//
// Transfers are not pre-empted: a transfer started in one slice (or before the
// switch to Isolated mode) runs to its ack even if the slice ends meanwhile. This
// overrun is what the DEC's Delta T completion allows for. One transfer is
// outstanding at a time.
//
// Interface: req_valid (one bit per core), ack from the slave; outputs gnt_valid
// and gnt_idx select the master the system bus connects to the slave.
// Timing: a transfer starts in the same cycle the slice owner requests
// (gnt_valid is combinational); the grant is held until the cycle of ack.
//
// TDMA slices, the policy codes, Isolated mode for the critical core and the
// immediate slice at critical task start follow the document; the slave-ack
// handshake, non-pre-emption and continued rotation in Isolated mode are this
// design's choices.
module tdma_bus_ctrl
  import dec_pkg::*;
#(
  parameter int unsigned NCORES = 2,
  parameter int unsigned TTS    = 300,  // TDMA time slice, clock cycles
  parameter int unsigned CRIT   = 0,    // index of the critical core
  localparam int unsigned IDX_W = (NCORES > 1) ? $clog2(NCORES) : 1,
  localparam int unsigned TTS_W = (TTS > 1) ? $clog2(TTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NCORES-1:0] req_valid,
  input  logic              ack,
  input  policy_e           policy,
  input  logic              force_crit,
  output logic              gnt_valid,
  output logic [IDX_W-1:0]  gnt_idx,
  output logic [IDX_W-1:0]  slot_owner,
  output logic [TTS_W-1:0]  slot_cnt
);

  logic             in_flight;
  logic [IDX_W-1:0] cur_idx;
  logic [IDX_W-1:0] owner_eff;
  logic             start;

  assign owner_eff = (policy == POLICY_ISOLATED) ? IDX_W'(CRIT) : slot_owner;
  assign start     = !in_flight && req_valid[owner_eff];
  assign gnt_valid = in_flight || start;
  assign gnt_idx   = in_flight ? cur_idx : owner_eff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_flight <= 1'b0;
      cur_idx   <= '0;
    end else if (in_flight) begin
      if (ack) in_flight <= 1'b0;
    end else if (start) begin
      in_flight <= 1'b1;
      cur_idx   <= owner_eff;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_owner <= '0;
      slot_cnt   <= '0;
    end else if (force_crit) begin
      slot_owner <= IDX_W'(CRIT);
      slot_cnt   <= '0;
    end else if (32'(slot_cnt) == TTS - 1) begin
      slot_cnt   <= '0;
      slot_owner <= (32'(slot_owner) == NCORES - 1) ? '0 : slot_owner + 1'b1;
    end else begin
      slot_cnt <= slot_cnt + 1'b1;
    end
  end

  // Only a requesting core is ever granted, and only the critical core may start
  // a transfer in Isolated mode.
  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n)
                              start |-> req_valid[gnt_idx]);
  a_iso:     assert property (@(posedge clk) disable iff (!rst_n)
                              (start && policy == POLICY_ISOLATED) |-> gnt_idx == IDX_W'(CRIT));

endmodule
