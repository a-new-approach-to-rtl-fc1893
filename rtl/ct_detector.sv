// ct_detector: the DEC's "CT Start/Stop Detector".
//
// It sniffs the instruction-fetch requests the critical core places on the
// system bus. A fetch of the first CT instruction address while no CT is active
// raises ct_active and gives a one-cycle ct_start pulse; a fetch of the last CT
// instruction address while a CT is active lowers ct_active and gives a
// one-cycle ct_stop pulse. ct_active is the "CT start/stop detection" level of
// the document: 1 from the first to the last CT instruction fetch.
//
// Timing: the pulses and the level change are registered, one cycle after the
// fetch request is seen on the bus. A request held for several cycles (while the
// core waits for its TDMA slice) is detected once.
//
// Comparing fetch addresses against the configured first/last addresses follows
// the document; watching the request (before it is granted) and the one-cycle
// latency are this design's choices.
module ct_detector
  import dec_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fetch_valid,  // critical core requests an instruction fetch
  input  logic [ADDR_W-1:0] fetch_addr,
  input  logic [ADDR_W-1:0] ct_first,
  input  logic [ADDR_W-1:0] ct_last,
  output logic              ct_start,
  output logic              ct_stop,
  output logic              ct_active
);

  logic hit_first, hit_last;
  assign hit_first = fetch_valid && (fetch_addr == ct_first);
  assign hit_last  = fetch_valid && (fetch_addr == ct_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ct_active <= 1'b0;
      ct_start  <= 1'b0;
      ct_stop   <= 1'b0;
    end else begin
      ct_start <= 1'b0;
      ct_stop  <= 1'b0;
      if (!ct_active && hit_first) begin
        ct_active <= 1'b1;
        ct_start  <= 1'b1;
      end else if (ct_active && hit_last) begin
        ct_active <= 1'b0;
        ct_stop   <= 1'b1;
      end
    end
  end

endmodule
