// global_memory: the shared global memory, a word-wide RAM slave on the system
// bus.
//
// A transfer is presented with req.valid and held until ack. The memory waits
// WAIT cycles, then in one cycle performs the access and raises ack for a single
// cycle with the read data (for a write, the old word). It does not take the same
// request again in the cycle of its ack. Every access therefore takes WAIT + 2
// cycles from the first cycle of valid to the cycle after ack. The word index is
// the byte address divided by 4, modulo WORDS. Contents are not reset.
//
// The document only names the memory; its size and timing are this design's
// choices.
module global_memory
  import dec_pkg::*;
#(
  parameter int unsigned WORDS = 16384,  // 64 KiB
  parameter int unsigned WAIT  = 1,      // wait cycles before the access
  localparam int unsigned AW   = $clog2(WORDS),
  localparam int unsigned WW   = (WAIT > 0) ? $clog2(WAIT + 1) : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp
);

  logic [DATA_W-1:0] mem [WORDS];
  logic [WW-1:0]     wcnt;
  logic [AW-1:0]     widx;
  logic              ack_q;
  logic [DATA_W-1:0] rdata_q;

  assign widx      = req.addr[AW+1:2];
  assign rsp.ack   = ack_q;
  assign rsp.rdata = rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt    <= '0;
      ack_q <= 1'b0;
    end else begin
      ack_q <= 1'b0;
      if (req.valid && !ack_q) begin
        if (32'(wcnt) == WAIT) begin
          wcnt    <= '0;
          ack_q <= 1'b1;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (req.valid && !ack_q && 32'(wcnt) == WAIT) begin
      rdata_q <= mem[widx];
      if (req.we) mem[widx] <= req.wdata;
    end
  end

endmodule
