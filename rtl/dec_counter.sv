// dec_counter: the DEC's down-counter.
//
// When the critical task starts, the counter is loaded with the shared-mode
// budget Delta T (deadline - WCET - Delta T completion, in clock cycles). It is
// then decremented by one in every cycle with dec_en set, which the control FSM
// raises only while the critical core executes instructions that are not
// annulled. zero is 1 while the count is 0; the count never wraps below zero.
// A load wins over a decrement in the same cycle. Reset clears the count.
//
// The load value and the zero test follow the document; width and priority are
// this design's choices.
module dec_counter #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [CNT_W-1:0] load_val,
  input  logic             dec_en,
  output logic [CNT_W-1:0] count,
  output logic             zero
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  count <= '0;
    else if (load)               count <= load_val;
    else if (dec_en && !zero)    count <= count - 1'b1;
  end

  assign zero = (count == '0);

endmodule
