// sync_2ff - two-flip-flop synchronizer for a Gray-coded pointer.
//
// Samples d (which comes from another clock domain) on every rising edge
// of clk and delivers it two edges later: q_d1 is the first stage, which
// may go metastable, and q_d2 the second, which the destination logic uses.
// Passing a Gray-coded pointer is safe because only one bit of it changes
// at a time. rst_n is an asynchronous, active-low reset of the destination
// domain that clears both stages. One instance serves each direction of
// the FIFO's clock synchronization module.
module sync_2ff #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q_d1,
  output logic [WIDTH-1:0] q_d2
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_d1 <= '0;
      q_d2 <= '0;
    end else begin
      q_d1 <= d;
      q_d2 <= q_d1;
    end
  end

endmodule
