// dpram - dual-port RAM that stores the FIFO's words.
//
// DEPTH words of DATA_W bits held in a plain array (8 x 8 by default, the
// size given for the FIFO). The write port is synchronous to wr_clk: when
// we is high at a rising edge, wdata is stored at waddr. The read port is
// combinational: rdata always shows the word at raddr, and the read
// controller registers it on rd_clk. The two ports run on unrelated clocks;
// the FIFO's pointer logic guarantees that the word being read is never the
// one being written.
//
// Following the original design the array itself has no reset; its
// contents are undefined until written. Splitting the RAM out as its own
// module with a combinational read port, rather than writing the array from
// inside the write controller, is this implementation's choice.
module dpram #(
  parameter int unsigned DATA_W = async_fifo_pkg::DEFAULT_DATA_W,
  parameter int unsigned DEPTH  = async_fifo_pkg::DEFAULT_DEPTH,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  // write port (wr_clk domain)
  input  logic              wr_clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  // read port (asynchronous read, registered by the reader)
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge wr_clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
