// rd_ctrl - read control module (empty detection) of the asynchronous FIFO.
//
// Holds the binary read pointer rd_ptr, PTR_W = log2(DEPTH)+1 bits wide;
// its low bits (rd_addr) address the RAM's combinational read port. At a
// rising edge of rd_clk with rd_en high and empty low, the word at rd_addr
// is captured into data_out and the pointer advances by one, so data_out
// is valid from the clock edge that accepted the read and holds its value
// otherwise. A read request while empty is ignored. The pointer is also
// presented in Gray code (rd_ptr_g) for the synchronizer that carries it to
// the write domain.
//
// empty is combinational: it is high when rd_ptr_g equals wr_ptr_g_sync, the
// write pointer's Gray code after two rd_clk flip-flops. Because the
// synchronized write pointer lags the real one, empty can stay high for a
// couple of cycles after a word has been written ("false empty"); it is
// never low while the FIFO is really empty.
//
// rd_rst_n is an asynchronous, active-low reset that clears the pointer.
// The original design leaves data_out without reset; here it is cleared to
// zero as well. The rest follows the original design.
module rd_ctrl #(
  parameter int unsigned DATA_W = async_fifo_pkg::DEFAULT_DATA_W,
  parameter int unsigned DEPTH  = async_fifo_pkg::DEFAULT_DEPTH,
  localparam int unsigned ADDR_W = $clog2(DEPTH),
  localparam int unsigned PTR_W  = ADDR_W + 1
) (
  input  logic              rd_clk,
  input  logic              rd_rst_n,
  input  logic              rd_en,
  input  logic [PTR_W-1:0]  wr_ptr_g_sync,  // write pointer, Gray, synchronized
  input  logic [DATA_W-1:0] ram_rdata,      // RAM word at rd_addr
  output logic              empty,
  output logic [ADDR_W-1:0] rd_addr,        // RAM read address
  output logic [DATA_W-1:0] data_out,
  output logic [PTR_W-1:0]  rd_ptr,         // binary read pointer
  output logic [PTR_W-1:0]  rd_ptr_g        // Gray read pointer
);

  import async_fifo_pkg::*;

  logic        rd_fire;

  assign rd_fire = rd_en && !empty;
  assign rd_addr = rd_ptr[ADDR_W-1:0];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rd_ptr   <= '0;
      data_out <= '0;
    end else if (rd_fire) begin
      data_out <= ram_rdata;
      rd_ptr   <= rd_ptr + 1'b1;
    end
  end

  assign rd_ptr_g      = PTR_W'(bin2gray(32'(rd_ptr)));
  assign empty         = (rd_ptr_g == wr_ptr_g_sync);

  // The pointer never moves while empty, and its Gray code changes in at
  // most one bit per clock.
  a_no_read_when_empty: assert property (
    @(posedge rd_clk) disable iff (!rd_rst_n) empty |=> $stable(rd_ptr));
  a_gray_one_bit: assert property (
    @(posedge rd_clk) disable iff (!rd_rst_n) $onehot0(rd_ptr_g ^ $past(rd_ptr_g)));

endmodule
