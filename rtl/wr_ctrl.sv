// wr_ctrl - write control module (full detection) of the asynchronous FIFO.
//
// Holds the binary write pointer wr_ptr, PTR_W = log2(DEPTH)+1 bits wide.
// Its low log2(DEPTH) bits (wr_addr) address the RAM, its top bit counts
// laps. At a rising edge of wr_clk with wr_en high and full low, the word on
// the data input is written (ram_we) and the pointer advances by one; a
// write request while full is ignored. The pointer is also presented in Gray
// code (wr_ptr_g) for the synchronizer that carries it to the read domain.
//
// full is combinational: it compares wr_ptr_g with rd_ptr_g_sync, the read
// pointer's Gray code after two wr_clk flip-flops, and is high when the two
// top bits differ and all lower bits agree (one full lap apart). Because the
// synchronized read pointer lags the real one, full can stay high for a
// couple of cycles after the reader has freed a word ("false full"); it is
// never low while the FIFO is really full.
//
// wr_rst_n is an asynchronous, active-low reset that clears the pointer.
// All of this follows the original design; only the generic widths, the
// separate RAM write strobe and the assertions are this implementation's.
module wr_ctrl #(
  parameter int unsigned DEPTH = async_fifo_pkg::DEFAULT_DEPTH,
  localparam int unsigned ADDR_W = $clog2(DEPTH),
  localparam int unsigned PTR_W  = ADDR_W + 1
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [PTR_W-1:0] rd_ptr_g_sync,  // read pointer, Gray, synchronized
  output logic             full,
  output logic             ram_we,         // write strobe to the RAM
  output logic [ADDR_W-1:0] wr_addr,       // RAM write address
  output logic [PTR_W-1:0] wr_ptr,         // binary write pointer
  output logic [PTR_W-1:0] wr_ptr_g        // Gray write pointer
);

  import async_fifo_pkg::*;


  assign ram_we  = wr_en && !full;
  assign wr_addr = wr_ptr[ADDR_W-1:0];

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n)   wr_ptr <= '0;
    else if (ram_we) wr_ptr <= wr_ptr + 1'b1;
  end

  assign wr_ptr_g      = PTR_W'(bin2gray(32'(wr_ptr)));
  assign full          = gray_full(32'(wr_ptr_g), 32'(rd_ptr_g_sync), PTR_W);

  // The pointer never moves while full, and its Gray code changes in at
  // most one bit per clock.
  a_no_write_when_full: assert property (
    @(posedge wr_clk) disable iff (!wr_rst_n) full |=> $stable(wr_ptr));
  a_gray_one_bit: assert property (
    @(posedge wr_clk) disable iff (!wr_rst_n) $onehot0(wr_ptr_g ^ $past(wr_ptr_g)));

endmodule
