// async_fifo - asynchronous FIFO that carries 8-bit words from one clock
// domain to another.
//
// Structure (four parts, as in the original block diagram):
//   dpram    - DEPTH x DATA_W storage, written on wr_clk, read on rd_clk
//   wr_ctrl  - write pointer and full flag (write domain)
//   rd_ctrl  - read pointer, registered data_out and empty flag (read domain)
//   ptr_sync - two-flop synchronizers that pass each Gray-coded pointer to
//              the other domain
//
// Pointers are log2(DEPTH)+1 bits: the low bits address the RAM and the top
// bit counts laps. Each domain compares its own pointer with the other
// domain's pointer as it was two of its own clock edges ago, so full and
// empty may assert early or release late (false full, false empty) but are
// never late to assert; the cost is a few cycles of throughput, never lost
// or duplicated data.
//
// Write side: at a rising wr_clk edge with wr_en high and full low, data_in
// is stored. Read side: at a rising rd_clk edge with rd_en high and empty
// low, the oldest word appears on data_out (one register stage) and stays
// there until the next accepted read. full and empty are combinational from
// the domain's own pointer and the synchronized pointer. Each domain has its
// own asynchronous active-low reset; both must be applied together to empty
// the FIFO.
//
// Defaults (8 words of 8 bits, 4-bit pointers) follow the original design.
module async_fifo #(
  parameter int unsigned DATA_W = async_fifo_pkg::DEFAULT_DATA_W,
  parameter int unsigned DEPTH  = async_fifo_pkg::DEFAULT_DEPTH,
  localparam int unsigned ADDR_W = $clog2(DEPTH),
  localparam int unsigned PTR_W  = ADDR_W + 1
) (
  // write clock domain
  input  logic              wr_clk,
  input  logic              wr_rst_n,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] data_in,
  output logic              full,
  // read clock domain
  input  logic              rd_clk,
  input  logic              rd_rst_n,
  input  logic              rd_en,
  output logic [DATA_W-1:0] data_out,
  output logic              empty
);

  logic              ram_we;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [DATA_W-1:0] ram_rdata;
  logic [PTR_W-1:0]  wr_ptr_g, rd_ptr_g, rd_ptr_g_d2, wr_ptr_g_d2;

  dpram #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_dpram (
    .wr_clk(wr_clk),
    .we    (ram_we),
    .waddr (wr_addr),
    .wdata (data_in),
    .raddr (rd_addr),
    .rdata (ram_rdata)
  );

  wr_ctrl #(.DEPTH(DEPTH)) u_wr_ctrl (
    .wr_clk       (wr_clk),
    .wr_rst_n     (wr_rst_n),
    .wr_en        (wr_en),
    .rd_ptr_g_sync(rd_ptr_g_d2),
    .full         (full),
    .ram_we       (ram_we),
    .wr_addr      (wr_addr),
    .wr_ptr       (),
    .wr_ptr_g     (wr_ptr_g)
  );

  rd_ctrl #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_rd_ctrl (
    .rd_clk       (rd_clk),
    .rd_rst_n     (rd_rst_n),
    .rd_en        (rd_en),
    .wr_ptr_g_sync(wr_ptr_g_d2),
    .ram_rdata    (ram_rdata),
    .empty        (empty),
    .rd_addr      (rd_addr),
    .data_out     (data_out),
    .rd_ptr       (),
    .rd_ptr_g     (rd_ptr_g)
  );

  ptr_sync #(.PTR_W(PTR_W)) u_ptr_sync (
    .wr_clk     (wr_clk),
    .wr_rst_n   (wr_rst_n),
    .rd_clk     (rd_clk),
    .rd_rst_n   (rd_rst_n),
    .rd_ptr_g   (rd_ptr_g),
    .wr_ptr_g   (wr_ptr_g),
    .rd_ptr_g_d1(),
    .rd_ptr_g_d2(rd_ptr_g_d2),
    .wr_ptr_g_d1(),
    .wr_ptr_g_d2(wr_ptr_g_d2)
  );

endmodule
