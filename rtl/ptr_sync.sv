// ptr_sync - clock synchronization module of the asynchronous FIFO.
//
// Carries each Gray-coded pointer into the other clock domain with a delay
// of two clock edges of the receiving clock:
//   rd_ptr_g -> two wr_clk flip-flops -> rd_ptr_g_d1, rd_ptr_g_d2 (for full)
//   wr_ptr_g -> two rd_clk flip-flops -> wr_ptr_g_d1, wr_ptr_g_d2 (for empty)
// Each chain is cleared asynchronously by the reset of the domain it
// belongs to (wr_rst_n, rd_rst_n, active low). The first-stage outputs are
// brought out only for observation. Signal names and the two-stage depth
// follow the original design.
module ptr_sync #(
  parameter int unsigned PTR_W = $clog2(async_fifo_pkg::DEFAULT_DEPTH) + 1
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic [PTR_W-1:0] rd_ptr_g,     // from the read domain
  input  logic [PTR_W-1:0] wr_ptr_g,     // from the write domain
  output logic [PTR_W-1:0] rd_ptr_g_d1,  // write domain, first stage
  output logic [PTR_W-1:0] rd_ptr_g_d2,  // write domain, synchronized
  output logic [PTR_W-1:0] wr_ptr_g_d1,  // read domain, first stage
  output logic [PTR_W-1:0] wr_ptr_g_d2   // read domain, synchronized
);

  sync_2ff #(.WIDTH(PTR_W)) u_rd2wr (
    .clk  (wr_clk),
    .rst_n(wr_rst_n),
    .d    (rd_ptr_g),
    .q_d1 (rd_ptr_g_d1),
    .q_d2 (rd_ptr_g_d2)
  );

  sync_2ff #(.WIDTH(PTR_W)) u_wr2rd (
    .clk  (rd_clk),
    .rst_n(rd_rst_n),
    .d    (wr_ptr_g),
    .q_d1 (wr_ptr_g_d1),
    .q_d2 (wr_ptr_g_d2)
  );

endmodule
