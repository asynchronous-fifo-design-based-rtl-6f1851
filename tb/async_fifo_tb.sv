// async_fifo_tb - end-to-end self-checking testbench for the asynchronous
// FIFO at its default size (8 words of 8 bits).
//
// A scoreboard queue records every word the FIFO accepts on the write side
// and checks that the read side returns the same words in the same order.
// The occupancy known to the testbench (accepted writes minus accepted
// reads) is used to check that the FIFO never holds more than DEPTH words,
// that full/empty are never missing when the FIFO is really full/empty,
// and to count "false" full and empty cycles (flag high while a word slot
// or a word is still available), which the design accepts by intent.
//
// Phases: fill with the reader idle, drain with the writer idle, then random
// traffic under several write/read clock ratios (fast read and slow write,
// the reverse, equal), and finally a reset of both domains. Latency checks:
// after a write into an empty FIFO, empty must fall within 2 to 3 read clock
// edges (two synchronizer stages); after a read from a full FIFO, full must
// fall within 2 to 3 write clock edges. Each mechanism (full, write blocked,
// empty, read blocked, false full, false empty, pointer wrap, concurrent
// read and write, reset) must occur at least once.
module async_fifo_tb;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned DEPTH  = 8;

  logic              wr_clk = 1'b0, rd_clk = 1'b0;
  logic              wr_rst_n, rd_rst_n;
  logic              wr_en, rd_en;
  logic [DATA_W-1:0] data_in, data_out;
  logic              full, empty;

  int wr_half = 5, rd_half = 3;        // half periods, changed per phase
  int wr_pct = 0, rd_pct = 0;          // request probabilities in percent

  logic [DATA_W-1:0] sb[$];            // scoreboard
  int checks = 0, failures = 0;
  int unsigned n_wr = 0, n_rd = 0;     // accepted writes and reads

  // mechanism counters
  int c_full = 0, c_wr_blocked = 0, c_empty = 0, c_rd_blocked = 0;
  int c_false_full = 0, c_false_empty = 0, c_concurrent = 0, c_reset = 0;
  int c_empty_lat = 0, c_full_lat = 0;

  // latency trackers
  bit pend_e = 0, pend_f = 0;
  int lat_e = 0, lat_f = 0;
  bit running = 0;

  async_fifo dut (.*);

  always #(wr_half) wr_clk = ~wr_clk;
  always #(rd_half) rd_clk = ~rd_clk;

  task automatic expect_true(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %t: %s", $time, what);
    end
  endtask

  // stimulus on the falling edges
  always @(negedge wr_clk) begin
    wr_en   <= running && wr_rst_n && (($urandom % 100) < wr_pct);
    data_in <= DATA_W'($urandom);
  end
  always @(negedge rd_clk) rd_en <= running && rd_rst_n && (($urandom % 100) < rd_pct);

  // write side monitor
  always @(posedge wr_clk) if (wr_rst_n && rd_rst_n) begin
    int unsigned occ;
    occ = n_wr - n_rd;
    if (full) c_full++;
    if (full && occ < DEPTH) c_false_full++;
    expect_true("full when FIFO holds DEPTH words", occ < DEPTH || full);
    if (pend_f) lat_f++;
    if (wr_en && full) c_wr_blocked++;
    if (wr_en && !full) begin
      if (occ == 0 && empty) begin pend_e = 1; lat_e = 0; end
      sb.push_back(data_in);
      n_wr++;
      expect_true("occupancy never above DEPTH", (n_wr - n_rd) <= DEPTH);
    end
    #1;
    if (pend_f && !full) begin
      expect_true($sformatf("full released %0d write edges after read", lat_f),
                  lat_f >= 2 && lat_f <= 3);
      c_full_lat++;
      pend_f = 0;
    end
  end

  // read side monitor
  always @(posedge rd_clk) if (wr_rst_n && rd_rst_n) begin
    logic [DATA_W-1:0] exp;
    bit fire;
    if (empty) c_empty++;
    if (empty && (n_wr - n_rd) > 0) c_false_empty++;
    expect_true("empty when FIFO holds no word", (n_wr - n_rd) > 0 || empty);
    if (pend_e) lat_e++;
    if (rd_en && empty) c_rd_blocked++;
    fire = rd_en && !empty;
    if (fire) begin
      if (sb.size() == 0) begin
        expect_true("read from an empty scoreboard", 1'b0);
        exp = '0;
      end else exp = sb.pop_front();
      if ((n_wr - n_rd) == DEPTH && full) begin pend_f = 1; lat_f = 0; end
      if (wr_en && !full) c_concurrent++;
      n_rd++;
    end
    #1;
    if (fire) expect_true($sformatf("data_out %h expected %h", data_out, exp), data_out == exp);
    if (pend_e && !empty) begin
      expect_true($sformatf("empty released %0d read edges after write", lat_e),
                  lat_e >= 2 && lat_e <= 3);
      c_empty_lat++;
      pend_e = 0;
    end
  end

  task automatic run_phase(input int wh, input int rh, input int wp, input int rp,
                           input int cycles);
    wr_half = wh; rd_half = rh; wr_pct = wp; rd_pct = rp;
    repeat (cycles) @(posedge wr_clk);
  endtask

  initial begin
    wr_rst_n = 1'b0; rd_rst_n = 1'b0; wr_en = 1'b0; rd_en = 1'b0; data_in = '0;
    #23;
    expect_true("empty in reset", empty);
    expect_true("not full in reset", !full);
    wr_rst_n = 1'b1; rd_rst_n = 1'b1;
    running = 1;
    // fill with the reader idle, then drain with the writer idle
    run_phase(5, 3, 100, 0, 20);
    expect_true("full after filling", full);
    expect_true("exactly DEPTH words accepted", n_wr == DEPTH);
    run_phase(5, 3, 0, 100, 20);
    expect_true("empty after draining", empty);
    expect_true("all words read back", n_rd == DEPTH);
    // random traffic under several clock ratios
    run_phase(9, 2, 60, 90, 3000);   // slow write, fast read
    run_phase(2, 9, 90, 60, 3000);   // fast write, slow read
    run_phase(4, 4, 70, 70, 3000);   // equal clocks
    run_phase(3, 5, 50, 50, 3000);
    run_phase(7, 3, 95, 20, 3000);   // slow write, slow drain
    // stop traffic and let the FIFO drain
    wr_pct = 0; rd_pct = 100;
    repeat (50) @(posedge wr_clk);
    expect_true("scoreboard drained", sb.size() == 0);
    // fill partly, then reset both domains
    rd_pct = 0; wr_pct = 100;
    repeat (5) @(posedge wr_clk);
    running = 0;
    @(negedge wr_clk);
    wr_rst_n = 1'b0; rd_rst_n = 1'b0;
    #1;
    c_reset++;
    expect_true("empty after reset", empty);
    expect_true("not full after reset", !full);
    sb.delete(); n_wr = 0; n_rd = 0; pend_e = 0; pend_f = 0;
    #20;
    wr_rst_n = 1'b1; rd_rst_n = 1'b1;
    running = 1;
    run_phase(5, 4, 50, 50, 500);
    // every mechanism must have happened
    expect_true("full seen",            c_full > 0);
    expect_true("write blocked seen",   c_wr_blocked > 0);
    expect_true("empty seen",           c_empty > 0);
    expect_true("read blocked seen",    c_rd_blocked > 0);
    expect_true("false full seen",      c_false_full > 0);
    expect_true("false empty seen",     c_false_empty > 0);
    expect_true("concurrent r/w seen",  c_concurrent > 0);
    expect_true("pointer wrap seen",    c_reset > 0 || n_wr > 2 * DEPTH);
    expect_true("empty latency seen",   c_empty_lat > 0);
    expect_true("full latency seen",    c_full_lat > 0);
    expect_true("reset seen",           c_reset > 0);
    $display("full %0d, write blocked %0d, empty %0d, read blocked %0d",
             c_full, c_wr_blocked, c_empty, c_rd_blocked);
    $display("false full %0d, false empty %0d, concurrent %0d, latencies e/f %0d/%0d, resets %0d",
             c_false_full, c_false_empty, c_concurrent, c_empty_lat, c_full_lat, c_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge wr_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
