// ptr_sync_tb - self-checking testbench for the clock synchronization module.
//
// Runs the two clocks at unrelated periods (7 ns and 11 ns), changes each
// Gray pointer input by one bit at a time away from the receiving clock's
// edges, and checks after every receiving edge that the first stage holds
// the input seen at that edge and the second stage the input seen one edge
// earlier, i.e. a delay of exactly two receiving-clock edges. Also checks
// that each domain's reset clears only its own chain.
module ptr_sync_tb;

  localparam int unsigned PTR_W = 4;

  logic             wr_clk = 1'b0, rd_clk = 1'b0;
  logic             wr_rst_n, rd_rst_n;
  logic [PTR_W-1:0] rd_ptr_g, wr_ptr_g;
  logic [PTR_W-1:0] rd_ptr_g_d1, rd_ptr_g_d2, wr_ptr_g_d1, wr_ptr_g_d2;

  int checks = 0, failures = 0;
  bit done = 1'b0;

  ptr_sync #(.PTR_W(PTR_W)) dut (.*);

  always #7  wr_clk = ~wr_clk;   // 14 ns period
  always #11 rd_clk = ~rd_clk;   // 22 ns period

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %t: %s = %0d, expected %0d", $time, what, got, exp);
    end
  endtask

  // Flip one random bit of each pointer at the falling edge of the clock
  // that owns it, so it is stable at the receiving edges that matter.
  always @(negedge rd_clk) if (rd_rst_n && !done) rd_ptr_g <= rd_ptr_g ^ PTR_W'(1 << ($urandom % PTR_W));
  always @(negedge wr_clk) if (wr_rst_n && !done) wr_ptr_g <= wr_ptr_g ^ PTR_W'(1 << ($urandom % PTR_W));

  // Reference: remember what each receiving edge sampled
  logic [PTR_W-1:0] rd_seen [2];
  logic [PTR_W-1:0] wr_seen [2];
  int wr_edges = 0, rd_edges = 0;

  always @(posedge wr_clk) if (wr_rst_n) begin
    rd_seen[1] = rd_seen[0];
    rd_seen[0] = rd_ptr_g;
    wr_edges++;
    #1;
    if (wr_edges >= 2) begin
      expect_eq("rd_ptr_g_d1", int'(rd_ptr_g_d1), int'(rd_seen[0]));
      expect_eq("rd_ptr_g_d2", int'(rd_ptr_g_d2), int'(rd_seen[1]));
    end
  end

  always @(posedge rd_clk) if (rd_rst_n) begin
    wr_seen[1] = wr_seen[0];
    wr_seen[0] = wr_ptr_g;
    rd_edges++;
    #1;
    if (rd_edges >= 2) begin
      expect_eq("wr_ptr_g_d1", int'(wr_ptr_g_d1), int'(wr_seen[0]));
      expect_eq("wr_ptr_g_d2", int'(wr_ptr_g_d2), int'(wr_seen[1]));
    end
  end

  initial begin
    wr_rst_n = 1'b0; rd_rst_n = 1'b0;
    rd_ptr_g = '0; wr_ptr_g = '0;
    rd_seen[0] = '0; rd_seen[1] = '0; wr_seen[0] = '0; wr_seen[1] = '0;
    #30;
    expect_eq("rd_ptr_g_d2 in reset", int'(rd_ptr_g_d2), 0);
    expect_eq("wr_ptr_g_d2 in reset", int'(wr_ptr_g_d2), 0);
    @(negedge wr_clk) wr_rst_n = 1'b1;
    @(negedge rd_clk) rd_rst_n = 1'b1;
    #3000;
    done = 1'b1;
    // reset of the write domain only
    #60 wr_rst_n = 1'b0;
    #1;
    expect_eq("rd_ptr_g_d1 after wr reset", int'(rd_ptr_g_d1), 0);
    expect_eq("rd_ptr_g_d2 after wr reset", int'(rd_ptr_g_d2), 0);
    expect_eq("wr_ptr_g_d2 kept", int'(wr_ptr_g_d2), int'(wr_ptr_g));
    rd_rst_n = 1'b0;
    #1;
    expect_eq("wr_ptr_g_d2 after rd reset", int'(wr_ptr_g_d2), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge rd_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
