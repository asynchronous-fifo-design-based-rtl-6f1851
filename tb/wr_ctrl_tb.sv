// wr_ctrl_tb - self-checking testbench for the write control module.
//
// The testbench plays the read side: it keeps its own read position, hands
// its Gray code to the block as the synchronized read pointer, and moves it
// forward at random without ever passing the write position. It drives
// random write requests and checks, every cycle, the write strobe, the RAM
// address, the binary and Gray pointers and the full flag against its own
// count of accepted writes. Full is expected exactly when the write count is
// DEPTH ahead of the read position. The Gray code is checked by decoding it
// bit by bit (prefix XOR), independently of the block's encoder.
module wr_ctrl_tb;

  localparam int unsigned DEPTH  = 8;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned PTR_W  = ADDR_W + 1;

  logic             wr_clk = 1'b0;
  logic             wr_rst_n;
  logic             wr_en;
  logic [PTR_W-1:0] rd_ptr_g_sync;
  logic             full, ram_we;
  logic [ADDR_W-1:0] wr_addr;
  logic [PTR_W-1:0] wr_ptr, wr_ptr_g;

  int checks = 0, failures = 0;
  int unsigned wr_pos = 0, rd_pos = 0;  // free-running counts
  int n_full = 0, n_blocked = 0;

  wr_ctrl #(.DEPTH(DEPTH)) dut (.*);

  always #5 wr_clk = ~wr_clk;

  // Gray encoding written out bit by bit
  function automatic logic [PTR_W-1:0] to_gray(input int unsigned v);
    logic [PTR_W-1:0] b, g;
    b = PTR_W'(v);
    g[PTR_W-1] = b[PTR_W-1];
    for (int i = PTR_W - 2; i >= 0; i--) g[i] = b[i+1] ^ b[i];
    return g;
  endfunction

  function automatic logic [PTR_W-1:0] from_gray(input logic [PTR_W-1:0] g);
    logic [PTR_W-1:0] b;
    b[PTR_W-1] = g[PTR_W-1];
    for (int i = PTR_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %t: %s = %0d, expected %0d", $time, what, got, exp);
    end
  endtask

  task automatic check_outputs();
    bit exp_full;
    exp_full = (wr_pos - rd_pos) == DEPTH;
    expect_eq("full",    int'(full),    int'(exp_full));
    expect_eq("ram_we",  int'(ram_we),  int'(wr_en && !exp_full));
    expect_eq("wr_ptr",  int'(wr_ptr),  int'(PTR_W'(wr_pos)));
    expect_eq("wr_addr", int'(wr_addr), int'(ADDR_W'(wr_pos)));
    expect_eq("wr_ptr_g decoded", int'(from_gray(wr_ptr_g)), int'(PTR_W'(wr_pos)));
  endtask

  initial begin
    wr_rst_n = 1'b0; wr_en = 1'b0; rd_ptr_g_sync = '0;
    #12 wr_rst_n = 1'b1;
    @(negedge wr_clk);
    check_outputs();
    // phase 1: fill with the reader stopped, then keep requesting
    for (int n = 0; n < 12; n++) begin
      wr_en = 1'b1;
      #1 check_outputs();
      if (full) n_full++;
      if (full && wr_en) n_blocked++;
      @(posedge wr_clk);
      if (wr_en && (wr_pos - rd_pos) != DEPTH) wr_pos++;
      @(negedge wr_clk);
    end
    expect_eq("writes accepted with reader stopped", int'(wr_pos), DEPTH);
    // phase 2: random reader progress and random write requests
    for (int n = 0; n < 2000; n++) begin
      if ($urandom % 2 == 1 && rd_pos != wr_pos)
        rd_pos += 1 + ($urandom % (wr_pos - rd_pos));
      rd_ptr_g_sync = to_gray(rd_pos);
      wr_en = ($urandom % 4) != 0;
      #1 check_outputs();
      if (full) n_full++;
      if (full && wr_en) n_blocked++;
      @(posedge wr_clk);
      if (wr_en && (wr_pos - rd_pos) != DEPTH) wr_pos++;
      @(negedge wr_clk);
    end
    // asynchronous reset clears the pointer
    wr_rst_n = 1'b0; rd_ptr_g_sync = '0; wr_en = 1'b0;
    #1;
    wr_pos = 0; rd_pos = 0;
    check_outputs();
    expect_eq("full cycles seen > 0", int'(n_full > 0), 1);
    expect_eq("blocked writes seen > 0", int'(n_blocked > 0), 1);
    expect_eq("pointer wrapped", int'(wr_pos == 0), 1);
    $display("full cycles %0d, blocked writes %0d", n_full, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge wr_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
