// async_fifo_paper_tb - replays the three reference scenarios of the FIFO at
// its default size (8 words of 8 bits), with the read clock twice as fast
// as the write clock.
//
//  1. Write: eight words are written with the reader idle. After the eighth
//     the write pointer's Gray code is 1100 and the synchronized read
//     pointer 0000, so full is high; a ninth write request is ignored.
//  2. Read: the eight words come out in the order written. Afterwards the
//     read pointer's Gray code and the synchronized write pointer are both
//     1100, so empty is high and further read requests are ignored.
//  3. Slow write, fast read: seven more words are written at a low rate
//     while the reader requests a word on every read clock edge. All come
//     out in order, and empty is seen high while a word is already stored
//     (false empty), because the write pointer needs two read clock edges
//     to reach the read side.
// The data words are fixed, so the pointer values can be checked exactly.
module async_fifo_paper_tb;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned DEPTH  = 8;

  logic              wr_clk = 1'b0, rd_clk = 1'b0;
  logic              wr_rst_n, rd_rst_n;
  logic              wr_en, rd_en;
  logic [DATA_W-1:0] data_in, data_out;
  logic              full, empty;

  localparam logic [DATA_W-1:0] WORDS1 [8] = '{8'h24, 8'h81, 8'h09, 8'h63, 8'h0d, 8'h8d, 8'h65, 8'h12};
  localparam logic [DATA_W-1:0] WORDS3 [7] = '{8'h01, 8'h0d, 8'h76, 8'h3d, 8'hed, 8'h8c, 8'hf9};

  int checks = 0, failures = 0;
  int n_false_empty = 0, n_read3 = 0;
  int unsigned n_wr3 = 0;
  bit phase3 = 0;

  async_fifo dut (.*);

  always #10 wr_clk = ~wr_clk;
  always #5  rd_clk = ~rd_clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %t: %s = %0h, expected %0h", $time, what, got, exp);
    end
  endtask

  // phase 3 reader: read whenever the FIFO says it is not empty
  always @(posedge rd_clk) if (phase3) begin
    if (empty && n_wr3 > n_read3) n_false_empty++;
    if (rd_en && !empty) begin
      int idx;
      idx = n_read3;
      n_read3++;
      #1 expect_eq($sformatf("phase 3 word %0d", idx), int'(data_out), int'(WORDS3[idx]));
    end
  end

  initial begin
    wr_rst_n = 1'b0; rd_rst_n = 1'b0; wr_en = 1'b0; rd_en = 1'b0; data_in = '0;
    #25 wr_rst_n = 1'b1; rd_rst_n = 1'b1;

    // 1. write eight words
    for (int i = 0; i < 8; i++) begin
      @(negedge wr_clk);
      expect_eq("full before write", int'(full), 0);
      wr_en = 1'b1; data_in = WORDS1[i];
    end
    @(negedge wr_clk);
    expect_eq("full after 8 writes", int'(full), 1);
    expect_eq("wr_ptr_g", int'(dut.wr_ptr_g), 'b1100);
    expect_eq("rd_ptr_g_d2", int'(dut.rd_ptr_g_d2), 'b0000);
    data_in = 8'hff;                       // a ninth request
    @(negedge wr_clk);
    wr_en = 1'b0;
    expect_eq("ninth write ignored", int'(dut.wr_ptr_g), 'b1100);
    expect_eq("still full", int'(full), 1);

    // 2. read the eight words back
    for (int i = 0; i < 8; i++) begin
      @(negedge rd_clk);
      rd_en = 1'b1;
      wait (!empty);
      @(posedge rd_clk) #1;
      expect_eq($sformatf("word %0d", i), int'(data_out), int'(WORDS1[i]));
      @(negedge rd_clk) rd_en = 1'b0;
    end
    @(negedge rd_clk);
    rd_en = 1'b1;                           // a ninth request
    repeat (2) @(negedge rd_clk);
    rd_en = 1'b0;
    expect_eq("empty after 8 reads", int'(empty), 1);
    expect_eq("rd_ptr_g", int'(dut.rd_ptr_g), 'b1100);
    expect_eq("wr_ptr_g_d2", int'(dut.wr_ptr_g_d2), 'b1100);
    expect_eq("last word held", int'(data_out), 'h12);
    repeat (4) @(negedge wr_clk);
    expect_eq("full released", int'(full), 0);

    // 3. slow write, fast read
    phase3 = 1;
    @(negedge rd_clk) rd_en = 1'b1;
    for (int i = 0; i < 7; i++) begin
      @(negedge wr_clk);
      wr_en = 1'b1; data_in = WORDS3[i];
      @(posedge wr_clk);
      n_wr3++;
      @(negedge wr_clk);
      wr_en = 1'b0;
      repeat (2) @(negedge wr_clk);
    end
    repeat (10) @(negedge rd_clk);
    expect_eq("phase 3 words read", n_read3, 7);
    expect_eq("empty at end", int'(empty), 1);
    checks++;
    if (n_false_empty == 0) begin
      failures++;
      $display("FAIL: no false empty seen");
    end
    $display("false empty read cycles in phase 3: %0d", n_false_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge wr_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
