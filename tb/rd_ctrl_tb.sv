// rd_ctrl_tb - self-checking testbench for the read control module.
//
// The testbench plays the write side and the RAM: it keeps a shadow memory
// of random words, a write position that it advances at random (never more
// than DEPTH ahead of the reads) and hands the block that position's Gray
// code as the synchronized write pointer; the block's RAM read port is
// answered from the shadow memory. It checks every cycle that empty is high
// exactly when the read count equals the write position, that the pointers
// and RAM address track the count of accepted reads, and that each accepted
// read puts the right word on data_out one clock edge later.
module rd_ctrl_tb;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned PTR_W  = ADDR_W + 1;

  logic              rd_clk = 1'b0;
  logic              rd_rst_n;
  logic              rd_en;
  logic [PTR_W-1:0]  wr_ptr_g_sync;
  logic [DATA_W-1:0] ram_rdata;
  logic              empty;
  logic [ADDR_W-1:0] rd_addr;
  logic [DATA_W-1:0] data_out;
  logic [PTR_W-1:0]  rd_ptr, rd_ptr_g;

  logic [DATA_W-1:0] shadow [DEPTH];
  logic [DATA_W-1:0] exp_data;
  int checks = 0, failures = 0;
  int unsigned wr_pos = 0, rd_pos = 0;
  int n_empty = 0, n_blocked = 0, n_reads = 0;

  rd_ctrl #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  assign ram_rdata = shadow[rd_addr];

  always #5 rd_clk = ~rd_clk;

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
    expect_eq("empty",   int'(empty),   int'(wr_pos == rd_pos));
    expect_eq("rd_ptr",  int'(rd_ptr),  int'(PTR_W'(rd_pos)));
    expect_eq("rd_addr", int'(rd_addr), int'(ADDR_W'(rd_pos)));
    expect_eq("rd_ptr_g decoded", int'(from_gray(rd_ptr_g)), int'(PTR_W'(rd_pos)));
  endtask

  initial begin
    bit fire;
    for (int i = 0; i < DEPTH; i++) shadow[i] = '0;
    rd_rst_n = 1'b0; rd_en = 1'b0; wr_ptr_g_sync = '0;
    #12 rd_rst_n = 1'b1;
    @(negedge rd_clk);
    expect_eq("data_out after reset", int'(data_out), 0);
    check_outputs();
    for (int n = 0; n < 2000; n++) begin
      // the writer adds some words
      if ($urandom % 3 == 0) begin
        int unsigned k;
        k = $urandom % (DEPTH - (wr_pos - rd_pos) + 1);
        repeat (k) begin
          shadow[ADDR_W'(wr_pos)] = DATA_W'($urandom);
          wr_pos++;
        end
      end
      wr_ptr_g_sync = to_gray(wr_pos);
      rd_en = ($urandom % 4) != 0;
      #1 check_outputs();
      if (empty) n_empty++;
      if (empty && rd_en) n_blocked++;
      fire = rd_en && (wr_pos != rd_pos);
      if (fire) exp_data = shadow[ADDR_W'(rd_pos)];
      @(posedge rd_clk);
      if (fire) rd_pos++;
      @(negedge rd_clk);
      if (fire) begin
        n_reads++;
        expect_eq("data_out", int'(data_out), int'(exp_data));
      end
    end
    expect_eq("empty cycles seen > 0", int'(n_empty > 0), 1);
    expect_eq("blocked reads seen > 0", int'(n_blocked > 0), 1);
    expect_eq("pointer wrapped", int'(rd_pos > 2 * DEPTH), 1);
    $display("reads %0d, empty cycles %0d, blocked reads %0d", n_reads, n_empty, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge rd_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
