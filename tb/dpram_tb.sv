// dpram_tb - self-checking testbench for the dual-port RAM.
//
// Fills every word through the write port, then keeps writing random words
// to random addresses (some with the write enable low) while reading random
// addresses through the combinational read port, and compares each read
// with a shadow array kept by the testbench. Runs at the default size
// (8 words of 8 bits).
module dpram_tb;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned ADDR_W = $clog2(DEPTH);

  logic              wr_clk = 1'b0;
  logic              we;
  logic [ADDR_W-1:0] waddr, raddr;
  logic [DATA_W-1:0] wdata, rdata;
  logic [DATA_W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  dpram #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 wr_clk = ~wr_clk;

  task automatic check_word(input logic [ADDR_W-1:0] a);
    raddr = a;
    #1;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      $display("FAIL: addr %0d read %h expected %h", a, rdata, shadow[a]);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    @(negedge wr_clk);
    // fill every address
    for (int i = 0; i < DEPTH; i++) begin
      we = 1'b1; waddr = ADDR_W'(i); wdata = DATA_W'($urandom);
      shadow[i] = wdata;
      @(negedge wr_clk);
    end
    we = 1'b0;
    for (int i = 0; i < DEPTH; i++) check_word(ADDR_W'(i));
    // random traffic, write enable on about two thirds of the cycles
    for (int n = 0; n < 400; n++) begin
      we    = ($urandom % 3) != 0;
      waddr = ADDR_W'($urandom);
      wdata = DATA_W'($urandom);
      @(posedge wr_clk);
      if (we) shadow[waddr] = wdata;
      @(negedge wr_clk);
      we = 1'b0;
      check_word(ADDR_W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge wr_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
