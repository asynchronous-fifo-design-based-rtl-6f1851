// async_fifo_pkg - constants and helpers shared by the asynchronous FIFO.
//
// The FIFO buffers 8 words of 8 bits (DEFAULT_DEPTH, DEFAULT_DATA_W), the
// size of the two-dimensional RAM array in the original description.
// Read and write pointers are one bit wider than a RAM address; the extra
// most significant bit records how many times a pointer has wrapped, so
// "equal" means empty and "equal except for the wrap bit" means full.
//
// bin2gray() is the usual reflected binary Gray code, g = b ^ (b >> 1): the
// top Gray bit equals the top binary bit and each lower Gray bit is the XOR
// of two neighbouring binary bits. A pointer that counts up by one therefore
// changes exactly one Gray bit per step, so a synchronizer that samples it
// mid-transition sees either the old or the new value, never a mix.
// Everything here is combinational.
package async_fifo_pkg;

  parameter int unsigned DEFAULT_DATA_W = 8;  // width of one FIFO word
  parameter int unsigned DEFAULT_DEPTH  = 8;  // number of RAM words

  // Binary to Gray conversion for a pointer of up to 32 bits; callers
  // slice the result to their own width.
  function automatic logic [31:0] bin2gray(input logic [31:0] bin);
    return bin ^ (bin >> 1);
  endfunction

  // Full test in the write domain: the write pointer's Gray code equals the
  // synchronized read pointer's Gray code with its two top bits inverted.
  // (In Gray code a pointer exactly one lap ahead differs in the top two
  // bits, not only in the top one.)
  function automatic logic gray_full(input logic [31:0] wr_g,
                                     input logic [31:0] rd_g_sync,
                                     input int unsigned ptr_w);
    logic [31:0] mask;
    mask = 32'b11 << (ptr_w - 2);
    return wr_g == (rd_g_sync ^ mask);
  endfunction

endpackage
