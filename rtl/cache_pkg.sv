// cache_pkg: constants shared by the 8051 code cache (serial master) and the
// off-chip sram_interface (serial slave). Both ends of the 2-wire protocol take
// the block size from here, so the block length never travels on the wire.
// Block size 8 bytes follows from the 91-cycle serial stream quoted for the
// gyro platform (22 + 9*N - log2 N = 91 gives N = 8). The cache size, the
// identification byte and the detection timeout are this design's own choices.
package cache_pkg;
  localparam int unsigned CPU_ADDR_W   = 16;     // 8051 code address space, 64 KB
  localparam int unsigned N_BYTEXBLOCK = 8;      // bytes per cache block
  localparam int unsigned CACHE_BYTES  = 1024;   // on-chip cache SRAM (assumed)
  localparam int unsigned ALPHA        = 1;      // off-chip read cycles per byte
  localparam logic [7:0]  CACHE_ID     = 8'hA5;  // identification byte (assumed)
  localparam int unsigned DETECT_TIMEOUT = 64;   // cycles to wait for the ID stream

  // Even parity: the parity bit makes the XOR of payload and parity zero.
  function automatic logic even_parity(input logic [63:0] bits, input int unsigned n);
    logic p;
    p = 1'b0;
    for (int unsigned i = 0; i < 64; i++)
      if (i < n) p ^= bits[i];
    return p;
  endfunction
endpackage
