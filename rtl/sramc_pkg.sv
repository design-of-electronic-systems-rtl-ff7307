// sramc_pkg: register map, commands and configuration type of the SRAM probe
// controller. The register names (STATUS, DATA, N_SAMPLE, SET_TIMING,
// SET_ADDR, PROBE_SEL) and the status flags (PM, DR, AMR) are those of the
// original IP; the offsets and bit positions are this design's choice.
package sramc_pkg;
  localparam int unsigned APB_AW  = 4;    // byte offsets of 16-bit registers
  localparam int unsigned SRAM_AW = 15;   // 32 K x 16-bit words (size assumed)
  localparam int unsigned NPROBE  = 16;
  localparam int unsigned PW      = 16;   // probe word width

  localparam logic [APB_AW-1:0] A_STATUS   = 4'h0;
  localparam logic [APB_AW-1:0] A_DATA     = 4'h2;
  localparam logic [APB_AW-1:0] A_N_SAMPLE = 4'h4;
  localparam logic [APB_AW-1:0] A_TIMING   = 4'h6;
  localparam logic [APB_AW-1:0] A_ADDR     = 4'h8;
  localparam logic [APB_AW-1:0] A_PSEL     = 4'hA;

  // commands, written to STATUS
  localparam int unsigned C_START_PROBE = 0;
  localparam int unsigned C_STOP_PROBE  = 1;
  localparam int unsigned C_START_READ  = 2;
  // flags, read from STATUS
  localparam int unsigned F_PM  = 0;
  localparam int unsigned F_DR  = 1;
  localparam int unsigned F_AMR = 2;

  typedef struct packed {
    logic [3:0]         n_sample;    // 2**n_sample words per session
    logic [1:0]         timing;      // write cycle = 4 + 2*timing clocks
    logic [SRAM_AW-1:0] start_word;  // SET_ADDR is a byte address
    logic [3:0]         probe_sel;
  } cfg_t;

  typedef struct packed {
    logic start_probe;
    logic stop_probe;
    logic start_read;
    logic set_addr;      // SET_ADDR written: test words restart there
    logic test_write;    // DATA written while idle
    logic data_read;     // DATA read by the CPU
  } cmd_t;

  function automatic int unsigned write_cycle(input logic [1:0] t);
    return 4 + 2 * int'(t);
  endfunction
endpackage
