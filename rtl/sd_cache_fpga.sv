// sd_cache_fpga: FPGA companion of the 8051 cache. It holds the off-chip code
// memory (MEM_BYTES, 32 KB by default) and serves it to the ASIC's cache over
// the 2-wire link through an sram_interface.
//
// After reset the FPGA's own boot CPU (not part of this RTL: its program
// memory port and SFR writes are brought out as dl_* and sfr_*) writes the
// downloaded code into the memory while the ASIC is held in reset
// (asic_resetn low). Writing 1 to the end_download SFR hands the memory's
// read port to sram_interface, releases the ASIC reset, routes the UART pin
// to the ASIC (uart_from_asic) and freezes the boot CPU: its clock, cpu_gclk,
// stops (latch-based clock_gate) and cpu_freeze stays high. The polarity SFR
// selects falling-edge sampling of the serial line. The clock is the ASIC's
// serial clock output, so both ends of the link are synchronous.
// SFR map (this design's choice): address 0 = polarity (bit 0),
// address 1 = end_download (bit 0). Memory reads are synchronous, one cycle.
module sd_cache_fpga
  import cache_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 32768,
  parameter int unsigned NBYTES    = cache_pkg::N_BYTEXBLOCK,
  localparam int unsigned MEM_AW   = $clog2(MEM_BYTES)
) (
  input  logic              clk,          // serial clock from the ASIC
  input  logic              rst_n,
  // boot CPU program-download port
  input  logic              dl_we,
  input  logic              dl_re,
  input  logic [MEM_AW-1:0] dl_addr,
  input  logic [7:0]        dl_wdata,
  output logic [7:0]        dl_rdata,
  // boot CPU SFR bus
  input  logic              sfr_we,
  input  logic              sfr_addr,
  input  logic [7:0]        sfr_wdata,
  output logic              polarity,
  output logic              end_download,
  // system control
  input  logic              cpu_clk,      // clock of the boot CPU
  output logic              cpu_gclk,
  output logic              cpu_freeze,
  output logic              asic_resetn,
  output logic              uart_from_asic,
  // serial link
  input  logic              sdata_in,
  output logic              sdata_drive_low,
  output logic              id_sent
);
  logic [7:0]        mem [MEM_BYTES];
  logic              si_re;
  logic [MEM_AW-1:0] si_addr;
  logic [7:0]        rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      polarity     <= 1'b0;
      end_download <= 1'b0;
    end else if (sfr_we && !end_download) begin
      if (sfr_addr) end_download <= sfr_wdata[0];
      else          polarity     <= sfr_wdata[0];
    end
  end

  // single memory port, owned by the boot CPU until the download ends
  always_ff @(posedge clk) begin
    if (!end_download) begin
      if (dl_we) mem[dl_addr] <= dl_wdata;
      if (dl_re) rdata_q <= mem[dl_addr];
    end else if (si_re) begin
      rdata_q <= mem[si_addr];
    end
  end
  assign dl_rdata = rdata_q;

  sram_interface #(.NBYTES(NBYTES), .MEM_AW(MEM_AW)) u_si (
    .clk, .rst_n, .enable(end_download), .sample_neg(polarity),
    .sdata_in, .sdata_drive_low,
    .mem_re(si_re), .mem_addr(si_addr), .mem_rdata(rdata_q), .id_sent
  );

  assign asic_resetn    = end_download;
  assign uart_from_asic = end_download;
  assign cpu_freeze     = end_download;
  clock_gate u_cg (.clk(cpu_clk), .en(~end_download), .gclk(cpu_gclk));
endmodule
