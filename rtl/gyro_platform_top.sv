// gyro_platform_top: digital part of the gyroscope prototyping platform, as
// far as it is described at gate level. It connects:
//  - the ASIC side: the 8051 program cache (sd_8051_cache), the APB probe/
//    test-word SRAM controller (sd_sram_controller), the JTAG-like period
//    meter (sd_freq_meter) and a clock-gated, clustered register bank
//    (gated_reg_clusters) standing for the low-power 8051 register set,
//    and the operand-isolated program-counter incrementers of the 8051
//    (pc_operand_isolation);
//  - side by side, the sine wave generator of the separate ISIF platform
//    (isif_nco) and its four-channel demodulator (isif_demodulator), which
//    takes NCO outputs 0 to 3 as the references of its channels 0 to 3; both
//    have their own ports.
//  - the FPGA side: the code memory with its boot-download port, SFRs and
//    serial slave (sd_cache_fpga).
// The two sides share the system clock (the ASIC's serial clock) and one
// open-collector data line, modelled as a wired-AND: the line is low when
// the cache, the FPGA or the line_disturb input pulls it low. line_disturb
// lets a test corrupt bits in flight to exercise the parity/retransmission
// scheme. The FPGA keeps the ASIC in reset (asic_resetn) until its boot CPU
// writes end_download; every ASIC block is reset by rst_n AND asic_resetn.
// The cache samples the line on the edge chosen by the FPGA polarity SFR.
// The 8051 CPU, LEON, DSP chain, analog front end and converters are not part
// of this RTL: their ports (CPU bus, APB, probe words, wave inputs) are
// brought out. Port grouping and the shared-polarity wiring are this
// design's choice; the block connections follow the platform description.
module gyro_platform_top
  import sramc_pkg::*;
#(
  parameter int unsigned N_WAVES = 6,
  parameter int unsigned N_REGS  = 41,
  parameter int unsigned REG_K   = 3,
  localparam int unsigned RAW    = $clog2(N_REGS),
  localparam int unsigned NCL    = (N_REGS + REG_K - 1) / REG_K
) (
  input  logic               clk,
  input  logic               rst_n,
  // 8051 code bus
  input  logic [15:0]        cpu_addr,
  input  logic               cpu_cs_n,
  input  logic               cpu_we,
  input  logic [7:0]         cpu_wdata,
  output logic [7:0]         cpu_data,
  output logic               cpu_freeze,
  output logic               cpu_gclk,
  output logic               cache_active,
  // serial link observation and fault injection
  input  logic               line_disturb,
  output logic               sdata_line,
  output logic               sclk,
  // FPGA boot CPU
  input  logic               boot_clk,
  input  logic               dl_we,
  input  logic               dl_re,
  input  logic [14:0]        dl_addr,
  input  logic [7:0]         dl_wdata,
  output logic [7:0]         dl_rdata,
  input  logic               sfr_we,
  input  logic               sfr_addr,
  input  logic [7:0]         sfr_wdata,
  output logic               boot_gclk,
  output logic               boot_freeze,
  output logic               asic_resetn,
  output logic               uart_from_asic,
  output logic               id_sent,
  // APB (16-bit bridge side)
  input  logic               psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [APB_AW-1:0]  paddr,
  input  logic [15:0]        pwdata,
  output logic [15:0]        prdata,
  // DSP probes
  input  logic [PW-1:0]      probe [NPROBE],
  input  logic [NPROBE-1:0]  probe_dv,
  // external probe SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [15:0]        sram_dq_o,
  output logic               sram_dq_oe,
  input  logic [15:0]        sram_dq_i,
  output logic               sram_ce_n,
  output logic               sram_we_n,
  output logic               sram_oe_n,
  output logic               probing,
  // period meter
  input  logic [N_WAVES-1:0] wave_in,
  input  logic               tck,
  input  logic               tms,
  input  logic               tdi,
  output logic               tdo,
  // clustered register bank
  input  logic               reg_wr,
  input  logic [RAW-1:0]     reg_waddr,
  input  logic [7:0]         reg_wdata,
  input  logic [RAW-1:0]     reg_raddr,
  output logic [7:0]         reg_rdata,
  output logic [NCL-1:0]     reg_gclk_active,
  // program-counter incrementers with operand isolation
  input  logic [15:0]        pc,
  input  logic [2:0]         pc_use_inc,
  output logic [15:0]        pc_inc [3],
  // ISIF sine wave generator (separate platform, side by side)
  input  logic               nco_en,
  input  logic [23:0]        nco_fcw   [3],
  input  logic [1:0]         nco_fsel  [16],
  input  logic [9:0]         nco_phase [16],
  output logic signed [11:0] nco_wave  [16],
  // ISIF demodulator (channel c mixes with nco_wave[c])
  input  logic               dem_valid,
  input  logic signed [15:0] dem_din   [4],
  input  logic [3:0]         dem_shift,
  output logic signed [27:0] dem_mix   [4],
  output logic signed [27:0] dem_out   [4],
  output logic               dem_out_valid
);
  logic asic_rst_n, cache_drv, fpga_drv, polarity;

  assign asic_rst_n = rst_n & asic_resetn;
  assign sdata_line = ~(cache_drv | fpga_drv | line_disturb);

  sd_8051_cache u_cache (
    .clk, .rst_n(asic_rst_n),
    .cpu_addr, .cpu_cs_n, .cpu_we, .cpu_wdata, .cpu_data, .cpu_freeze, .cpu_gclk,
    .sample_neg(polarity), .active(cache_active), .sclk,
    .sdata_in(sdata_line), .sdata_drive_low(cache_drv));

  sd_cache_fpga u_fpga (
    .clk, .rst_n,
    .dl_we, .dl_re, .dl_addr, .dl_wdata, .dl_rdata,
    .sfr_we, .sfr_addr, .sfr_wdata, .polarity, .end_download(),
    .cpu_clk(boot_clk), .cpu_gclk(boot_gclk), .cpu_freeze(boot_freeze),
    .asic_resetn, .uart_from_asic,
    .sdata_in(sdata_line), .sdata_drive_low(fpga_drv), .id_sent);

  sd_sram_controller u_sramc (
    .clk, .rst_n(asic_rst_n),
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .probe, .probe_dv,
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_ce_n, .sram_we_n, .sram_oe_n, .probing);

  sd_freq_meter #(.N_IN(N_WAVES)) u_fmeter (
    .clk, .rst_n(asic_rst_n), .wave_in, .tck, .tms, .tdi, .tdo);

  gated_reg_clusters #(.N_REGS(N_REGS), .W(8), .K(REG_K)) u_regs (
    .clk, .rst_n(asic_rst_n), .wr(reg_wr), .waddr(reg_waddr), .wdata(reg_wdata),
    .raddr(reg_raddr), .rdata(reg_rdata), .gclk_active(reg_gclk_active));

  logic [15:0] pc_iso_operand [3];
  pc_operand_isolation #(.AW(16)) u_pcinc (
    .pc, .use_inc(pc_use_inc), .inc(pc_inc), .iso_operand(pc_iso_operand));

  // The ISIF platform is a different chip; its NCO only shares clock and
  // reset here (not the ASIC reset of the gyro side).
  isif_nco u_nco (
    .clk, .rst_n, .en(nco_en), .fcw(nco_fcw), .out_fsel(nco_fsel),
    .out_phase(nco_phase), .wave(nco_wave));

  isif_demodulator u_dem (
    .clk, .rst_n, .in_valid(dem_valid), .din(dem_din), .ref_wave(nco_wave[0:3]),
    .lpf_shift(dem_shift), .mix(dem_mix), .dout(dem_out), .out_valid(dem_out_valid));
endmodule
