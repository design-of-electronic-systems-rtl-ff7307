// sd_sram_controller: debug probe recorder for a multi-stage DSP chain.
// The CPU programs it over APB (N_SAMPLE, SET_TIMING, SET_ADDR, PROBE_SEL),
// may store and read back test words to check the SRAM, then starts probing:
// the selected one of NPROBE 16-bit DSP nodes is recorded into an external
// SRAM with no further CPU work, and read back word by word through DATA.
// It is the composition of the three parts the original IP is split into:
// probe_interface (shift-register probe selection, 1-16 cycles latency),
// apb_sl_interface (registers and commands) and memory_interface (SRAM
// state machine). See those files for the timing of each part.
module sd_sram_controller
  import sramc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // APB
  input  logic               psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [APB_AW-1:0]  paddr,
  input  logic [15:0]        pwdata,
  output logic [15:0]        prdata,
  // DSP probe nodes
  input  logic [PW-1:0]      probe [NPROBE],
  input  logic [NPROBE-1:0]  probe_dv,
  // external SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [15:0]        sram_dq_o,
  output logic               sram_dq_oe,
  input  logic [15:0]        sram_dq_i,
  output logic               sram_ce_n,
  output logic               sram_we_n,
  output logic               sram_oe_n,
  output logic               probing
);
  cfg_t         cfg;
  cmd_t         cmd;
  logic [15:0]  test_word, data_word;
  logic         pm, dr, amr, data_load;
  logic [PW-1:0] sel_data;
  logic         sel_dv;

  probe_interface u_probe (
    .clk, .rst_n, .sel(cfg.probe_sel), .probe, .probe_dv,
    .out_data(sel_data), .out_dv(sel_dv));

  apb_sl_interface u_apb (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .cfg, .cmd, .test_word, .pm, .dr, .amr, .data_load, .data_in(data_word));

  memory_interface u_mem (
    .clk, .rst_n, .cfg, .cmd, .test_word, .probe_data(sel_data),
    .probe_dv(sel_dv), .pm, .dr, .amr, .data_load, .data_out(data_word),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n, .sram_we_n,
    .sram_oe_n);

  assign probing = pm;
endmodule
