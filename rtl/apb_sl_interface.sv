// apb_sl_interface: AMBA APB (APB2, no wait states) register file of the SRAM
// probe controller. It holds the configuration registers N_SAMPLE,
// SET_TIMING, SET_ADDR and PROBE_SEL and the DATA register, shows the PM, DR
// and AMR flags in STATUS, and turns writes to STATUS and accesses to DATA
// into one-cycle command pulses for the memory_interface:
//   STATUS write: bit 0 start probing, bit 1 stop probing, bit 2 start reading
//   DATA write (idle only): store a test word; DATA read: fetch the next word
// While probing (PM set) every write is ignored except 'stop probing'.
// Writes and reads take effect in the APB access phase (psel & penable).
module apb_sl_interface
  import sramc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // APB
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [APB_AW-1:0] paddr,
  input  logic [15:0]       pwdata,
  output logic [15:0]       prdata,
  // to / from memory_interface
  output cfg_t              cfg,
  output cmd_t              cmd,
  output logic [15:0]       test_word,
  input  logic              pm,
  input  logic              dr,
  input  logic              amr,
  input  logic              data_load,
  input  logic [15:0]       data_in
);
  logic [15:0] data_q;
  logic [15:0] addr_q;
  logic        wr, rd;

  assign wr = psel && penable && pwrite;
  assign rd = psel && penable && !pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.n_sample  <= '0;
      cfg.timing    <= '0;
      cfg.probe_sel <= '0;
      addr_q        <= '0;
      data_q        <= '0;
    end else begin
      if (wr && !pm) begin
        case (paddr)
          A_N_SAMPLE: cfg.n_sample  <= pwdata[3:0];
          A_TIMING:   cfg.timing    <= pwdata[1:0];
          A_ADDR:     addr_q        <= pwdata;
          A_PSEL:     cfg.probe_sel <= pwdata[3:0];
          A_DATA:     data_q        <= pwdata;
          default: ;
        endcase
      end
      if (data_load) data_q <= data_in;
    end
  end
  assign cfg.start_word = addr_q[SRAM_AW:1];
  assign test_word      = pwdata;

  always_comb begin
    cmd = '0;
    if (wr && paddr == A_STATUS) begin
      cmd.stop_probe  = pwdata[C_STOP_PROBE];
      cmd.start_probe = pwdata[C_START_PROBE] && !pm;
      cmd.start_read  = pwdata[C_START_READ] && !pm;
    end
    if (wr && !pm && paddr == A_ADDR) cmd.set_addr   = 1'b1;
    if (wr && !pm && paddr == A_DATA) cmd.test_write = 1'b1;
    if (rd && paddr == A_DATA)        cmd.data_read  = 1'b1;
  end

  always_comb begin
    case (paddr)
      A_STATUS: begin
        prdata        = '0;
        prdata[F_PM]  = pm;
        prdata[F_DR]  = dr;
        prdata[F_AMR] = amr;
      end
      A_DATA:     prdata = data_q;
      A_N_SAMPLE: prdata = {12'b0, cfg.n_sample};
      A_TIMING:   prdata = {14'b0, cfg.timing};
      A_ADDR:     prdata = addr_q;
      A_PSEL:     prdata = {12'b0, cfg.probe_sel};
      default:    prdata = '0;
    endcase
  end
endmodule
