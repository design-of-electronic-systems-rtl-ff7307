// sd_freq_meter: period meter for square waves, programmed and read through
// a JTAG-like configuration chain (JLCC).
//
// Chain (tck domain): one shift register {channel, cmd, period, DV}, TDI
// entering at the channel end and TDO leaving from DV. A tck rising edge with
// tms = 0 shifts one bit; one with tms = 1 is the update: the shifted-in
// channel and command become the new command, and the register is loaded
// with the previous command, its channel, its period and its valid bit, which
// the next access shifts out. Software therefore reads the result of a
// command two accesses after issuing it.
//
// Measurement (clk domain): the update is passed to clk through a toggle and
// a two-flop synchronizer; the selected input goes through a multiplexer and
// another two-flop synchronizer. After a command the first edge of the input
// is discarded (it may come from the channel switch); the meter then waits
// for the start edge and counts clk cycles up to the end edge:
//   FP: rising to rising, HP: rising to falling, LP: falling to rising.
// The count is the period in clk cycles and DV is set. If the counter reaches
// its maximum first, the measure stops with DV = 0 (input out of range). NOP
// stops any measure. Period and DV change only when a measure ends, and are
// read into the chain on the tck side as quasi-static values; software must
// not update while a result may be landing (wait for the measure time).
// The chain fields, the commands, the discarded first edge, DV and the
// synchronisation points follow the original IP; the chain control with tms,
// the 16-bit counter and the field order are this design's choices.
module sd_freq_meter
  import freqm_pkg::*;
#(
  parameter int unsigned N_IN     = 6,
  parameter int unsigned PERIOD_W = 16,
  localparam int unsigned CH_W    = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned CHAIN_W = CH_W + 2 + PERIOD_W + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_IN-1:0] wave_in,
  // JTAG-like chain
  input  logic            tck,
  input  logic            tms,
  input  logic            tdi,
  output logic            tdo
);
  // ---------------- tck domain ----------------
  logic [CHAIN_W-1:0] sr;
  logic [CH_W-1:0]    ch_t;
  cmd_e               cmd_t;
  logic               upd_tgl;
  logic [PERIOD_W-1:0] period_q;
  logic               dv_q;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      sr      <= '0;
      ch_t    <= '0;
      cmd_t   <= CMD_NOP;
      upd_tgl <= 1'b0;
    end else if (tms) begin
      ch_t    <= sr[CHAIN_W-1 -: CH_W];
      cmd_t   <= cmd_e'(sr[CHAIN_W-1-CH_W -: 2]);
      upd_tgl <= ~upd_tgl;
      sr      <= {ch_t, cmd_t, period_q, dv_q};
    end else begin
      sr <= {tdi, sr[CHAIN_W-1:1]};
    end
  end
  assign tdo = sr[0];

  // ---------------- clk domain ----------------
  logic [2:0]      upd_sync;
  logic            upd_seen;
  logic [CH_W-1:0] ch_c;
  cmd_e            cmd_c;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) upd_sync <= '0;
    else        upd_sync <= {upd_sync[1:0], upd_tgl};
  assign upd_seen = upd_sync[2] ^ upd_sync[1];

  logic       sel_wave;
  logic [2:0] wsync;
  logic       rise, fall;
  assign sel_wave = (int'(ch_c) < N_IN) ? wave_in[ch_c] : 1'b0;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) wsync <= '0;
    else        wsync <= {wsync[1:0], sel_wave};
  assign rise = wsync[1] && !wsync[2];
  assign fall = !wsync[1] && wsync[2];

  typedef enum logic [1:0] {M_IDLE, M_SKIP, M_START, M_COUNT} mstate_e;
  mstate_e             ms;
  logic [PERIOD_W-1:0] cnt;
  logic                start_edge, end_edge;

  always_comb begin
    start_edge = (cmd_c == CMD_LP) ? fall : rise;
    end_edge   = (cmd_c == CMD_HP) ? fall : rise;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch_c     <= '0;
      cmd_c    <= CMD_NOP;
      ms       <= M_IDLE;
      cnt      <= '0;
      period_q <= '0;
      dv_q     <= 1'b0;
    end else if (upd_seen) begin
      ch_c  <= ch_t;
      cmd_c <= cmd_t;
      dv_q  <= 1'b0;
      ms    <= (cmd_t == CMD_NOP) ? M_IDLE : M_SKIP;
    end else begin
      case (ms)
        M_SKIP:  if (rise || fall) ms <= M_START;
        M_START: if (start_edge) begin
          cnt <= PERIOD_W'(1);
          ms  <= M_COUNT;
        end
        M_COUNT: begin
          if (end_edge) begin
            period_q <= cnt;
            dv_q     <= 1'b1;
            ms       <= M_IDLE;
          end else if (&cnt) begin
            period_q <= cnt;
            dv_q     <= 1'b0;      // overflow: input too slow
            ms       <= M_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: ;
      endcase
    end
  end
endmodule
