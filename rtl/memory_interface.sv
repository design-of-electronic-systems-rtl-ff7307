// memory_interface: state machine of the SRAM probe controller that drives an
// asynchronous external SRAM (16-bit words, active-low CE/WE/OE).
//
// Idle:    a test word written to DATA is stored at the write pointer, which
//          starts at SET_ADDR and advances by one word per store.
// Probing: after 'start probing' (PM set) every valid word from the
//          probe_interface is stored at consecutive addresses from SET_ADDR
//          until 2**N_SAMPLE words are in memory, then PM clears by itself;
//          'stop probing' ends it early. A word that arrives while a write
//          is in progress waits in a one-word holding register (a newer word
//          replaces it), so the store latency varies but the rate is fixed:
//          one word per write cycle of 4 + 2*SET_TIMING clocks (4, 6, 8, 10).
//          The same holding register takes test words, so the CPU must leave
//          one write cycle between two writes to DATA.
// Reading: 'start reading' reads 2**N_SAMPLE words from SET_ADDR, oldest
//          first. Each word goes to DATA and sets DR; reading DATA clears DR
//          and starts the next memory read (2 clocks). AMR is set when the
//          last memory read is done and cleared by the next command.
// Write cycle: clock 0 address, data and CE; clocks 1..L-2 WE low; clock L-1
// hold. Read: two clocks with CE and OE low, data taken at the end of the
// second. The mode behaviour and flags follow the original IP; the cycle
// shapes and the four write timings are this design's own.
module memory_interface
  import sramc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_t               cfg,
  input  cmd_t               cmd,
  input  logic [15:0]        test_word,
  input  logic [PW-1:0]      probe_data,
  input  logic               probe_dv,
  output logic               pm,
  output logic               dr,
  output logic               amr,
  output logic               data_load,
  output logic [15:0]        data_out,
  // external SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [15:0]        sram_dq_o,
  output logic               sram_dq_oe,
  input  logic [15:0]        sram_dq_i,
  output logic               sram_ce_n,
  output logic               sram_we_n,
  output logic               sram_oe_n
);
  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ, S_RD_WAIT} state_t;

  state_t             state;
  logic [3:0]         cnt;
  logic [SRAM_AW-1:0] wr_ptr, rd_ptr;
  logic [16:0]        wcnt, rcnt;
  logic               pend_v;
  logic [15:0]        pend_w, wr_word;
  logic               set_addr_d;
  logic [16:0]        n_words;
  logic [3:0]         wlen;
  logic               wr_last, start_wr;

  assign n_words  = 17'(1) << cfg.n_sample;
  assign wlen     = 4'(write_cycle(cfg.timing));
  assign wr_last  = (state == S_WRITE) && (cnt == wlen - 1'b1);
  assign start_wr = pend_v && ((state == S_IDLE) || (state == S_RD_WAIT) || wr_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      wcnt       <= '0;
      rcnt       <= '0;
      pend_v     <= 1'b0;
      pend_w     <= '0;
      wr_word    <= '0;
      pm         <= 1'b0;
      dr         <= 1'b0;
      amr        <= 1'b0;
      set_addr_d <= 1'b0;
    end else begin
      set_addr_d <= cmd.set_addr;
      if (set_addr_d) wr_ptr <= cfg.start_word;

      // ---- holding register ----
      if (start_wr) pend_v <= 1'b0;
      if (pm && probe_dv) begin
        pend_v <= 1'b1;
        pend_w <= probe_data;
      end else if (cmd.test_write && !pm) begin
        pend_v <= 1'b1;
        pend_w <= test_word;
      end

      // ---- commands ----
      if (cmd.start_probe || cmd.stop_probe || cmd.start_read) amr <= 1'b0;
      if (cmd.start_probe) begin
        pm     <= 1'b1;
        wr_ptr <= cfg.start_word;
        wcnt   <= '0;
        pend_v <= 1'b0;
      end
      if (cmd.stop_probe) begin
        pm     <= 1'b0;
        pend_v <= 1'b0;
      end

      // ---- sequencing ----
      case (state)
        S_IDLE: begin
          if (start_wr) begin
            state   <= S_WRITE;
            cnt     <= '0;
            wr_word <= pend_w;
          end else if (cmd.start_read) begin
            state  <= S_READ;
            cnt    <= '0;
            rd_ptr <= cfg.start_word;
            rcnt   <= '0;
            dr     <= 1'b0;
          end else if (cmd.data_read) begin
            dr <= 1'b0;
          end
        end
        S_WRITE: begin
          if (wr_last) begin
            wr_ptr <= wr_ptr + 1'b1;
            if (pm) begin
              wcnt <= wcnt + 1'b1;
              if (wcnt + 1'b1 == n_words) begin
                pm     <= 1'b0;
                pend_v <= 1'b0;
              end
            end
            if (start_wr && !(pm && wcnt + 1'b1 == n_words)) begin
              cnt     <= '0;
              wr_word <= pend_w;
            end else state <= S_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        S_READ: begin
          if (cnt == 1) begin
            dr       <= 1'b1;
            rd_ptr   <= rd_ptr + 1'b1;
            rcnt     <= rcnt + 1'b1;
            if (rcnt + 1'b1 == n_words) begin
              amr   <= 1'b1;
              state <= S_IDLE;
            end else state <= S_RD_WAIT;
          end else cnt <= cnt + 1'b1;
        end
        S_RD_WAIT: begin
          if (start_wr) begin
            // a write (probing or test word) ends the read session
            state   <= S_WRITE;
            cnt     <= '0;
            wr_word <= pend_w;
          end else if (cmd.start_read) begin
            state  <= S_READ;
            cnt    <= '0;
            rd_ptr <= cfg.start_word;
            rcnt   <= '0;
            dr     <= 1'b0;
          end else if (cmd.data_read) begin
            dr    <= 1'b0;
            state <= S_READ;
            cnt   <= '0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DATA is loaded straight from the SRAM bus at the end of the read
  assign data_load = (state == S_READ) && (cnt == 1);
  assign data_out  = sram_dq_i;

  always_comb begin
    sram_ce_n  = 1'b1;
    sram_we_n  = 1'b1;
    sram_oe_n  = 1'b1;
    sram_dq_oe = 1'b0;
    sram_addr  = wr_ptr;
    sram_dq_o  = wr_word;
    case (state)
      S_WRITE: begin
        sram_ce_n  = 1'b0;
        sram_dq_oe = 1'b1;
        sram_we_n  = !(cnt >= 1 && cnt <= wlen - 4'd2);
      end
      S_READ: begin
        sram_ce_n = 1'b0;
        sram_oe_n = 1'b0;
        sram_addr = rd_ptr;
      end
      default: ;
    endcase
  end
endmodule
