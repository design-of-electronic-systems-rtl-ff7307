// sd_8051_cache: program-memory cache for an 8051 CPU, refilled over a
// 2-wire serial link (sclk = system clock, open-collector data line).
//
// CPU side: the CPU issues cpu_addr with cpu_cs_n low and expects a code byte
// on cpu_data. Every access costs two cycles: in the first the row at INDEX is
// read from the cache SRAM (cpu_freeze high), in the second the tag compare
// decides. On a hit cpu_freeze drops, the byte is presented and the CPU clock
// (cpu_gclk, gated by a latch-based clock_gate) ticks once. On a miss
// cpu_freeze stays high and the CPU keeps seeing the last valid byte while the
// block is fetched; the CPU and its memories get no clock during that time.
//
// Address split: OFFSET = log2(N_BYTEXBLOCK) LSBs, INDEX = log2(rows) bits,
// TAG = the rest. ASSOC = 1 is direct mapped; ASSOC = 2 is 2-way
// set-associative with one replacement bit per row that names the last way
// used, the other way being the victim.
//
// Serial master, per miss: 2 start bits ('0', then '1' = previous stream
// received fine), the 16-log2(N) address MSBs, 1 even-parity bit; the line is
// then left to the pull-up while the slave reads the block; the slave answers
// with 2 start bits, 8*N data bits (byte 0 first, MSB first) and a parity bit.
// A '0' in the second start bit reports a parity fault: the talker releases
// the line and the previous stream is sent again. With N = 8 and one off-chip
// read cycle per byte the stream is 91 cycles and the miss, from the cycle
// that detects it to the cycle that hands the byte over, 95 cycles.
//
// Start-up: after reset the rows are flushed one per cycle while the data
// line is held low; the line is then released and the cache waits up to
// DETECT_TIMEOUT cycles for the identification stream ('0','1', CACHE_ID,
// parity). If it comes the cache is active; otherwise it stays in memory
// mode, where its SRAM is a plain PSRAM bank of CACHE_BYTES addressed by the
// low address bits (reads and writes, two cycles each).
//
// The protocol, the timing of hits and misses, the freeze/clock-gating scheme,
// memory mode and the two organisations follow the original IP. The
// identification byte, the timeout, even parity, the bit order of the block,
// the replacement rule details and rising-edge SRAM clocking are this
// design's own choices.
module sd_8051_cache
  import cache_pkg::*;
#(
  parameter int unsigned CACHE_SIZE = cache_pkg::CACHE_BYTES,
  parameter int unsigned NBYTES     = cache_pkg::N_BYTEXBLOCK,
  parameter int unsigned ASSOC      = 2,
  parameter int unsigned TIMEOUT    = cache_pkg::DETECT_TIMEOUT
) (
  input  logic        clk,
  input  logic        rst_n,
  // 8051 program-memory side
  input  logic [15:0] cpu_addr,
  input  logic        cpu_cs_n,
  input  logic        cpu_we,       // memory mode write (PSRAM bank)
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_data,
  output logic        cpu_freeze,
  output logic        cpu_gclk,
  // SFR
  input  logic        sample_neg,   // polarity of serial data sampling
  output logic        active,       // 1: cache mode, 0: memory mode
  // serial link
  output logic        sclk,
  input  logic        sdata_in,     // level on the data line
  output logic        sdata_drive_low
);
  localparam int unsigned OFF_W   = $clog2(NBYTES);
  localparam int unsigned WAY_B   = CACHE_SIZE / ASSOC;
  localparam int unsigned ROWS    = WAY_B / NBYTES;
  localparam int unsigned IDX_W   = $clog2(ROWS);
  localparam int unsigned TAG_W   = CPU_ADDR_W - IDX_W - OFF_W;
  localparam int unsigned BADDR_W = CPU_ADDR_W - OFF_W;   // address bits sent
  localparam int unsigned TX_BITS = 2 + BADDR_W + 1;
  localparam int unsigned RX_BITS = 1 + 8*NBYTES + 1;     // ok, data, parity
  localparam int unsigned ID_BITS = 1 + 8 + 1;
  localparam int unsigned CNT_W   = $clog2(RX_BITS + TIMEOUT + ROWS + 1);

  typedef enum logic [3:0] {
    S_FLUSH, S_DETECT, S_ID_RX, S_READY, S_LOOKUP,
    S_TX, S_WAITSTART, S_RX, S_NACK, S_STORE, S_REREAD
  } state_t;

  state_t                  state;
  logic [CNT_W-1:0]        cnt;
  logic [15:0]             acc_addr;
  logic [7:0]              acc_wdata;
  logic                    acc_we;
  logic [7:0]              last_data;
  logic [RX_BITS-1:0]      rx_sr;
  logic                    rx_bit;
  logic [ROWS-1:0]         repl;        // last way used, per row
  logic                    victim;

  // ---- address fields ----
  logic [OFF_W-1:0] acc_off;
  logic [IDX_W-1:0] acc_idx, cur_idx;
  logic [TAG_W-1:0] acc_tag;
  assign acc_off = acc_addr[OFF_W-1:0];
  assign acc_idx = acc_addr[OFF_W +: IDX_W];
  assign acc_tag = acc_addr[CPU_ADDR_W-1 -: TAG_W];
  assign cur_idx = cpu_addr[OFF_W +: IDX_W];

  // memory mode: way select is the address bit above INDEX
  logic mm_way;
  if (ASSOC > 1) begin : g_mmway
    assign mm_way = acc_addr[OFF_W + IDX_W];
  end else begin : g_mmway1
    assign mm_way = 1'b0;
  end

  sdata_sampler u_samp (.clk, .sample_neg, .line(sdata_in), .bit_out(rx_bit));
  assign sclk = clk;

  // ---- ways ----
  logic                 rd_en;
  logic [IDX_W-1:0]     rd_index;
  logic [ASSOC-1:0]     way_hit, way_we_row, way_we_byte;
  logic [NBYTES*8-1:0]  way_blk [ASSOC];
  logic [IDX_W-1:0]     wr_index;
  logic                 wr_valid;
  logic [NBYTES*8-1:0]  fill_blk;

  for (genvar w = 0; w < ASSOC; w++) begin : g_way
    logic            v_unused;
    logic [TAG_W-1:0] t_unused;
    cache_way #(.ROWS(ROWS), .TAG_W(TAG_W), .NBYTES(NBYTES)) u_way (
      .clk,
      .rd_en, .rd_index, .cmp_tag(acc_tag),
      .valid(v_unused), .tag(t_unused), .block(way_blk[w]), .hit(way_hit[w]),
      .we_row(way_we_row[w]), .wr_index, .wr_valid, .wr_tag(acc_tag),
      .wr_block(fill_blk),
      .we_byte(way_we_byte[w]), .wr_offset(acc_off), .wr_byte(acc_wdata)
    );
  end

  // received block: byte 0 arrived first, i.e. sits in the top bits
  always_comb
    for (int k = 0; k < NBYTES; k++)
      fill_blk[k*8 +: 8] = rx_sr[1 + (NBYTES-1-k)*8 +: 8];

  // ---- hit logic and byte selection ----
  logic                 hit;
  logic [NBYTES*8-1:0]  sel_blk;
  logic                 hit_way;
  always_comb begin
    hit     = |way_hit;
    hit_way = 1'b0;
    sel_blk = way_blk[0];
    if (!active) begin
      sel_blk = way_blk[mm_way];
    end else begin
      for (int w = 0; w < ASSOC; w++)
        if (way_hit[w]) begin
          sel_blk = way_blk[w];
          hit_way = 1'(w);
        end
    end
  end

  logic [7:0] sel_byte;
  assign sel_byte = sel_blk[acc_off*8 +: 8];

  logic provide;   // cycle in which the byte is handed to the CPU
  assign provide = (state == S_LOOKUP) && (!active || hit);

  assign victim = (ASSOC > 1) ? ~repl[acc_idx] : 1'b0;

  // ---- outputs to the CPU ----
  always_comb begin
    cpu_freeze = 1'b1;
    if (state == S_READY && cpu_cs_n) cpu_freeze = 1'b0;
    if (provide)                      cpu_freeze = 1'b0;
  end
  assign cpu_data = (provide && !acc_we) ? sel_byte : last_data;

  clock_gate u_cpu_cg (.clk, .en(~cpu_freeze), .gclk(cpu_gclk));

  // ---- SRAM port control ----
  always_comb begin
    rd_en       = 1'b0;
    rd_index    = cur_idx;
    way_we_row  = '0;
    way_we_byte = '0;
    wr_index    = acc_idx;
    wr_valid    = 1'b1;
    case (state)
      S_FLUSH: begin
        way_we_row = '1;
        wr_index   = cnt[IDX_W-1:0];
        wr_valid   = 1'b0;
      end
      S_READY:  rd_en = !cpu_cs_n;
      S_REREAD: begin rd_en = 1'b1; rd_index = acc_idx; end
      S_STORE:  way_we_row[victim] = 1'b1;
      S_LOOKUP: if (!active && acc_we) way_we_byte[mm_way] = 1'b1;
      default: ;
    endcase
  end

  // ---- serial line driver ----
  logic [BADDR_W-1:0] tx_addr;
  logic               tx_par;
  assign tx_addr = acc_addr[CPU_ADDR_W-1 -: BADDR_W];
  assign tx_par  = ^tx_addr;
  always_comb begin
    sdata_drive_low = 1'b0;
    case (state)
      S_FLUSH: sdata_drive_low = 1'b1;
      S_TX: begin
        if (cnt == 0)                 sdata_drive_low = 1'b1;       // start
        else if (cnt == 1)            sdata_drive_low = 1'b0;       // ok
        else if (cnt < CNT_W'(TX_BITS-1))
          sdata_drive_low = ~tx_addr[BADDR_W-1 - (int'(cnt) - 2)];
        else                          sdata_drive_low = ~tx_par;    // parity bit
      end
      S_NACK: sdata_drive_low = 1'b1;                               // '0','0'
      default: ;
    endcase
  end

  // ---- controller ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_FLUSH;
      cnt       <= '0;
      active    <= 1'b0;
      acc_addr  <= '0;
      acc_wdata <= '0;
      acc_we    <= 1'b0;
      last_data <= '0;
      rx_sr     <= '0;
      repl      <= '0;
    end else begin
      case (state)
        S_FLUSH: begin
          repl[cnt[IDX_W-1:0]] <= 1'b0;
          if (cnt == CNT_W'(ROWS-1)) begin
            state <= S_DETECT;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_DETECT: begin
          if (!rx_bit) begin
            state <= S_ID_RX;
            cnt   <= '0;
          end else if (cnt == CNT_W'(TIMEOUT-1)) begin
            state <= S_READY;            // nobody answered: memory mode
          end else cnt <= cnt + 1'b1;
        end
        S_ID_RX: begin
          rx_sr <= {rx_sr[RX_BITS-2:0], rx_bit};
          if (cnt == CNT_W'(ID_BITS-1)) begin
            // rx_sr[8:0] now holds ok, ID; rx_bit is the parity bit
            active <= rx_sr[9-1] && (rx_sr[7:0] == CACHE_ID) &&
                      ((^rx_sr[7:0]) == rx_bit);
            state  <= S_READY;
          end else cnt <= cnt + 1'b1;
        end
        S_READY: begin
          if (!cpu_cs_n) begin
            acc_addr  <= cpu_addr;
            acc_wdata <= cpu_wdata;
            acc_we    <= cpu_we;
            state     <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (provide) begin
            if (!acc_we) last_data <= sel_byte;
            if (active && ASSOC > 1) repl[acc_idx] <= hit_way;
            state <= S_READY;
          end else begin
            state <= S_TX;
            cnt   <= '0;
          end
        end
        S_TX: begin
          if (cnt == CNT_W'(TX_BITS-1)) begin
            state <= S_WAITSTART;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_WAITSTART: begin
          if (!rx_bit) begin
            state <= S_RX;
            cnt   <= '0;
          end
        end
        S_RX: begin
          rx_sr <= {rx_sr[RX_BITS-2:0], rx_bit};
          if (cnt == 0 && !rx_bit) begin
            // slave reports a parity fault on the address: send it again
            state <= S_TX;
            cnt   <= '0;
          end else if (cnt == CNT_W'(RX_BITS-1)) begin
            // parity over the data bits, rx_bit is the parity bit
            if ((^rx_sr[8*NBYTES-1:0]) == rx_bit) state <= S_STORE;
            else                                  state <= S_NACK;
            cnt <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_NACK: begin
          if (cnt == 1) begin
            state <= S_WAITSTART;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_STORE: begin
          // the shift register is aligned: ok bit, then the data bits
          if (ASSOC > 1) repl[acc_idx] <= victim;
          state <= S_REREAD;
        end
        S_REREAD: state <= S_LOOKUP;
        default:  state <= S_FLUSH;
      endcase
    end
  end

  // Protocol rule: the CPU must hold address and chip select while frozen.
  property p_hold_addr;
    @(posedge clk) disable iff (!rst_n)
      (state inside {S_LOOKUP, S_TX, S_WAITSTART, S_RX, S_STORE, S_REREAD, S_NACK})
        && !provide |-> cpu_addr == acc_addr;
  endproperty
  a_hold_addr: assert property (p_hold_addr)
    else $error("cpu_addr changed while the CPU was frozen");
endmodule
