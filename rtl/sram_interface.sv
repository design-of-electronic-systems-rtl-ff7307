// sram_interface: slave end of the 2-wire cache protocol (serial/parallel
// converter in front of the code memory that backs the 8051 cache).
//
// Once 'enable' is set (code download finished) it waits until it has seen
// the data line low (the ASIC held in reset and flushing its cache) and then
// high again (line released), and sends the identification stream
// '0','1', CACHE_ID, parity, which switches the cache into active mode.
// From then on it answers each request: it receives '0', ok, the
// 16-log2(N) block address bits and a parity bit; it then reads the N bytes of
// the block from memory, ALPHA cycles per byte (synchronous memory, data one
// cycle after mem_re), and sends '0','1', the 8*N data bits (byte 0 first,
// MSB first) and an even parity bit. A bad address parity is answered by
// '0','0' and the line is released so that the master repeats the address; a
// request whose ok bit is '0' makes it send the last block again, without a
// memory read. The line is only ever pulled low (open collector).
// The stream format and the retransmission rule follow the original IP; the
// identification byte, parity sense and bit order are this design's choices.
module sram_interface
  import cache_pkg::*;
#(
  parameter int unsigned NBYTES = cache_pkg::N_BYTEXBLOCK,
  parameter int unsigned RD_CYC = cache_pkg::ALPHA,
  parameter int unsigned MEM_AW = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              sample_neg,
  input  logic              sdata_in,
  output logic              sdata_drive_low,
  output logic              mem_re,
  output logic [MEM_AW-1:0] mem_addr,
  input  logic [7:0]        mem_rdata,
  output logic              id_sent
);
  localparam int unsigned OFF_W   = $clog2(NBYTES);
  localparam int unsigned BADDR_W = CPU_ADDR_W - OFF_W;
  localparam int unsigned RX_BITS = 1 + BADDR_W + 1;     // ok, address, parity
  localparam int unsigned TX_BITS = 2 + 8*NBYTES + 1;
  localparam int unsigned ID_BITS = 2 + 8 + 1;
  localparam int unsigned RD_LEN  = RD_CYC * NBYTES;
  localparam int unsigned CNT_W   = $clog2(TX_BITS + RD_LEN + 1);

  typedef enum logic [2:0] {
    S_OFF, S_WAIT_LOW, S_WAIT_HIGH, S_ID_TX, S_IDLE, S_RX, S_READ, S_TX
  } state_t;
  // S_NACK is folded into S_TX with a two-bit stream (see nack)

  state_t               state;
  logic [CNT_W-1:0]     cnt;
  logic [RX_BITS-1:0]   rx_sr;
  logic [BADDR_W-1:0]   blk_addr;
  logic [7:0]           buf_q [NBYTES];
  logic                 nack;           // current S_TX is a '0','0' reply
  logic                 rd_pend;
  logic [OFF_W-1:0]     rd_pend_idx;
  logic                 rx_bit;

  sdata_sampler u_samp (.clk, .sample_neg, .line(sdata_in), .bit_out(rx_bit));

  // memory reads: one byte every RD_CYC cycles of S_READ
  logic [OFF_W-1:0] rd_idx;
  assign rd_idx   = OFF_W'(int'(cnt) / RD_CYC);
  assign mem_re   = (state == S_READ) && ((int'(cnt) % RD_CYC) == 0);
  assign mem_addr = MEM_AW'({blk_addr, rd_idx});

  // serial data of the block, byte 0 first, MSB first
  logic [8*NBYTES-1:0] tx_data;
  always_comb
    for (int k = 0; k < NBYTES; k++)
      tx_data[(NBYTES-1-k)*8 +: 8] = buf_q[k];

  always_comb begin
    sdata_drive_low = 1'b0;
    case (state)
      S_ID_TX: begin
        if (cnt == 0)       sdata_drive_low = 1'b1;
        else if (cnt == 1)  sdata_drive_low = 1'b0;
        else if (cnt < 10)  sdata_drive_low = ~CACHE_ID[7 - (int'(cnt) - 2)];
        else                sdata_drive_low = ~(^CACHE_ID);
      end
      S_TX: begin
        if (cnt == 0)       sdata_drive_low = 1'b1;          // start
        else if (cnt == 1)  sdata_drive_low = nack;          // ok / fault
        else if (cnt < CNT_W'(TX_BITS-1))
          sdata_drive_low = ~tx_data[8*NBYTES-1 - (int'(cnt) - 2)];
        else                sdata_drive_low = ~(^tx_data);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_OFF;
      cnt         <= '0;
      rx_sr       <= '0;
      blk_addr    <= '0;
      nack        <= 1'b0;
      rd_pend     <= 1'b0;
      rd_pend_idx <= '0;
      id_sent     <= 1'b0;
      for (int k = 0; k < NBYTES; k++) buf_q[k] <= '0;
    end else begin
      // capture read data one cycle after the request
      rd_pend     <= mem_re;
      rd_pend_idx <= rd_idx;
      if (rd_pend) buf_q[rd_pend_idx] <= mem_rdata;

      case (state)
        S_OFF:       if (enable) state <= S_WAIT_LOW;
        S_WAIT_LOW:  if (!rx_bit) state <= S_WAIT_HIGH;
        S_WAIT_HIGH: if (rx_bit) begin state <= S_ID_TX; cnt <= '0; end
        S_ID_TX: begin
          if (cnt == CNT_W'(ID_BITS-1)) begin
            state   <= S_IDLE;
            id_sent <= 1'b1;
            cnt     <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_IDLE: if (!rx_bit) begin state <= S_RX; cnt <= '0; end
        S_RX: begin
          rx_sr <= {rx_sr[RX_BITS-2:0], rx_bit};
          if (cnt == 0 && !rx_bit) begin
            // master reports a bad data stream: send the block again
            state <= S_TX;
            nack  <= 1'b0;
            cnt   <= '0;
          end else if (cnt == CNT_W'(RX_BITS-1)) begin
            cnt <= '0;
            if ((^rx_sr[BADDR_W-1:0]) == rx_bit) begin
              blk_addr <= rx_sr[BADDR_W-1:0];
              state    <= S_READ;
            end else begin
              nack  <= 1'b1;
              state <= S_TX;
            end
          end else cnt <= cnt + 1'b1;
        end
        S_READ: begin
          if (cnt == CNT_W'(RD_LEN-1)) begin
            state <= S_TX;
            nack  <= 1'b0;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_TX: begin
          if ((nack && cnt == 1) || cnt == CNT_W'(TX_BITS-1)) begin
            state <= S_IDLE;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_OFF;
      endcase
    end
  end
endmodule
