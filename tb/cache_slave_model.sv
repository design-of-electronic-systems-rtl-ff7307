// cache_slave_model: behavioural model of the off-chip end of the 2-wire
// cache protocol, used to test the cache on its own. It answers the start-up
// handshake with the identification stream and every block request with the
// bytes given by code_byte(), the same formula the testbench checks against.
// corrupt_addr / corrupt_data each spoil one exchange (a reply '0','0' to a
// good address, or a wrong parity bit on the data) to exercise the
// retransmission rule.
module cache_slave_model #(
  parameter int unsigned NBYTES = 8,
  parameter int unsigned ALPHA  = 1,
  parameter logic [7:0]  ID     = 8'hA5
) (
  input  logic clk,
  input  logic line,
  output logic drive_low,
  input  logic corrupt_addr,
  input  logic corrupt_data,
  output int   requests,
  output int   retransmissions
);
  localparam int unsigned OFF_W   = $clog2(NBYTES);
  localparam int unsigned BADDR_W = 16 - OFF_W;

  function automatic logic [7:0] code_byte(input logic [15:0] a);
    return a[7:0] ^ {a[14:8], a[15]} ^ 8'h3C;
  endfunction

  logic [8*NBYTES-1:0] last_blk;
  logic                spoil_addr_done, spoil_data_done;

  task automatic send_bit(input logic b);
    drive_low <= ~b;
    @(posedge clk);
  endtask

  task automatic send_data(input logic bad_par);
    send_bit(1'b0);
    send_bit(1'b1);
    for (int i = 8*NBYTES-1; i >= 0; i--) send_bit(last_blk[i]);
    send_bit((^last_blk) ^ bad_par);
    drive_low <= 1'b0;
  endtask

  initial begin
    logic [BADDR_W+1:0] rx;   // ok, address, parity
    logic [7:0] idb;
    drive_low = 1'b0;
    requests = 0;
    retransmissions = 0;
    spoil_addr_done = 1'b0;
    spoil_data_done = 1'b0;
    idb = ID;
    // wait for the cache to hold the line low, then to release it
    do @(posedge clk); while (line !== 1'b0);
    do @(posedge clk); while (line !== 1'b1);
    send_bit(1'b0); send_bit(1'b1);
    for (int i = 7; i >= 0; i--) send_bit(idb[i]);
    send_bit(^idb);
    drive_low <= 1'b0;
    forever begin
      do @(posedge clk); while (line !== 1'b0);        // start bit
      @(posedge clk);
      rx[BADDR_W+1] = line;
      if (rx[BADDR_W+1] == 1'b0) begin
        // the cache rejected the last block: repeat it
        retransmissions++;
        send_data(1'b0);
        continue;
      end
      for (int i = BADDR_W; i >= 0; i--) begin
        @(posedge clk);
        rx[i] = line;
      end
      if ((^rx[BADDR_W:1]) != rx[0] ||
                   (corrupt_addr && !spoil_addr_done)) begin
        spoil_addr_done = 1'b1;
        send_bit(1'b0); send_bit(1'b0);
        drive_low <= 1'b0;
      end else begin
        requests++;
        for (int k = 0; k < NBYTES; k++)
          last_blk[(NBYTES-1-k)*8 +: 8] = code_byte({rx[BADDR_W:1], OFF_W'(k)});
        repeat (ALPHA*NBYTES) @(posedge clk);
        if (corrupt_data && !spoil_data_done) begin
          spoil_data_done = 1'b1;
          send_data(1'b1);
        end else send_data(1'b0);
      end
    end
  end
endmodule
