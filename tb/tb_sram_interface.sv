// tb_sram_interface: checks the serial slave against a behavioural master.
// The master holds the line low (ASIC in reset), releases it and expects the
// identification stream; it then requests blocks and checks the returned
// bytes against the memory model, the gap of N*ALPHA cycles between the
// address parity bit and the answer, the '0','0' reply to a bad address
// parity and the retransmission after the master reports a bad data stream.
module tb_sram_interface;
  localparam int NB = 8, BADDR_W = 13, ALPHA = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable = 0, mdrv = 0, sdrv, line, mem_re, id_sent;
  logic [14:0] mem_addr;
  logic [7:0]  mem_rdata;
  logic [7:0]  mem [32768];
  int checks = 0, failures = 0;

  sram_interface #(.NBYTES(NB), .RD_CYC(ALPHA), .MEM_AW(15)) dut (
    .clk, .rst_n, .enable, .sample_neg(1'b0), .sdata_in(line),
    .sdata_drive_low(sdrv), .mem_re, .mem_addr, .mem_rdata, .id_sent);

  assign line = ~(mdrv | sdrv);
  always @(posedge clk) if (mem_re) mem_rdata <= mem[mem_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic b);
    mdrv <= ~b;
    @(posedge clk);
  endtask

  // send '0', ok, address, parity (parity optionally spoiled)
  task automatic request(input logic ok, input logic [BADDR_W-1:0] a, input logic bad);
    send(1'b0); send(ok);
    for (int i = BADDR_W - 1; i >= 0; i--) send(a[i]);
    send((^a) ^ bad);
    mdrv <= 1'b0;
  endtask

  // wait for a start bit, return the cycles waited and the bits that follow
  task automatic receive(input int nbits, output logic [71:0] bits, output int wait_cyc);
    wait_cyc = 0;
    do begin @(posedge clk); wait_cyc++; end while (line !== 1'b0);
    bits = '0;
    for (int i = 0; i < nbits; i++) begin
      @(posedge clk);
      bits = {bits[70:0], line};
    end
  endtask

  task automatic check_block(input logic [BADDR_W-1:0] a, input logic [71:0] bits,
                             input string what);
    check(bits[65] == 1'b1, {what, ": ok bit"});
    for (int k = 0; k < NB; k++)
      check(bits[1 + (NB-1-k)*8 +: 8] == mem[{a, 3'(k)} % 32768],
            $sformatf("%s: byte %0d", what, k));
    check((^bits[64:1]) == bits[0], {what, ": parity"});
  endtask

  initial begin
    logic [71:0] bits;
    int w;
    for (int i = 0; i < 32768; i++) mem[i] = 8'($urandom);
    mdrv = 1'b1;                 // ASIC in reset holds the line low
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    check(line === 1'b0 && sdrv === 1'b0, "slave silent before enable");
    enable <= 1;
    repeat (10) @(posedge clk);
    check(!id_sent, "no ID while the line is held low");
    mdrv <= 1'b0;                // released after flush / BIST
    receive(10, bits, w);
    check(bits[9] == 1'b1 && bits[8:1] == 8'hA5 && bits[0] == ^bits[8:1],
          $sformatf("identification stream %b", bits[9:0]));
    repeat (3) @(posedge clk);
    check(id_sent, "id_sent flag");

    for (int r = 0; r < 20; r++) begin
      logic [BADDR_W-1:0] a;
      a = BADDR_W'($urandom);
      request(1'b1, a, 1'b0);
      receive(66, bits, w);
      check(w == NB * ALPHA + 1, $sformatf("answer after %0d cycles, expected %0d", w, NB * ALPHA + 1));
      check_block(a, bits, $sformatf("block %h", a));
      repeat ($urandom_range(0, 4)) @(posedge clk);
    end

    // bad address parity: '0','0' then silence
    request(1'b1, 13'h0123, 1'b1);
    receive(1, bits, w);
    check(bits[0] == 1'b0, "NACK on bad address parity");
    @(posedge clk);
    check(line === 1'b1, "line released after NACK");
    request(1'b1, 13'h0123, 1'b0);
    receive(66, bits, w);
    check_block(13'h0123, bits, "after address retry");

    // master reports a bad data stream: the same block comes again
    send(1'b0); send(1'b0);
    mdrv <= 1'b0;
    receive(66, bits, w);
    check(w == 1, $sformatf("retransmission starts after %0d cycles", w));
    check_block(13'h0123, bits, "retransmitted block");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
