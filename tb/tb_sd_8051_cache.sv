// tb_sd_8051_cache: self-checking test of the 8051 code cache.
// Three caches run side by side: a 2-way cache and a direct-mapped one, each
// talking to a behavioural off-chip slave, and a cache with nothing on its
// data line, which must fall back to memory mode. A CPU model fetches code
// bytes and compares them with code_byte(), the formula the slave serves. It
// checks the hit time (2 cycles), the miss time (95 cycles from detection to
// delivery with 8-byte blocks), the 2-way replacement order, direct-mapped
// conflicts, recovery from a spoiled address and a spoiled data stream, and
// memory-mode writes and reads.
module tb_sd_8051_cache;
  localparam int NC = 3;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] addr  [NC];
  logic        cs_n  [NC];
  logic        we    [NC];
  logic [7:0]  wdata [NC];
  logic [7:0]  data  [NC];
  logic        frz   [NC];
  logic        gclk  [NC];
  logic        act   [NC];
  logic        sclk_u[NC];
  logic        mdrv  [NC];
  logic        sdrv  [NC];
  logic        line  [NC];
  logic        corrupt_addr, corrupt_data;
  int          req   [NC];
  int          rtx   [NC];

  int checks = 0, failures = 0;

  function automatic logic [7:0] code_byte(input logic [15:0] a);
    return a[7:0] ^ {a[14:8], a[15]} ^ 8'h3C;
  endfunction

  sd_8051_cache #(.ASSOC(2)) dut0 (
    .clk, .rst_n, .cpu_addr(addr[0]), .cpu_cs_n(cs_n[0]), .cpu_we(we[0]),
    .cpu_wdata(wdata[0]), .cpu_data(data[0]), .cpu_freeze(frz[0]),
    .cpu_gclk(gclk[0]), .sample_neg(1'b0), .active(act[0]), .sclk(sclk_u[0]),
    .sdata_in(line[0]), .sdata_drive_low(mdrv[0]));
  sd_8051_cache #(.ASSOC(1)) dut1 (
    .clk, .rst_n, .cpu_addr(addr[1]), .cpu_cs_n(cs_n[1]), .cpu_we(we[1]),
    .cpu_wdata(wdata[1]), .cpu_data(data[1]), .cpu_freeze(frz[1]),
    .cpu_gclk(gclk[1]), .sample_neg(1'b1), .active(act[1]), .sclk(sclk_u[1]),
    .sdata_in(line[1]), .sdata_drive_low(mdrv[1]));
  sd_8051_cache #(.ASSOC(2)) dut2 (
    .clk, .rst_n, .cpu_addr(addr[2]), .cpu_cs_n(cs_n[2]), .cpu_we(we[2]),
    .cpu_wdata(wdata[2]), .cpu_data(data[2]), .cpu_freeze(frz[2]),
    .cpu_gclk(gclk[2]), .sample_neg(1'b0), .active(act[2]), .sclk(sclk_u[2]),
    .sdata_in(line[2]), .sdata_drive_low(mdrv[2]));

  cache_slave_model sl0 (.clk, .line(line[0]), .drive_low(sdrv[0]),
    .corrupt_addr, .corrupt_data, .requests(req[0]), .retransmissions(rtx[0]));
  cache_slave_model sl1 (.clk, .line(line[1]), .drive_low(sdrv[1]),
    .corrupt_addr(1'b0), .corrupt_data(1'b0), .requests(req[1]),
    .retransmissions(rtx[1]));
  assign sdrv[2] = 1'b0;

  // open-collector line with pull-up
  for (genvar i = 0; i < NC; i++) begin : g_line
    assign line[i] = ~(mdrv[i] | sdrv[i]);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one CPU access; returns the byte and the number of cycles it took
  task automatic fetch(input int s, input logic [15:0] a, output logic [7:0] d,
                       output int cyc);
    addr[s] <= a; cs_n[s] <= 1'b0; we[s] <= 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
    end while (frz[s] === 1'b1);
    d = data[s];
    cs_n[s] <= 1'b1;
  endtask

  task automatic store(input int s, input logic [15:0] a, input logic [7:0] v);
    addr[s] <= a; cs_n[s] <= 1'b0; we[s] <= 1'b1; wdata[s] <= v;
    do @(posedge clk); while (frz[s] === 1'b1);
    cs_n[s] <= 1'b1; we[s] <= 1'b0;
  endtask

  task automatic expect_fetch(input int s, input logic [15:0] a, input int exp_cyc,
                              input string what);
    logic [7:0] d;
    int c;
    fetch(s, a, d, c);
    check(d == code_byte(a), $sformatf("%s: data at %h = %h, expected %h", what, a, d, code_byte(a)));
    if (exp_cyc > 0)
      check(c == exp_cyc, $sformatf("%s: access to %h took %0d cycles, expected %0d", what, a, c, exp_cyc));
  endtask

  // freeze must be low whenever the gated CPU clock ticks
  int gclk_ticks = 0;
  always @(posedge gclk[0]) begin
    gclk_ticks++;
    if (frz[0]) begin
      failures++;
      $display("FAIL: CPU clock ticked while frozen");
    end
  end

  localparam int HIT = 2, MISS = 1 + 95;   // cycles seen by the CPU

  initial begin
    logic [7:0] d;
    int c, hits, misses;
    for (int i = 0; i < NC; i++) begin
      addr[i] = '0; cs_n[i] = 1'b1; we[i] = 1'b0; wdata[i] = '0;
    end
    corrupt_addr = 1'b0; corrupt_data = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (200) @(posedge clk);
    check(act[0] === 1'b1, "2-way cache did not detect the slave");
    check(act[1] === 1'b1, "direct-mapped cache did not detect the slave");
    check(act[2] === 1'b0, "cache without slave is not in memory mode");

    // ---- 2-way: first block, then hits inside it ----
    expect_fetch(0, 16'h0000, MISS, "cold miss");
    for (int a = 1; a < 8; a++) expect_fetch(0, 16'(a), HIT, "hit in block");
    // same index, other tags: both ways are used, LRU replacement
    expect_fetch(0, 16'h0200, MISS, "second way fill");
    expect_fetch(0, 16'h0003, HIT,  "first way kept");
    expect_fetch(0, 16'h0204, HIT,  "second way kept");
    expect_fetch(0, 16'h0001, HIT,  "touch first way");
    expect_fetch(0, 16'h0400, MISS, "third tag replaces LRU way");
    expect_fetch(0, 16'h0002, HIT,  "MRU way survived");
    expect_fetch(0, 16'h0201, MISS, "LRU way was replaced");
    check(req[0] == 4, $sformatf("slave saw %0d requests, expected 4", req[0]));

    // ---- corrupted exchanges ----
    corrupt_addr = 1'b1;
    expect_fetch(0, 16'h1238, 0, "after address NACK");
    corrupt_data = 1'b1;
    fetch(0, 16'h2470, d, c);
    check(d == code_byte(16'h2470), "data after data-parity retransmission");
    check(c > MISS, $sformatf("retransmitted miss took %0d cycles", c));
    check(rtx[0] == 1, $sformatf("slave retransmitted %0d times, expected 1", rtx[0]));

    // ---- random program fetches ----
    hits = 0; misses = 0;
    for (int i = 0; i < 300; i++) begin
      logic [15:0] a;
      a = 16'($urandom_range(0, 2047));
      fetch(0, a, d, c);
      check(d == code_byte(a), $sformatf("random fetch %h", a));
      if (c == HIT) hits++;
      else if (c == MISS) misses++;
      else check(0, $sformatf("odd access time %0d", c));
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(posedge clk);
    end
    check(hits > 0 && misses > 0, "random run saw both hits and misses");

    // ---- direct mapped: conflicting blocks evict each other ----
    expect_fetch(1, 16'h0000, MISS, "DM cold miss");
    expect_fetch(1, 16'h0005, HIT,  "DM hit");
    expect_fetch(1, 16'h0400, MISS, "DM conflict miss");
    expect_fetch(1, 16'h0000, MISS, "DM evicted block");
    expect_fetch(1, 16'h0208, MISS, "DM other index");
    expect_fetch(1, 16'h0007, HIT,  "DM different index kept");

    // ---- memory mode ----
    for (int i = 0; i < 64; i++) store(2, 16'(i * 17), 8'(i * 5 + 1));
    for (int i = 0; i < 64; i++) begin
      fetch(2, 16'(i * 17), d, c);
      check(d == 8'(i * 5 + 1), $sformatf("memory mode read %0d: %h", i, d));
      check(c == HIT, "memory mode access time");
    end
    check(gclk_ticks > 0, "gated CPU clock never ticked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
