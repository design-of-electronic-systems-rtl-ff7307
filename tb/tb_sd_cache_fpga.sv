// tb_sd_cache_fpga: checks the FPGA side of the cache link. The testbench
// plays the FPGA's boot CPU: it downloads a random program into the 32 KB
// memory through the download port, reads part of it back, selects
// falling-edge sampling through the polarity SFR and writes end_download.
// It then checks that the ASIC reset is released, the UART is routed to the
// ASIC and the boot CPU is frozen with its clock stopped. An sd_8051_cache is
// connected to the link as the ASIC: it must detect the FPGA (identification
// stream) and return the downloaded bytes for random code fetches, with the
// 2-cycle hit and 96-cycle miss seen by the CPU.
module tb_sd_cache_fpga;
  localparam int MEMB = 32768;
  logic clk = 0, cpu_clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always #7 cpu_clk = ~cpu_clk;

  logic        dl_we = 0, dl_re = 0, sfr_we = 0, sfr_addr = 0;
  logic [14:0] dl_addr = '0;
  logic [7:0]  dl_wdata = '0, dl_rdata, sfr_wdata = '0;
  logic polarity, end_download, cpu_gclk, boot_freeze, asic_resetn, uart_from_asic;
  logic fpga_drv, id_sent, cache_drv, line;
  logic [15:0] addr = '0;
  logic        cs_n = 1'b1;
  logic [7:0]  data;
  logic        frz, gclk, active, sclk;
  logic [7:0]  code [MEMB];
  int checks = 0, failures = 0;

  sd_cache_fpga dut (
    .clk, .rst_n, .dl_we, .dl_re, .dl_addr, .dl_wdata, .dl_rdata,
    .sfr_we, .sfr_addr, .sfr_wdata, .polarity, .end_download,
    .cpu_clk, .cpu_gclk, .cpu_freeze(boot_freeze), .asic_resetn, .uart_from_asic,
    .sdata_in(line), .sdata_drive_low(fpga_drv), .id_sent);

  sd_8051_cache asic (
    .clk, .rst_n(rst_n & asic_resetn), .cpu_addr(addr), .cpu_cs_n(cs_n),
    .cpu_we(1'b0), .cpu_wdata(8'h00), .cpu_data(data), .cpu_freeze(frz),
    .cpu_gclk(gclk), .sample_neg(polarity), .active, .sclk,
    .sdata_in(line), .sdata_drive_low(cache_drv));

  assign line = ~(fpga_drv | cache_drv);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // boot CPU clock must stay still once frozen
  int boot_ticks = 0;
  always @(posedge cpu_gclk) boot_ticks++;

  task automatic fetch(input logic [15:0] a, output logic [7:0] d, output int cyc);
    addr <= a; cs_n <= 1'b0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (frz === 1'b1);
    d = data;   // cs_n stays low: back-to-back fetches, as a running CPU does
  endtask

  initial begin
    logic [7:0] d;
    int c, t0, misses, hits;
    logic [15:0] base;
    for (int i = 0; i < MEMB; i++) code[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    check(asic_resetn === 1'b0 && boot_freeze === 1'b0 && uart_from_asic === 1'b0,
          "ASIC held in reset during download");
    check(line === 1'b0, "ASIC in reset holds the data line low");
    // download
    for (int i = 0; i < MEMB; i++) begin
      dl_we <= 1'b1; dl_addr <= 15'(i); dl_wdata <= code[i];
      @(posedge clk);
    end
    dl_we <= 1'b0;
    // read back a sample
    for (int i = 0; i < 64; i++) begin
      int a;
      a = $urandom_range(0, MEMB - 1);
      dl_re <= 1'b1; dl_addr <= 15'(a);
      @(posedge clk);
      dl_re <= 1'b0;
      @(negedge clk);
      check(dl_rdata == code[a], $sformatf("download read-back at %h", a));
      @(posedge clk);
    end
    // polarity, then end of download
    sfr_we <= 1'b1; sfr_addr <= 1'b0; sfr_wdata <= 8'h01;
    @(posedge clk);
    sfr_addr <= 1'b1;
    @(posedge clk);
    sfr_we <= 1'b0;
    @(posedge clk);
    check(polarity === 1'b1, "polarity SFR");
    check(end_download === 1'b1 && asic_resetn === 1'b1, "ASIC reset released");
    check(uart_from_asic === 1'b1, "UART routed to the ASIC");
    check(boot_freeze === 1'b1, "boot CPU frozen");
    repeat (2) @(posedge cpu_clk);
    t0 = boot_ticks;
    repeat (300) @(posedge clk);
    check(boot_ticks == t0, "boot CPU clock stopped");
    check(id_sent === 1'b1, "identification stream sent");
    check(active === 1'b1, "ASIC cache detected the FPGA");
    check(sclk === clk, "serial clock follows the system clock");
    // random fetches
    misses = 0; hits = 0;
    for (int i = 0; i < 200; i++) begin
      logic [15:0] a;
      if (i % 3 == 0) base = {1'b0, 15'($urandom)};   // new block, else same block
      a = {base[15:3], 3'($urandom)};
      fetch(a, d, c);
      check(d == code[a[14:0]], $sformatf("fetch %h = %h, expected %h", a, d, code[a[14:0]]));
      check(c == 2 || c == 96, $sformatf("fetch %h took %0d cycles", a, c));
      if (c == 96) misses++; else hits++;
    end
    cs_n <= 1'b1;
    @(posedge clk);
    check(misses > 10 && hits > 10, $sformatf("mix of hits (%0d) and misses (%0d)", hits, misses));
    // SFR writes are ignored after the download
    sfr_we <= 1'b1; sfr_addr <= 1'b1; sfr_wdata <= 8'h00;
    @(posedge clk);
    sfr_we <= 1'b0;
    @(posedge clk);
    check(asic_resetn === 1'b1, "end_download is sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
