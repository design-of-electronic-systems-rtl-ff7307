// tb_gyro_platform_top: end-to-end test of the platform top at its default
// (full) size. It plays the FPGA boot CPU, the 8051 code bus, the APB
// master, the DSP probe sources, the external probe SRAM, six test waves and
// the JTAG-like host, and runs one scenario through every mechanism:
//   1. download of a random 32 KB program while the ASIC is held in reset;
//   2. end_download: ASIC reset released, boot CPU frozen, identification
//      stream received by the cache (cache mode);
//   3. code fetches: data checked against the program, 2-cycle hits and
//      96-cycle misses counted;
//   4. a bit of a returned block and a bit of a block request corrupted on
//      the shared line: the parity fault is reported and the stream resent,
//      the CPU still gets the right byte;
//   5. APB test words and a probe session (8 words at 0x0C) stored in the
//      SRAM and read back oldest first;
//   6. period, high-time and low-time measures and a counter overflow
//      through the JTAG-like chain;
//   7. writes to the clustered clock-gated register bank;
//   8. PC increments with the unused adders isolated;
//   9. the ISIF sine generator (period and phase offset);
//  10. the ISIF demodulator fed from the generator (in-phase and quadrature).
// Each mechanism is counted, the counts are printed and every count must be
// non-zero. Memory mode (no FPGA answering) cannot occur in this assembly
// and is covered by the cache's own testbench.
module tb_gyro_platform_top;
  import sramc_pkg::*;
  import freqm_pkg::*;
  localparam int MEMB = 32768, NW = 6, PWID = 16, CH_W = 3, CW = CH_W + 2 + PWID + 1;

  logic clk = 1'b0, boot_clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  always #7 boot_clk = ~boot_clk;

  // ---- DUT signals ----
  logic [15:0] cpu_addr;
  logic        cpu_cs_n, cpu_we;
  logic [7:0]  cpu_wdata, cpu_data;
  logic        cpu_freeze, cpu_gclk, cache_active, line_disturb, sdata_line, sclk;
  logic        dl_we, dl_re, sfr_we, sfr_addr;
  logic [14:0] dl_addr;
  logic [7:0]  dl_wdata, dl_rdata, sfr_wdata;
  logic        boot_gclk, boot_freeze, asic_resetn, uart_from_asic, id_sent;
  logic        psel, penable, pwrite;
  logic [APB_AW-1:0] paddr;
  logic [15:0] pwdata, prdata;
  logic [PW-1:0]     probe [NPROBE];
  logic [NPROBE-1:0] probe_dv;
  logic [SRAM_AW-1:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic        sram_dq_oe, sram_ce_n, sram_we_n, sram_oe_n, probing;
  logic [NW-1:0] wave_in;
  logic        tck, tms, tdi, tdo;
  logic        reg_wr;
  logic [5:0]  reg_waddr, reg_raddr;
  logic [7:0]  reg_wdata, reg_rdata;
  logic [13:0] reg_gclk_active;
  logic [15:0] pc;
  logic [2:0]  pc_use_inc;
  logic [15:0] pc_inc [3];
  logic        nco_en;
  logic [23:0] nco_fcw [3];
  logic [1:0]  nco_fsel [16];
  logic [9:0]  nco_phase [16];
  logic signed [11:0] nco_wave [16];
  logic        dem_valid, dem_out_valid;
  logic signed [15:0] dem_din [4];
  logic [3:0]  dem_shift;
  logic signed [27:0] dem_mix [4], dem_out [4];

  gyro_platform_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_download = 0, n_id = 0, n_hit = 0, n_miss = 0, n_resend_data = 0,
      n_resend_addr = 0, n_test_words = 0, n_probe_words = 0, n_readback = 0,
      n_freq = 0, n_overflow = 0, n_reg_writes = 0, n_isolated = 0, n_nco_turns = 0, n_demod = 0;

  // ---- program image ----
  logic [7:0] code [MEMB];

  // ---- external probe SRAM ----
  logic [15:0] sram [1 << SRAM_AW];
  int sram_writes = 0;
  logic we_d = 1'b1;
  always @(posedge clk) begin
    if (!sram_ce_n && !sram_we_n && sram_dq_oe) sram[sram_addr] <= sram_dq_o;
    we_d <= sram_we_n;
    if (we_d && !sram_we_n) sram_writes++;
  end
  assign sram_dq_i = (!sram_ce_n && !sram_oe_n) ? sram[sram_addr] : 16'h0000;

  // ---- probe sources: probe i = {i, time} ----
  logic [11:0] tick = '0;
  always @(posedge clk) tick <= tick + 1'b1;
  always_comb
    for (int i = 0; i < NPROBE; i++) begin
      probe[i]    = {4'(i), tick};
      probe_dv[i] = 1'b1;
    end

  // ---- test waves: period P, high for H clk cycles ----
  int P [NW] = '{100, 37, 250, 64, 12, 70000};
  int H [NW] = '{30, 20, 125, 1, 6, 35000};
  int phase [NW] = '{0, 0, 0, 0, 0, 0};
  always @(posedge clk)
    for (int i = 0; i < NW; i++) begin
      phase[i]   <= (phase[i] + 1) % P[i];
      wave_in[i] <= ((phase[i] + 1) % P[i]) < H[i];
    end

  // ---- CPU code bus: cs_n stays low, back-to-back fetches ----
  task automatic fetch(input logic [15:0] a, output logic [7:0] d, output int cyc);
    cpu_addr <= a; cpu_cs_n <= 1'b0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (cpu_freeze === 1'b1);
    d = cpu_data;
  endtask

  task automatic fetch_check(input logic [15:0] a, output int cyc);
    logic [7:0] d;
    fetch(a, d, cyc);
    check(d == code[a[14:0]], $sformatf("fetch %h = %h, expected %h", a, d, code[a[14:0]]));
    if (cyc == 2) n_hit++;
    else if (cyc == 96) n_miss++;
  endtask

  // ---- APB master ----
  task automatic apb_wr(input logic [APB_AW-1:0] a, input logic [15:0] d);
    psel <= 1; penable <= 0; pwrite <= 1; paddr <= a; pwdata <= d;
    @(posedge clk); penable <= 1;
    @(posedge clk); psel <= 0; penable <= 0; pwrite <= 0;
    repeat (7) @(posedge clk);     // at least one SRAM write cycle apart
  endtask
  task automatic apb_rd(input logic [APB_AW-1:0] a, output logic [15:0] d);
    psel <= 1; penable <= 0; pwrite <= 0; paddr <= a;
    @(posedge clk); penable <= 1;
    @(posedge clk); d = prdata; psel <= 0; penable <= 0;
    @(posedge clk);
  endtask
  task automatic wait_flag(input int f, input logic v);
    logic [15:0] s;
    int n = 0;
    do begin apb_rd(A_STATUS, s); n++; end while (s[f] !== v && n < 5000);
    check(s[f] === v, $sformatf("STATUS bit %0d never became %0b", f, v));
  endtask

  // ---- JTAG-like host ----
  task automatic jaccess(input logic [CH_W-1:0] ch, input cmd_e c, output logic [CW-1:0] got);
    logic [CW-1:0] word;
    word = {ch, c, PWID'(0), 1'b0};
    for (int i = 0; i < CW; i++) begin
      got[i] = tdo;
      tdi = word[i]; tms = 0;
      #17 tck = 1; #17 tck = 0;
    end
    tms = 1;
    #17 tck = 1; #17 tck = 0;
    tms = 0;
  endtask

  function automatic int expected(input int ch, input cmd_e c);
    case (c)
      CMD_FP: return P[ch];
      CMD_HP: return H[ch];
      CMD_LP: return P[ch] - H[ch];
      default: return 0;
    endcase
  endfunction

  // corrupt one '1' bit on the line while the cache is in state st
  task automatic disturb_in(input logic [3:0] st, input int after);
    wait (dut.u_cache.state == st);
    repeat (after) @(negedge clk);
    while (sdata_line !== 1'b1) @(negedge clk);
    line_disturb = 1'b1;
    @(negedge clk);
    line_disturb = 1'b0;
  endtask

  localparam cmd_e CMDS [3] = '{CMD_FP, CMD_HP, CMD_LP};

  initial begin
    logic [7:0]  d8;
    logic [15:0] d, s, base;
    logic [CW-1:0] r;
    int c, t0, nbytes;
    logic [7:0] rmodel [41];

    cpu_addr = '0; cpu_cs_n = 1'b1; cpu_we = 1'b0; cpu_wdata = '0; line_disturb = 1'b0;
    dl_we = 0; dl_re = 0; dl_addr = '0; dl_wdata = '0; sfr_we = 0; sfr_addr = 0; sfr_wdata = '0;
    psel = 0; penable = 0; pwrite = 0; paddr = '0; pwdata = '0;
    tck = 0; tms = 0; tdi = 0;
    pc = '0; pc_use_inc = '0;
    nco_en = 1'b0;
    nco_fcw[0] = 24'h040000; nco_fcw[1] = 24'h010000; nco_fcw[2] = 24'h004000;
    for (int k = 0; k < 16; k++) begin nco_fsel[k] = 2'(k % 3); nco_phase[k] = 10'(k * 256); end
    dem_valid = 0; dem_shift = 4'd7;
    for (int k = 0; k < 4; k++) dem_din[k] = '0;
    reg_wr = 0; reg_waddr = '0; reg_raddr = '0; reg_wdata = '0;
    for (int i = 0; i < MEMB; i++) code[i] = 8'($urandom);
    for (int i = 0; i < (1 << SRAM_AW); i++) sram[i] = 16'hDEAD;
    for (int i = 0; i < 41; i++) rmodel[i] = '0;

    #1 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);

    // ---- 1. download ----
    check(asic_resetn === 1'b0 && sdata_line === 1'b0, "ASIC held in reset, line low");
    for (int i = 0; i < MEMB; i++) begin
      dl_we <= 1'b1; dl_addr <= 15'(i); dl_wdata <= code[i];
      @(posedge clk);
      n_download++;
    end
    dl_we <= 1'b0;
    @(posedge clk);

    // ---- 2. end of download, start-up of the link ----
    sfr_we <= 1'b1; sfr_addr <= 1'b1; sfr_wdata <= 8'h01;
    @(posedge clk);
    sfr_we <= 1'b0;
    @(posedge clk);
    check(asic_resetn && boot_freeze && uart_from_asic, "end_download releases the ASIC");
    repeat (2) @(posedge boot_clk);
    t0 = 0;
    fork
      begin repeat (200) @(posedge boot_gclk) t0++; end
      repeat (300) @(posedge clk);
    join_any
    disable fork;
    check(t0 == 0, "boot CPU clock stopped");
    check(id_sent && cache_active, "identification received, cache mode");
    if (id_sent && cache_active) n_id++;

    // ---- 3. code fetches ----
    for (int i = 0; i < 240; i++) begin
      if (i % 4 == 0) base = {1'b0, 15'($urandom)};
      fetch_check({base[15:3], 3'($urandom)}, c);
      check(c == 2 || c == 96, $sformatf("fetch took %0d cycles", c));
    end
    // a loop that fits the cache: misses only on the first pass
    for (int pass = 0; pass < 3; pass++)
      for (int a = 16'h0200; a < 16'h0240; a++) begin
        fetch_check(16'(a), c);
        if (pass > 0) check(c == 2, $sformatf("loop pass %0d at %h: %0d cycles", pass, a, c));
      end

    // ---- 4. parity faults on the shared line ----
    fork
      fetch_check(16'h7F10, c);
      disturb_in(4'(dut.u_cache.S_RX), 20);
    join
    check(c > 96, $sformatf("corrupted data stream: %0d cycles", c));
    if (c > 96) n_resend_data++;
    fork
      fetch_check(16'h5A38, c);
      disturb_in(4'(dut.u_cache.S_TX), 4);
    join
    check(c > 96, $sformatf("corrupted request: %0d cycles", c));
    if (c > 96) n_resend_addr++;
    fetch_check(16'h7F13, c);
    check(c == 2, "resent block was stored");
    cpu_cs_n <= 1'b1;
    @(posedge clk);

    // ---- 5. SRAM controller ----
    apb_wr(A_ADDR, 16'h0100);
    apb_wr(A_DATA, 16'h1234);
    apb_wr(A_DATA, 16'hBEEF);
    repeat (10) @(posedge clk);
    check(sram[16'h80] == 16'h1234 && sram[16'h81] == 16'hBEEF, "test words stored");
    if (sram[16'h80] == 16'h1234) n_test_words++;
    if (sram[16'h81] == 16'hBEEF) n_test_words++;
    apb_wr(A_ADDR, 16'h000C);
    apb_wr(A_N_SAMPLE, 16'd3);
    apb_wr(A_TIMING, 16'd0);
    apb_wr(A_PSEL, 16'd5);
    sram_writes = 0;
    apb_wr(A_STATUS, 16'(1 << C_START_PROBE));
    wait_flag(F_PM, 1'b0);
    check(sram_writes == 8, $sformatf("probe session wrote %0d words", sram_writes));
    for (int i = 6; i < 14; i++) begin
      check(sram[i][15:12] == 4'd5, $sformatf("SRAM word %0d from probe 5", i));
      if (sram[i][15:12] == 4'd5) n_probe_words++;
    end
    check(sram[5] == 16'hDEAD && sram[14] == 16'hDEAD, "session inside 0x0C..0x1A");
    apb_wr(A_STATUS, 16'(1 << C_START_READ));
    for (int i = 0; i < 8; i++) begin
      wait_flag(F_DR, 1'b1);
      apb_rd(A_DATA, d);
      check(d == sram[6 + i], $sformatf("read-back %0d = %h, expected %h", i, d, sram[6 + i]));
      if (d == sram[6 + i]) n_readback++;
    end
    apb_rd(A_STATUS, s);
    check(s[F_AMR], "all memory read");

    // ---- 6. period meter ----
    jaccess(3'd0, CMD_NOP, r);
    for (int ch = 0; ch < 3; ch++) begin
      jaccess(3'(ch), CMDS[ch], r);
      #((3 * P[ch] + 20) * 10);
      jaccess(3'(ch), CMD_NOP, r);
      jaccess(3'(ch), CMD_NOP, r);
      check(r[0] && int'(r[PWID:1]) == expected(ch, CMDS[ch]),
            $sformatf("ch%0d measure %0d dv %b, expected %0d", ch, r[PWID:1], r[0], expected(ch, CMDS[ch])));
      if (r[0] && int'(r[PWID:1]) == expected(ch, CMDS[ch])) n_freq++;
    end
    jaccess(3'd5, CMD_FP, r);
    #(3 * 70000 * 10);
    jaccess(3'd5, CMD_NOP, r);
    jaccess(3'd5, CMD_NOP, r);
    check(!r[0] && &r[PWID:1], "overflow on a 70000-cycle period");
    if (!r[0]) n_overflow++;

    // ---- 7. clustered register bank ----
    for (int n = 0; n < 60; n++) begin
      int a;
      a = $urandom_range(0, 40);
      @(negedge clk);
      reg_wr = 1'b1; reg_waddr = 6'(a); reg_wdata = 8'($urandom);
      #1;
      check(reg_gclk_active == 14'(1 << (a / 3)), $sformatf("only cluster %0d clocked", a / 3));
      @(negedge clk);
      rmodel[a] = reg_wdata;
      reg_wr = 1'b0;
      reg_raddr = 6'(a);
      #1;
      check(reg_rdata == rmodel[a], $sformatf("register %0d", a));
      if (reg_rdata == rmodel[a]) n_reg_writes++;
    end
    @(negedge clk);
    check(reg_gclk_active == '0, "no cluster clocked when idle");

    // ---- 8. operand-isolated PC incrementers ----
    for (int n = 0; n < 50; n++) begin
      pc = 16'($urandom); pc_use_inc = 3'($urandom);
      #1;
      for (int k = 0; k < 3; k++) begin
        check(pc_inc[k] == (pc_use_inc[k] ? pc + 16'(k + 1) : 16'(k + 1)), $sformatf("pc+%0d", k + 1));
        if (!pc_use_inc[k] && dut.pc_iso_operand[k] == '0) n_isolated++;
      end
    end

    // ---- 9. ISIF sine generator: outputs 1 and 13 both use frequency 1
    //         (256 clocks) with phases 256 and 13*256 mod 1024 = 256 ----
    @(negedge clk);
    nco_en = 1'b1;
    begin
      int last, cyc9;
      logic signed [11:0] prev;
      last = -1; cyc9 = 0; prev = '0;
      repeat (1024) begin
        @(negedge clk);
        cyc9++;
        if (prev < 0 && nco_wave[1] >= 0) begin
          if (last >= 0) begin
            check(cyc9 - last == 256, $sformatf("NCO period %0d, expected 256", cyc9 - last));
            n_nco_turns++;
          end
          last = cyc9;
        end
        prev = nco_wave[1];
        check(nco_wave[1] == nco_wave[13], "outputs with equal frequency and phase agree");
      end
    end

    // ---- 10. ISIF demodulator: channels 0 and 3 get 8 x output 0 (64
    //          clocks); channel 0 mixes it with itself (in phase), channel 3
    //          with output 3 (same frequency, phase 768 = -90 degrees) ----
    dem_valid = 1'b1;
    repeat (2048) begin
      dem_din[0] = 16'(nco_wave[0] * 8);
      dem_din[3] = 16'(nco_wave[0] * 8);
      @(negedge clk);
      if (dem_out_valid) begin
        n_demod++;
        check(dem_mix[0] >= 0, "in-phase product is never negative");
      end
    end
    begin
      real half;
      half = 8.0 * 2047.0 * 2047.0 / 2.0;
      check(real'(dem_out[0]) > 0.9 * half && real'(dem_out[0]) < 1.1 * half,
            $sformatf("in-phase output %0d, expected about %0.0f", dem_out[0], half));
      check(real'(dem_out[3]) > -0.1 * half && real'(dem_out[3]) < 0.1 * half,
            $sformatf("quadrature output %0d, expected about 0", dem_out[3]));
    end

    $display("MECHANISMS download=%0d id_detect=%0d hit=%0d miss=%0d resend_data=%0d resend_addr=%0d test_words=%0d probe_words=%0d readback=%0d freq=%0d overflow=%0d reg_writes=%0d isolated=%0d nco_turns=%0d demod=%0d",
             n_download, n_id, n_hit, n_miss, n_resend_data, n_resend_addr, n_test_words,
             n_probe_words, n_readback, n_freq, n_overflow, n_reg_writes, n_isolated, n_nco_turns, n_demod);
    check(n_download == MEMB, "download count");
    check(n_id > 0 && n_hit > 0 && n_miss > 0 && n_resend_data > 0 && n_resend_addr > 0,
          "cache mechanisms all exercised");
    check(n_test_words == 2 && n_probe_words == 8 && n_readback == 8, "SRAM mechanisms all exercised");
    check(n_freq == 3 && n_overflow == 1 && n_reg_writes == 60 && n_isolated > 0 && n_nco_turns > 0,
          "meter, register bank and operand isolation exercised");
    check(n_demod > 2000, "demodulator exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
