// tb_sd_sram_controller: self-checking test of the SRAM probe controller with
// a behavioural asynchronous SRAM. It stores and reads back test words,
// records probe sessions at two write timings (checking the write rate of one
// word per 4 and per 10 clocks, the address range of Fig.-32-style sessions
// and the oldest-first read-back with DR/AMR), checks that registers are
// locked while probing and that 'stop probing' ends a session early.
module tb_sd_sram_controller;
  import sramc_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              psel = 0, penable = 0, pwrite = 0;
  logic [APB_AW-1:0] paddr = '0;
  logic [15:0]       pwdata = '0, prdata;
  logic [PW-1:0]     probe [NPROBE];
  logic [NPROBE-1:0] probe_dv;
  logic [SRAM_AW-1:0] sram_addr;
  logic [15:0]       sram_dq_o, sram_dq_i;
  logic              sram_dq_oe, sram_ce_n, sram_we_n, sram_oe_n, probing;

  int checks = 0, failures = 0;

  sd_sram_controller dut (.*);

  // behavioural SRAM, written while CE and WE are low
  logic [15:0] sram [1 << SRAM_AW];
  int          writes = 0;
  always @(posedge clk)
    if (!sram_ce_n && !sram_we_n && sram_dq_oe) sram[sram_addr] <= sram_dq_o;
  assign sram_dq_i = (!sram_ce_n && !sram_oe_n) ? sram[sram_addr] : 16'hxxxx;

  // write-cycle spacing monitor (falling WE)
  logic we_d = 1'b1;
  int   last_fall = -1, min_gap = 1000, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    we_d <= sram_we_n;
    if (we_d && !sram_we_n) begin
      writes++;
      if (last_fall >= 0 && cyc - last_fall < min_gap) min_gap = cyc - last_fall;
      last_fall = cyc;
    end
  end

  // probe sources: probe i counts up with the top nibble set to i
  logic [11:0] tick = '0;
  int          dv_period = 1;
  int          dv_cnt = 0;
  always @(posedge clk) begin
    tick <= tick + 1'b1;
    dv_cnt <= (dv_cnt + 1 >= dv_period) ? 0 : dv_cnt + 1;
  end
  always_comb
    for (int i = 0; i < NPROBE; i++) begin
      probe[i]    = {4'(i), tick};
      probe_dv[i] = (dv_cnt == 0);
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb_wr(input logic [APB_AW-1:0] a, input logic [15:0] d);
    psel <= 1; penable <= 0; pwrite <= 1; paddr <= a; pwdata <= d;
    @(posedge clk); penable <= 1;
    @(posedge clk); psel <= 0; penable <= 0; pwrite <= 0;
  endtask

  task automatic apb_rd(input logic [APB_AW-1:0] a, output logic [15:0] d);
    psel <= 1; penable <= 0; pwrite <= 0; paddr <= a;
    @(posedge clk); penable <= 1;
    @(posedge clk); d = prdata; psel <= 0; penable <= 0;
  endtask

  task automatic wait_flag(input int f, input logic v);
    logic [15:0] s;
    int n = 0;
    do begin apb_rd(A_STATUS, s); n++; end while (s[f] !== v && n < 5000);
    check(s[f] === v, $sformatf("STATUS bit %0d never became %0b", f, v));
  endtask

  task automatic read_back(input int n, input bit full, output logic [15:0] w [$]);
    logic [15:0] s, d;
    w = {};
    apb_wr(A_STATUS, 16'(1 << C_START_READ));
    for (int i = 0; i < n; i++) begin
      wait_flag(F_DR, 1'b1);
      apb_rd(A_STATUS, s);
      if (full) check(s[F_AMR] == (i == n - 1), $sformatf("AMR=%0b before read %0d of %0d", s[F_AMR], i, n));
      apb_rd(A_DATA, d);
      w.push_back(d);
    end
  endtask

  initial begin
    logic [15:0] s, d;
    logic [15:0] w [$];
    for (int i = 0; i < (1 << SRAM_AW); i++) sram[i] = 16'hDEAD;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // ---- configuration as in the example session: 0x0C, 2**3 words ----
    apb_wr(A_ADDR, 16'h000C);
    apb_wr(A_N_SAMPLE, 16'd3);
    apb_wr(A_TIMING, 16'd0);
    apb_wr(A_PSEL, 16'd5);
    apb_rd(A_ADDR, d);      check(d == 16'h000C, "SET_ADDR read back");
    apb_rd(A_N_SAMPLE, d);  check(d == 16'd3, "N_SAMPLE read back");

    // ---- test words ----
    apb_wr(A_DATA, 16'h1234);
    repeat (8) @(posedge clk);
    apb_wr(A_DATA, 16'hA5A5);
    repeat (8) @(posedge clk);
    apb_wr(A_DATA, 16'h0F0F);
    repeat (20) @(posedge clk);
    check(sram[6] == 16'h1234 && sram[7] == 16'hA5A5 && sram[8] == 16'h0F0F,
          "test words stored from SET_ADDR");
    read_back(3, 0, w);
    check(w[0] == 16'h1234 && w[1] == 16'hA5A5 && w[2] == 16'h0F0F,
          $sformatf("test words read back %h %h %h", w[0], w[1], w[2]));

    // ---- probe session, fastest timing, a sample every clock ----
    dv_period = 1;
    min_gap = 1000; last_fall = -1;
    writes = 0;
    apb_wr(A_STATUS, 16'(1 << C_START_PROBE));
    apb_rd(A_STATUS, s);  check(s[F_PM], "PM set while probing");
    apb_wr(A_N_SAMPLE, 16'd9);                  // must be ignored
    wait_flag(F_PM, 1'b0);
    apb_rd(A_N_SAMPLE, d); check(d == 16'd3, "register locked during probing");
    check(writes == 8, $sformatf("%0d words written, expected 8", writes));
    check(min_gap == 4, $sformatf("write rate 1 per %0d clocks, expected 4", min_gap));
    check(sram[5] == 16'hDEAD && sram[14] == 16'hDEAD, "session stays inside 0x0C..0x1A");
    for (int i = 6; i < 14; i++) begin
      check(sram[i][15:12] == 4'd5, $sformatf("word %0d from probe %0d", i, sram[i][15:12]));
      if (i > 6) check(sram[i][11:0] - sram[i-1][11:0] == 12'd4,
                       $sformatf("samples %0d apart", sram[i][11:0] - sram[i-1][11:0]));
    end
    read_back(8, 1, w);
    for (int i = 0; i < 8; i++)
      check(w[i] == sram[6 + i], $sformatf("read-back word %0d oldest first", i));
    apb_rd(A_STATUS, s); check(s[F_AMR] && !s[F_DR], "AMR set, DR clear at the end");

    // ---- slowest timing, probe 12, at 0x100 ----
    apb_wr(A_ADDR, 16'h0100);
    apb_wr(A_TIMING, 16'd3);
    apb_wr(A_PSEL, 16'd12);
    apb_wr(A_N_SAMPLE, 16'd4);
    min_gap = 1000; last_fall = -1; writes = 0;
    apb_wr(A_STATUS, 16'(1 << C_START_PROBE));
    wait_flag(F_PM, 1'b0);
    check(writes == 16, $sformatf("%0d words written, expected 16", writes));
    check(min_gap == 10, $sformatf("write rate 1 per %0d clocks, expected 10", min_gap));
    for (int i = 0; i < 16; i++)
      check(sram[16'h80 + i][15:12] == 4'd12, "slow session probe 12");

    // ---- stop probing early ----
    dv_period = 25;
    apb_wr(A_ADDR, 16'h0400);
    apb_wr(A_N_SAMPLE, 16'd8);
    writes = 0;
    apb_wr(A_STATUS, 16'(1 << C_START_PROBE));
    repeat (130) @(posedge clk);
    apb_wr(A_STATUS, 16'(1 << C_STOP_PROBE));
    repeat (30) @(posedge clk);
    apb_rd(A_STATUS, s);
    check(!s[F_PM], "stop probing clears PM");
    check(writes >= 4 && writes <= 7, $sformatf("%0d words before stop", writes));
    check(sram[16'h200 + writes] == 16'hDEAD, "nothing written after stop");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
