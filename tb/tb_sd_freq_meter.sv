// tb_sd_freq_meter: self-checking test of the period meter. Six square waves
// with known periods and duty cycles (in clk cycles) feed the meter; a host
// task drives the JTAG-like chain on its own, slower and unrelated clock.
// Each command's result is read two accesses later, as the chain pipeline
// requires, and compared with the wave's period, high time or low time. It
// also checks the read-back of the command and channel, NOP, a measure read
// too early (DV = 0) and counter overflow on a very slow wave.
module tb_sd_freq_meter;
  import freqm_pkg::*;
  localparam int N_IN = 6, PW = 16;
  localparam int CH_W = 3, CW = CH_W + 2 + PW + 1;

  logic clk = 0, rst_n = 0, tck = 0, tms = 0, tdi = 0, tdo;
  logic [N_IN-1:0] wave;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  sd_freq_meter #(.N_IN(N_IN), .PERIOD_W(PW)) dut (
    .clk, .rst_n, .wave_in(wave), .tck, .tms, .tdi, .tdo);

  // wave i: period P[i], high for H[i] cycles
  int P [N_IN] = '{100, 37, 250, 1000, 12, 70000};
  int H [N_IN] = '{30, 20, 125, 1, 6, 35000};
  int phase [N_IN];
  always @(posedge clk)
    for (int i = 0; i < N_IN; i++) begin
      phase[i] <= (phase[i] + 1) % P[i];
      wave[i]  <= ((phase[i] + 1) % P[i]) < H[i];
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one chain access: shift a command in, the previous capture out, update
  task automatic access(input logic [CH_W-1:0] ch, input cmd_e c,
                        output logic [CW-1:0] got);
    logic [CW-1:0] word;
    word = {ch, c, PW'(0), 1'b0};
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

  localparam cmd_e CMDS [3] = '{CMD_FP, CMD_HP, CMD_LP};

  initial begin
    logic [CW-1:0] r;
    int   prev_ch;
    cmd_e prev_c;
    for (int i = 0; i < N_IN; i++) phase[i] = 0;
    wave = '0;
    #30 rst_n = 1;
    #50;
    // pipeline: issue cmd k, wait, issue cmd k+1 (reads k-1), ...
    access(3'd0, CMD_FP, r);           // first command
    prev_ch = 0; prev_c = CMD_FP;
    #((3 * 100) * 10);
    access(3'd0, CMD_NOP, r);          // ends it, reads the power-up state
    access(3'd0, CMD_NOP, r);          // reads the FP result
    check(r[0] == 1'b1, "FP ch0 valid");
    check(int'(r[PW:1]) == 100, $sformatf("FP ch0 = %0d, expected 100", r[PW:1]));
    check(r[CW-1 -: CH_W] == 3'd0 && r[CW-1-CH_W -: 2] == CMD_FP, "command read back");

    for (int ch = 0; ch < 5; ch++)
      for (int k = 0; k < 3; k++) begin
        access(3'(ch), CMDS[k], r);     // start; shifts out the NOP result
        #((3 * P[ch] + 20) * 10);
        access(3'(ch), CMD_NOP, r);     // stop; capture result
        access(3'(ch), CMD_NOP, r);     // read it
        check(r[0] == 1'b1, $sformatf("ch%0d cmd%0d valid", ch, CMDS[k]));
        check(int'(r[PW:1]) == expected(ch, CMDS[k]),
              $sformatf("ch%0d cmd%0d = %0d, expected %0d", ch, CMDS[k], r[PW:1], expected(ch, CMDS[k])));
        check(r[CW-1 -: CH_W] == 3'(ch) && r[CW-1-CH_W -: 2] == CMDS[k], "command/channel read back");
      end

    // read too early: measure not finished, DV = 0
    access(3'd3, CMD_FP, r);
    #(50 * 10);
    access(3'd3, CMD_NOP, r);
    access(3'd3, CMD_NOP, r);
    check(r[0] == 1'b0, "early read has DV = 0");

    // NOP result is never valid
    check(r[CW-1-CH_W -: 2] == CMD_FP, "early read command");
    access(3'd0, CMD_NOP, r);
    check(r[0] == 1'b0 && r[CW-1-CH_W -: 2] == CMD_NOP, "NOP gives DV = 0");

    // overflow: 70000-cycle period does not fit 16 bits
    access(3'd5, CMD_FP, r);
    #(3 * 70000 * 10);
    access(3'd5, CMD_NOP, r);
    access(3'd5, CMD_NOP, r);
    check(r[0] == 1'b0, "overflow gives DV = 0");
    check(&r[PW:1], "overflow leaves a full count");

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
