// tb_isif_nco: checks the sine wave generator against a model that keeps its
// own phase accumulators and computes the sine with $sin. Three frequencies
// (one of them changed during the run), sixteen outputs spread over them with
// different phase offsets, one output switched off. Every output is compared
// every clock (within 1 LSB, for the model's rounding of negative values);
// the period of one output is measured from its zero crossings.
module tb_isif_nco;
  localparam int NO = 16, NF = 3, AW = 24, PW = 10, OW = 12;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 1, en = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] fcw [NF];
  logic [1:0]    fsel [NO];
  logic [PW-1:0] phase [NO];
  logic signed [OW-1:0] wave [NO];
  int checks = 0, failures = 0;

  isif_nco #(.N_OUT(NO), .N_FREQ(NF), .ACC_W(AW), .PH_W(PW), .OUT_W(OW)) dut (
    .clk, .rst_n, .en, .fcw, .out_fsel(fsel), .out_phase(phase), .wave);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int model_sine(input logic [PW-1:0] p);
    return int'($floor($sin(2.0 * PI * (real'(p) + 0.5) / real'(2**PW)) * real'(2**(OW-1) - 1) + 0.5));
  endfunction

  // model: accumulators and a two-stage delay of the expected phase
  logic [AW-1:0] macc [NF];
  int exp1 [NO], exp2 [NO];
  always @(posedge clk) begin
    for (int k = 0; k < NO; k++) begin
      exp2[k] <= exp1[k];
      exp1[k] <= (fsel[k] == 2'd3) ? 0 : model_sine(PW'(macc[fsel[k]][AW-1 -: PW] + phase[k]));
    end
    if (en) for (int f = 0; f < NF; f++) macc[f] <= macc[f] + fcw[f];
  end

  int last_cross = -1, period = 0, ncross = 0, cyc = 0;
  logic signed [OW-1:0] prev0 = '0;

  initial begin
    for (int f = 0; f < NF; f++) macc[f] = '0;
    for (int k = 0; k < NO; k++) begin exp1[k] = 0; exp2[k] = 0; end
    fcw[0] = 24'h010000;          // period 256 clocks
    fcw[1] = 24'h028F5C;          // ~100 clocks
    fcw[2] = 24'h003333;          // ~1280 clocks
    for (int k = 0; k < NO; k++) begin
      fsel[k]  = 2'(k % 3);
      phase[k] = PW'(k * 64);
    end
    fsel[15] = 2'd3;              // switched off
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; en = 1;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      cyc++;
      if (n == 1500) fcw[1] = 24'h00A000;
      for (int k = 0; k < NO; k++) begin
        int d;
        d = int'(wave[k]) - exp2[k];
        check(d >= -1 && d <= 1, $sformatf("cycle %0d out %0d = %0d, expected %0d", n, k, wave[k], exp2[k]));
      end
      if (prev0 < 0 && wave[0] >= 0) begin
        if (last_cross >= 0) begin period = cyc - last_cross; ncross++; end
        last_cross = cyc;
      end
      prev0 = wave[0];
    end
    check(ncross > 5 && period == 256, $sformatf("output 0 period %0d, expected 256", period));
    check(wave[15] == 0, "switched-off output stays at zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
