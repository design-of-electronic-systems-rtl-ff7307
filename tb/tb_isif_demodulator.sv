// tb_isif_demodulator: checks the four-channel demodulator three ways.
// 1. Bit-exact: random samples, random references, gaps in in_valid and
//    changes of the filter shift, compared every clock with a model that keeps
//    its own 64-bit products and accumulators.
// 2. Latency: a single sample must give out_valid exactly two clocks later.
// 3. Function: sines of period 32 samples, filter shift 9. A signal in phase
//    with its reference must settle to A*R/2, in quadrature to 0, in
//    antiphase to -A*R/2 and at 60 degrees to A*R/4 (within 3 % of A*R/2).
module tb_isif_demodulator;
  localparam int NC = 4, IW = 16, RW = 12, KW = 4, MW = IW + RW;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic                 in_valid = 0;
  logic signed [IW-1:0] din [NC];
  logic signed [RW-1:0] ref_wave [NC];
  logic [KW-1:0]        lpf_shift = '0;
  logic signed [MW-1:0] mix [NC], dout [NC];
  logic                 out_valid;
  int checks = 0, failures = 0;

  isif_demodulator #(.N_CH(NC), .IN_W(IW), .REF_W(RW), .K_W(KW)) dut (
    .clk, .rst_n, .in_valid, .din, .ref_wave, .lpf_shift, .mix, .dout, .out_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model
  longint m_mix [NC], m_acc [NC];
  bit     m_mix_v = 0, m_ov = 0;
  always @(posedge clk) begin
    m_ov = m_mix_v;
    if (m_mix_v)
      for (int c = 0; c < NC; c++) m_acc[c] = m_acc[c] - (m_acc[c] >>> lpf_shift) + m_mix[c];
    m_mix_v = in_valid;
    if (in_valid)
      for (int c = 0; c < NC; c++) m_mix[c] = longint'(din[c]) * longint'(ref_wave[c]);
  end

  task automatic compare(input int n);
    check(out_valid == m_ov, $sformatf("cycle %0d out_valid %0b, expected %0b", n, out_valid, m_ov));
    for (int c = 0; c < NC; c++) begin
      logic [MW-1:0] em, ed;
      em = MW'(m_mix[c]);
      ed = MW'(m_acc[c] >>> lpf_shift);
      check(mix[c] == em, $sformatf("cycle %0d ch %0d mix %0d, expected %0d", n, c, mix[c], signed'(em)));
      check(dout[c] == ed, $sformatf("cycle %0d ch %0d dout %0d, expected %0d", n, c, dout[c], signed'(ed)));
    end
  endtask

  function automatic real fabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  function automatic int sine(input real amp, input real ph);
    return int'($floor(amp * $sin(ph) + 0.5));
  endfunction

  initial begin
    for (int c = 0; c < NC; c++) begin din[c] = '0; ref_wave[c] = '0; m_mix[c] = 0; m_acc[c] = 0; end
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. bit-exact against the model
    for (int n = 0; n < 3000; n++) begin
      in_valid = ($urandom_range(0, 9) < 7);
      for (int c = 0; c < NC; c++) begin
        din[c]      = IW'($urandom);
        ref_wave[c] = RW'($urandom);
      end
      if (n % 200 == 0) lpf_shift = KW'($urandom_range(0, 2**KW - 1));
      @(negedge clk);
      compare(n);
    end

    // 2. latency
    in_valid = 0;
    repeat (4) @(negedge clk);
    begin
      int lat;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 10) begin @(negedge clk); lat++; end
      check(lat == 2, $sformatf("latency %0d clocks, expected 2", lat));
    end

    // 3. in-phase, quadrature, antiphase and 60-degree inputs
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) m_acc[c] = 0;
    lpf_shift = 4'd9;
    in_valid  = 1;
    for (int n = 0; n < 8192; n++) begin
      real th;
      th = 2.0 * PI * real'(n) / 32.0;
      din[0] = IW'(sine(20000.0, th));  ref_wave[0] = RW'(sine(2000.0, th));
      din[1] = IW'(sine(20000.0, th));  ref_wave[1] = RW'(sine(2000.0, th + PI / 2.0));
      din[2] = IW'(sine(-20000.0, th)); ref_wave[2] = RW'(sine(2000.0, th));
      din[3] = IW'(sine(20000.0, th + PI / 3.0)); ref_wave[3] = RW'(sine(2000.0, th));
      @(negedge clk);
    end
    begin
      real half, tol;
      half = 20000.0 * 2000.0 / 2.0;
      tol  = 0.03 * half;
      check(fabs(real'(dout[0]) - half) < tol, $sformatf("in phase: %0d, expected about %0.0f", dout[0], half));
      check(fabs(real'(dout[1])) < tol, $sformatf("quadrature: %0d, expected about 0", dout[1]));
      check(fabs(real'(dout[2]) + half) < tol, $sformatf("antiphase: %0d, expected about %0.0f", dout[2], -half));
      check(fabs(real'(dout[3]) - half / 2.0) < tol, $sformatf("60 degrees: %0d, expected about %0.0f", dout[3], half / 2.0));
    end

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
