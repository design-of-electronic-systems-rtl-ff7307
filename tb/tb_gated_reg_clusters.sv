// tb_gated_reg_clusters: writes random values to random registers of the
// clustered, clock-gated bank and compares every register against a model
// after each write. It also checks that exactly the cluster of the written
// register is clocked, that no cluster is clocked when nothing is written,
// and counts the gated clock pulses per cluster against the writes to it.
// Inputs are driven on the falling edge, as a gated-clock bank requires.
module tb_gated_reg_clusters;
  localparam int N = 41, W = 8, K = 3, M = (N + K - 1) / K;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic wr = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [M-1:0] gact;
  logic [W-1:0] model [N];
  int pulses [M];
  int writes [M];
  int checks = 0, failures = 0;

  gated_reg_clusters #(.N_REGS(N), .W(W), .K(K)) dut (
    .clk, .rst_n, .wr, .waddr, .wdata, .raddr, .rdata, .gclk_active(gact));

  for (genvar c = 0; c < M; c++) begin : g_cnt
    always @(posedge dut.g_cl[c].gclk) pulses[c]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_all(input string what);
    for (int i = 0; i < N; i++) begin
      raddr = 6'(i);
      #0.1;
      check(rdata == model[i], $sformatf("%s: reg %0d = %h, expected %h", what, i, rdata, model[i]));
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    for (int c = 0; c < M; c++) begin pulses[c] = 0; writes[c] = 0; end
    #1 rst_n = 0;     // a real falling edge: the gated clocks do not run in reset
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all("after reset");
    for (int n = 0; n < 300; n++) begin
      int a;
      bit doit;
      a = $urandom_range(0, N - 1);
      doit = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      wr = doit; waddr = 6'(a); wdata = W'($urandom);
      #1;
      for (int c = 0; c < M; c++)
        check(gact[c] == (doit && a / K == c), $sformatf("cluster %0d enable, write to %0d", c, a));
      @(negedge clk);
      if (doit) begin
        model[a] = wdata;
        writes[a / K]++;
      end
      wr = 0;
      if (n % 50 == 0) check_all($sformatf("step %0d", n));
      else begin
        raddr = 6'(a);
        #0.1;
        check(rdata == model[a], $sformatf("reg %0d after write", a));
      end
    end
    repeat (3) @(negedge clk);
    check_all("final");
    for (int c = 0; c < M; c++)
      check(pulses[c] == writes[c], $sformatf("cluster %0d: %0d clock pulses for %0d writes", c, pulses[c], writes[c]));
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
