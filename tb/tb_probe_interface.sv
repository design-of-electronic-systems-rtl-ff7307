// tb_probe_interface: drives 16 probes with a known pattern (probe i carries
// {i, cycle count}, data-valid every cycle for some probes and every other
// cycle for the rest) and checks, for every selection, that the chain output
// is the selected probe's word delayed by exactly 16 - sel cycles, with its
// data-valid, and that no word of the previous selection reaches the output
// after sel changes.
module tb_probe_interface;
  localparam int N = 16, W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] sel = '0;
  logic [W-1:0] probe [N];
  logic [N-1:0] dv;
  logic [W-1:0] od;
  logic odv;
  int cyc = 0;
  int checks = 0, failures = 0;

  probe_interface #(.N(N), .W(W)) dut (
    .clk, .rst_n, .sel, .probe, .probe_dv(dv), .out_data(od), .out_dv(odv));

  always_comb
    for (int i = 0; i < N; i++) begin
      probe[i] = {4'(i), 12'(cyc)};
      dv[i]    = (i % 3 == 0) ? 1'b1 : cyc[0];
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < N; s++) begin
      int lat;
      lat = N - s;
      @(negedge clk);
      sel = 4'(s);
      repeat (N + 1) begin
        @(negedge clk); cyc++;
        check(!odv || od[15:12] == 4'(s), $sformatf("sel %0d: old probe %0d at the output", s, od[15:12]));
      end
      for (int k = 0; k < 20; k++) begin
        int src;
        src = cyc - lat;       // cycle at which the word now out was sampled
        check(od == {4'(s), 12'(src)} && odv == ((s % 3 == 0) ? 1'b1 : 1'(src & 1)),
              $sformatf("sel %0d: out %h dv %b, expected %h from cycle %0d", s, od, odv, {4'(s), 12'(src)}, src));
        @(negedge clk); cyc++;
      end
    end
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
