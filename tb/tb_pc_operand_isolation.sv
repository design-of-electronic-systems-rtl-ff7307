// tb_pc_operand_isolation: drives a random program-counter sequence with
// random use_inc patterns. It checks every enabled sum against pc+1/2/3
// computed here, checks that a disabled adder shows the constant k+1 and that
// its operand stays at zero, and counts operand bit toggles with and without
// isolation to show the switching saved.
module tb_pc_operand_isolation;
  logic [15:0] pc;
  logic [2:0]  use_inc;
  logic [15:0] inc [3];
  logic [15:0] iso [3];
  logic [15:0] prev_iso [3];
  logic [15:0] prev_pc;
  int checks = 0, failures = 0;
  int raw_toggles = 0, iso_toggles = 0;

  pc_operand_isolation #(.AW(16)) dut (.pc, .use_inc, .inc, .iso_operand(iso));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    pc = '0; use_inc = '0; prev_pc = '0;
    for (int k = 0; k < 3; k++) prev_iso[k] = '0;
    #1;
    for (int n = 0; n < 2000; n++) begin
      pc = 16'($urandom);
      // a 1-byte next address is needed most often, a 3-byte one rarely
      use_inc = {($urandom_range(0, 9) == 0), ($urandom_range(0, 3) == 0), ($urandom_range(0, 1) == 0)};
      #1;
      for (int k = 0; k < 3; k++) begin
        if (use_inc[k])
          check(inc[k] == pc + 16'(k + 1), $sformatf("pc %h + %0d = %h", pc, k + 1, inc[k]));
        else
          check(iso[k] == '0 && inc[k] == 16'(k + 1), $sformatf("adder %0d not isolated", k));
        raw_toggles += $countones(pc ^ prev_pc);
        iso_toggles += $countones(iso[k] ^ prev_iso[k]);
        prev_iso[k] = iso[k];
      end
      prev_pc = pc;
    end
    $display("operand toggles: %0d without isolation, %0d with", raw_toggles, iso_toggles);
    check(iso_toggles < raw_toggles / 2, "isolation saves operand switching");
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
