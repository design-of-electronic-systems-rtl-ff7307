// tb_cache_way: checks one cache set against a reference array: whole-row
// writes, single-byte writes, one-cycle synchronous reads, and the hit output
// (valid AND tag equal) for matching, mismatching and invalidated rows.
module tb_cache_way;
  localparam int ROWS = 16, TAG_W = 8, NB = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en = 0, we_row = 0, we_byte = 0, wr_valid = 0;
  logic [3:0] rd_index = '0, wr_index = '0;
  logic [TAG_W-1:0] cmp_tag = '0, wr_tag = '0, tag;
  logic [NB*8-1:0] wr_block = '0, block;
  logic [1:0] wr_offset = '0;
  logic [7:0] wr_byte = '0;
  logic valid, hit;
  int checks = 0, failures = 0;

  cache_way #(.ROWS(ROWS), .TAG_W(TAG_W), .NBYTES(NB)) dut (.*);

  logic            m_v   [ROWS];
  logic [TAG_W-1:0] m_tag [ROWS];
  logic [NB*8-1:0] m_blk [ROWS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // flush all rows
    for (int r = 0; r < ROWS; r++) begin
      we_row <= 1; wr_index <= 4'(r); wr_valid <= 0; wr_tag <= '0; wr_block <= '0;
      @(posedge clk);
      m_v[r] = 0; m_tag[r] = '0; m_blk[r] = '0;
    end
    we_row <= 0;
    for (int i = 0; i < 600; i++) begin
      int op;
      int r;
      op = $urandom_range(0, 3);
      r  = $urandom_range(0, ROWS - 1);
      if (op == 0) begin
        logic [TAG_W-1:0] t;
        logic [NB*8-1:0] b;
        logic vv;
        t = TAG_W'($urandom); b = $urandom;
        vv = 1'($urandom_range(0, 3) != 0);
        we_row <= 1; we_byte <= 0; rd_en <= 0;
        wr_index <= 4'(r); wr_valid <= vv; wr_tag <= t; wr_block <= b;
        @(posedge clk);
        m_v[r] = vv; m_tag[r] = t; m_blk[r] = b;
      end else if (op == 1) begin
        logic [1:0] o;
        logic [7:0] v;
        o = 2'($urandom); v = 8'($urandom);
        we_row <= 0; we_byte <= 1; rd_en <= 0;
        wr_index <= 4'(r); wr_offset <= o; wr_byte <= v;
        @(posedge clk);
        m_blk[r][o*8 +: 8] = v;
      end else begin
        logic [TAG_W-1:0] ct;
        ct = (op == 2) ? m_tag[r] : TAG_W'($urandom);
        we_row <= 0; we_byte <= 0; rd_en <= 1;
        rd_index <= 4'(r); cmp_tag <= ct;
        @(posedge clk);
        #1;
        check(valid == m_v[r] && tag == m_tag[r] && block == m_blk[r],
              $sformatf("row %0d read", r));
        check(hit == (m_v[r] && ct == m_tag[r]), $sformatf("row %0d hit", r));
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
