// gated_reg_clusters: bank of N_REGS registers of W bits whose clock is gated
// per cluster of K registers, the low-power arrangement chosen for the 8051
// register set. Each cluster has one latch-based clock_gate whose enable is
// the OR of its registers' write enables, so a cluster whose registers are not
// written receives no clock at all; inside a clocked cluster each register
// keeps its own load enable. With N = 8*K*M flip-flops, the saved power is
// largest for K_opt = (1/8)*sqrt(N/c); N = 328 and c = 0.48 give 3.26, hence
// the default K = 3 (41 byte registers in 14 clusters, the last one holding 2).
// Interface: one write port (wr, waddr, wdata, registered at the rising edge
// of clk through the gated clock) and one combinational read port (raddr,
// rdata). The write inputs must be stable around the rising edge of clk,
// like any input of a gated-clock register. Asynchronous active-low reset
// clears the registers. gclk_active shows which clusters are clocked in the
// current cycle. The cluster size and the clustering rule follow the paper;
// the register count as a single addressed bank and the port set are this
// design's choice.
module gated_reg_clusters #(
  parameter int unsigned N_REGS = 41,
  parameter int unsigned W      = 8,
  parameter int unsigned K      = 3,
  localparam int unsigned M     = (N_REGS + K - 1) / K,
  localparam int unsigned AW    = $clog2(N_REGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  output logic [M-1:0]  gclk_active
);
  logic [W-1:0]      regs [N_REGS];
  logic [N_REGS-1:0] we;

  always_comb
    for (int i = 0; i < N_REGS; i++)
      we[i] = wr && (int'(waddr) == i);

  for (genvar c = 0; c < M; c++) begin : g_cl
    localparam int unsigned LO = c * K;
    localparam int unsigned HI = (c * K + K > N_REGS) ? N_REGS - 1 : c * K + K - 1;
    logic cen, gclk;
    assign cen            = |we[HI:LO];
    assign gclk_active[c] = cen;
    clock_gate u_cg (.clk, .en(cen), .gclk);
    for (genvar r = LO; r <= HI; r++) begin : g_reg
      logic [W-1:0] q;
      always_ff @(posedge gclk or negedge rst_n)
        if (!rst_n)     q <= '0;
        else if (we[r]) q <= wdata;
      assign regs[r] = q;
    end
  end

  assign rdata = (int'(raddr) < N_REGS) ? regs[raddr] : '0;
endmodule
