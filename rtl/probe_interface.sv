// probe_interface: picks one of NPROBE probe words (each with its data-valid)
// without a wide multiplexer. The words travel along a chain of NPROBE
// registers; stage i loads probe i when it is the selected one and otherwise
// copies stage i-1. Only the selected probe therefore enters the chain, and it
// reaches the output after NPROBE - sel clock cycles (1 to 16). This trades
// routing (a 256-to-16 multiplexer) for registers and latency, as the original
// IP does; the exact register arrangement is this design's. When sel changes,
// the data-valid flags of the whole chain are cleared, so words of the old
// selection never reach the output (this design's choice).
module probe_interface
  import sramc_pkg::*;
#(
  parameter int unsigned N = sramc_pkg::NPROBE,
  parameter int unsigned W = sramc_pkg::PW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] sel,
  input  logic [W-1:0]         probe [N],
  input  logic [N-1:0]         probe_dv,
  output logic [W-1:0]         out_data,
  output logic                 out_dv
);
  logic [W-1:0] st_d  [N];
  logic [N-1:0] st_dv;
  logic [$clog2(N)-1:0] sel_q;   // selection of the previous cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_dv <= '0;
      sel_q <= '0;
      for (int i = 0; i < N; i++) st_d[i] <= '0;
    end else begin
      sel_q <= sel;
      for (int i = 0; i < N; i++) begin
        if (int'(sel) == i) begin
          st_d[i]  <= probe[i];
          st_dv[i] <= probe_dv[i];
        end else if (i == 0) begin
          st_dv[i] <= 1'b0;
        end else begin
          st_d[i]  <= st_d[i-1];
          st_dv[i] <= st_dv[i-1];
        end
      end
      // a new selection discards the words of the old one still in the chain
      if (sel != sel_q) st_dv <= '0;
    end
  end

  assign out_data = st_d[N-1];
  assign out_dv   = st_dv[N-1];
endmodule
