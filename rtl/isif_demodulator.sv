// isif_demodulator: four-channel demodulator of the ISIF platform's DSP
// section. Each channel multiplies its input sample by a sine reference from
// the NCO and low-pass filters the product, so a sensor signal carried on the
// reference frequency comes out as a slowly varying level: in phase with the
// reference it gives half the product of the two amplitudes, in quadrature it
// gives zero.
// How it works: stage 1 registers mix[c] = din[c] * ref_wave[c] (signed,
// IN_W + REF_W bits). Stage 2 is a first-order IIR low-pass (leaky
// integrator) per channel: acc <= acc - (acc >>> k) + mix, with k =
// lpf_shift, and the filtered output is dout = acc >>> k. Its DC gain is 1
// and its time constant is about 2**k samples; k = 0 passes the product
// through.
// Interface and timing: a sample is taken when in_valid is high; mix and the
// accumulators are updated one and two clocks later, and out_valid is high
// for one clock with the new dout two clocks after in_valid. Samples may come
// every clock. All state is cleared by the asynchronous reset.
// The channel count (four), the multiplication by the NCO sine and the low-pass
// filters inside the demodulator follow the ISIF description. The widths, the
// filter form and its programmable shift are this design's choices.
module isif_demodulator #(
  parameter int unsigned N_CH   = 4,
  parameter int unsigned IN_W   = 16,
  parameter int unsigned REF_W  = 12,
  parameter int unsigned K_W    = 4,
  localparam int unsigned MIX_W = IN_W + REF_W,
  localparam int unsigned ACC_W = MIX_W + 2**K_W - 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din      [N_CH],
  input  logic signed [REF_W-1:0] ref_wave [N_CH],
  input  logic [K_W-1:0]          lpf_shift,
  output logic signed [MIX_W-1:0] mix      [N_CH],
  output logic signed [MIX_W-1:0] dout     [N_CH],
  output logic                    out_valid
);
  logic                    mix_v;
  logic signed [ACC_W-1:0] acc [N_CH];

  // stage 1: mixer
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mix_v <= 1'b0;
      for (int c = 0; c < N_CH; c++) mix[c] <= '0;
    end else begin
      mix_v <= in_valid;
      if (in_valid)
        for (int c = 0; c < N_CH; c++) mix[c] <= MIX_W'(din[c]) * MIX_W'(ref_wave[c]);
    end

  // stage 2: first-order low-pass
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int c = 0; c < N_CH; c++) acc[c] <= '0;
    end else begin
      out_valid <= mix_v;
      if (mix_v)
        for (int c = 0; c < N_CH; c++)
          acc[c] <= acc[c] - (acc[c] >>> lpf_shift) + ACC_W'(mix[c]);
    end

  always_comb
    for (int c = 0; c < N_CH; c++) dout[c] = MIX_W'(acc[c] >>> lpf_shift);
endmodule
