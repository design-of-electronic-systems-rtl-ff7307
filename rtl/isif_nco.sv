// isif_nco: sine wave generator (NCO) of the ISIF platform's DSP section. It
// gives up to N_OUT sine waves built from N_FREQ frequencies, each output with
// its own programmable phase, as references for the modulator, the
// demodulator and the DAC controller.
// How it works: N_FREQ phase accumulators of ACC_W bits add their frequency
// control word fcw[f] every enabled clock, so frequency f is
// fcw[f] / 2**ACC_W times the clock rate. Output k takes the top PH_W bits of
// the accumulator chosen by out_fsel[k] (3 = output off, held at 0), adds its
// phase offset out_phase[k] (a full turn is 2**PH_W) and looks the sine up in
// a quarter-wave table: the two phase MSBs give the quadrant, the table index
// is mirrored in the 2nd and 4th quadrant and the sign is set in the 3rd and
// 4th. The table, 2**(PH_W-2) entries of amplitude 2**(OUT_W-1)-1 sampled
// at the middle of each step, is computed at elaboration.
// Timing: wave[k] is registered and is the sine of the accumulator value of
// two clocks earlier plus the phase offset; after reset the accumulators are
// zero. The output count (16) and the frequency count (3) follow the ISIF
// description; the accumulator, phase and amplitude widths and the table
// method are this design's choices.
module isif_nco #(
  parameter int unsigned N_OUT  = 16,
  parameter int unsigned N_FREQ = 3,
  parameter int unsigned ACC_W  = 24,
  parameter int unsigned PH_W   = 10,
  parameter int unsigned OUT_W  = 12,
  localparam int unsigned FS_W  = 2,
  localparam int unsigned QA_W  = PH_W - 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [ACC_W-1:0]        fcw       [N_FREQ],
  input  logic [FS_W-1:0]         out_fsel  [N_OUT],
  input  logic [PH_W-1:0]         out_phase [N_OUT],
  output logic signed [OUT_W-1:0] wave      [N_OUT]
);
  typedef logic [OUT_W-2:0] tab_t [2**QA_W];

  function automatic tab_t quarter_sine();
    tab_t r;
    for (int i = 0; i < 2**QA_W; i++)
      r[i] = (OUT_W-1)'(int'($floor($sin(3.14159265358979 / 2.0 * (real'(i) + 0.5) / real'(2**QA_W))
                                    * real'(2**(OUT_W-1) - 1) + 0.5)));
    return r;
  endfunction

  localparam tab_t QTAB = quarter_sine();

  logic [ACC_W-1:0] acc [N_FREQ];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  for (int f = 0; f < N_FREQ; f++) acc[f] <= '0;
    else if (en) for (int f = 0; f < N_FREQ; f++) acc[f] <= acc[f] + fcw[f];

  // stage 1: phase of each output
  logic [PH_W-1:0] ph_q [N_OUT];
  logic [N_OUT-1:0] on_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      on_q <= '0;
      for (int k = 0; k < N_OUT; k++) ph_q[k] <= '0;
    end else begin
      for (int k = 0; k < N_OUT; k++) begin
        on_q[k] <= int'(out_fsel[k]) < N_FREQ;
        ph_q[k] <= (int'(out_fsel[k]) < N_FREQ ? acc[out_fsel[k]][ACC_W-1 -: PH_W] : '0)
                   + out_phase[k];
      end
    end

  // stage 2: quarter-wave lookup
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < N_OUT; k++) wave[k] <= '0;
    end else begin
      for (int k = 0; k < N_OUT; k++) begin
        logic [QA_W-1:0]   idx;
        logic signed [OUT_W-1:0] mag;
        idx = ph_q[k][PH_W-2] ? ~ph_q[k][QA_W-1:0] : ph_q[k][QA_W-1:0];
        mag = signed'({1'b0, QTAB[idx]});
        if (!on_q[k])              wave[k] <= '0;
        else if (ph_q[k][PH_W-1])  wave[k] <= -mag;
        else                       wave[k] <= mag;
      end
    end
endmodule
