// phase_iq_lut - phase state to complex chip sample, e^{j*phi}.
//
// A 2^PHASE_W-entry table maps phase state k to
//   cos_o + j*sin_o = A * exp(j*(k + HALF_LSB/2) * 2*pi / 2^PHASE_W),
// A = 2^(IQ_W-1) - 1, rounded to the nearest integer. With HALF_LSB = 1 the
// points sit half a step off the axes, as the document's bulk-phase mapping
// (PRNG output + 1/2) * pi/128 places them; HALF_LSB = 0 gives points on the
// axes, used to remove a pure offset such as psi. The tables are computed at
// elaboration. Output is registered: one cycle from phase to cos_o/sin_o.
module phase_iq_lut #(
  parameter int unsigned PHASE_W  = 8,
  parameter int unsigned IQ_W     = 12,
  parameter bit          HALF_LSB = 1'b1
) (
  input  logic                   clk,
  input  logic [PHASE_W-1:0]     phase,
  output logic signed [IQ_W-1:0] cos_o,
  output logic signed [IQ_W-1:0] sin_o
);

  localparam int unsigned NPTS = 2**PHASE_W;
  typedef logic signed [IQ_W-1:0] tab_t [NPTS];

  function automatic tab_t make_tab(input bit want_sin);
    tab_t t;
    real  amp, ang, v;
    amp = real'((2**(IQ_W-1)) - 1);
    for (int k = 0; k < NPTS; k++) begin
      ang = (real'(k) + (HALF_LSB ? 0.5 : 0.0)) * 2.0 * 3.14159265358979323846 / real'(NPTS);
      v   = amp * (want_sin ? $sin(ang) : $cos(ang));
      t[k] = IQ_W'($rtoi($floor(v + 0.5)));
    end
    return t;
  endfunction

  localparam tab_t COS_TAB = make_tab(1'b0);
  localparam tab_t SIN_TAB = make_tab(1'b1);

  always_ff @(posedge clk) begin
    cos_o <= COS_TAB[phase];
    sin_o <= SIN_TAB[phase];
  end

endmodule
