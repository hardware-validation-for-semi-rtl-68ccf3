// phase_error_map - turns a perturbation PRNG word into a zero-mean phase error.
//
// The IN_W-bit word (12 bits) is reduced modulo M_RANGE = m (67) and shifted
// down by floor(m/2) (33), giving a signed error psi in [-33 : 33] phase
// steps of 2*pi/256, carried in ERR_W = 7 signed bits. The residue of a 12-bit
// uniform word is not exactly uniform over m values (4096 = 61*67 + 9, so
// residues 0..8 are one count in 61 more likely), which the method accepts.
// This follows the document ("mod 67 - 33", result in [-33:33]); where its
// text gives the offset as floor(m/2) - 1, the range it states was kept.
//
// Purely combinational: err follows rnd in the same cycle.
module phase_error_map #(
  parameter int unsigned IN_W    = 12,
  parameter int unsigned M_RANGE = 67,
  parameter int unsigned ERR_W   = 7
) (
  input  logic [IN_W-1:0]         rnd,
  output logic signed [ERR_W-1:0] err
);

  localparam int unsigned OFFSET = M_RANGE / 2;
  localparam int unsigned RW     = $clog2(M_RANGE);

  logic [RW-1:0] residue;

  always_comb begin
    residue = RW'(rnd % IN_W'(M_RANGE));
    err     = ERR_W'(signed'({1'b0, residue}) - signed'((RW+1)'(OFFSET)));
  end

  initial begin
    assert (2 * OFFSET + 1 <= 2**ERR_W) else $error("ERR_W too narrow for M_RANGE");
  end

endmodule
