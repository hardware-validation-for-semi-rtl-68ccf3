// phase_state_adder - forms the transmitted chip phase state.
//
// phase = theta + data*pi + psi  (mod 2*pi), all in steps of 2*pi/2^PHASE_W.
// theta is the unsigned bulk chip phase from the keyed PRNG, psi the signed
// perturbation from phase_error_map, sign-extended before the add so that the
// sum wraps around the circle ("accounting for overflow"). data = 1 adds half a
// turn: binary data rides on the chips as BPSK, which is this design's choice
// of data modulation. pert_en = 0 sends the chip with its true phase, as for a
// preamble. Combinational.
module phase_state_adder #(
  parameter int unsigned PHASE_W = 8,
  parameter int unsigned ERR_W   = 7
) (
  input  logic [PHASE_W-1:0]      theta,
  input  logic signed [ERR_W-1:0] psi,
  input  logic                    data,
  input  logic                    pert_en,
  output logic [PHASE_W-1:0]      phase
);

  logic [PHASE_W-1:0] psi_ext;
  logic [PHASE_W-1:0] half_turn;

  always_comb begin
    psi_ext   = pert_en ? PHASE_W'(psi) : '0;   // sign extension, mod 2^PHASE_W
    half_turn = {data, {(PHASE_W-1){1'b0}}};
    phase     = theta + half_turn + psi_ext;
  end

  initial begin
    assert (ERR_W <= PHASE_W) else $error("psi must fit the phase word");
  end

endmodule
