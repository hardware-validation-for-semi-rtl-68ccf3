// sc_pkg - shared constants and types of the semi-coherent TRANSEC chip modem.
//
// A chip phase is an unsigned PHASE_W-bit word on an M = 2^PHASE_W point PSK
// circle (M = 256). The transmitter adds a small zero-mean phase error psi,
// drawn from M_RANGE = m consecutive phase states, to every chip. The
// constants below are the main configuration of the design: M = 256,
// m = 67 (about 0.5 dB average chip-energy loss), a 12-bit perturbation word
// and N = 175 chips per data symbol. Sample width, PRNG moduli and seed format
// are choices of this implementation.
package sc_pkg;

  localparam int unsigned DEF_PHASE_W  = 8;    // M = 256 phase states
  localparam int unsigned DEF_PERT_W   = 12;   // perturbation PRNG word
  localparam int unsigned DEF_M_RANGE  = 67;   // number of perturbation states m
  localparam int unsigned DEF_N_CHIPS  = 175;  // chips per data symbol
  localparam int unsigned DEF_IQ_W     = 12;   // signed chip sample width

  // Residue number system PRNG: NUM_RES residues of RES_W bits each.
  localparam int unsigned NUM_RES  = 4;
  localparam int unsigned RES_W    = 8;

  typedef int unsigned moduli_t [NUM_RES];
  typedef logic [NUM_RES-1:0][RES_W-1:0] seed_t;

  // Co-prime residue sets: one for the keyed bulk-phase generator, a disjoint
  // one for the unsynchronized perturbation generator, so the two sequences
  // are independent.
  localparam moduli_t BULK_MODULI = '{251, 241, 239, 233};
  localparam moduli_t PERT_MODULI = '{229, 227, 223, 211};

  // Signed width that holds the error range [-(m/2) : m/2].
  function automatic int unsigned err_width(input int unsigned m);
    return $clog2(m);
  endfunction

endpackage
