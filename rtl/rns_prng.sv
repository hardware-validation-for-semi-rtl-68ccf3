// rns_prng - residue number system pseudorandom generator.
//
// The generator state is a time index held in residue form: NUM_RES counters,
// counter k running modulo the prime MODULI[k]. Because the moduli are
// co-prime, the residue vector only repeats after their product (about 3e9
// steps for either default set), and each residue can be advanced, loaded or
// compared on its own with a narrow adder. Each residue addresses a small ROM
// of pseudorandom words; the ROM outputs are XORed into the OUT_W-bit result.
// Two instances with disjoint residue sets (and different SALT) give two
// independent sequences: the keyed bulk chip phase (OUT_W = 8) and the
// unsynchronized perturbation word (OUT_W = 12).
//
// The document fixes only the kind of generator (RNS based), its output widths
// and that two generators become independent through co-prime residue sets.
// The counters, the ROM contents (an integer hash evaluated at elaboration)
// and the XOR combiner are this design's own, simplest choice.
//
// Interface and timing: load copies seed (one residue per RES_W field,
// reduced modulo its modulus) into the state, already advanced by LOAD_SKIP
// steps: in residue form a jump ahead is one modular add per residue, which
// lets a receiver that finds a frame late join the code without stepping
// through it. advance steps all residues by one. load has priority. rnd is combinational from the current state, so it
// shows the value for the chip in progress and changes one cycle after an
// advance.
module rns_prng
  import sc_pkg::*;
#(
  parameter int unsigned OUT_W  = 8,
  parameter moduli_t     MODULI = BULK_MODULI,
  parameter logic [31:0] SALT   = 32'h0,
  parameter int unsigned LOAD_SKIP = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  seed_t            seed,
  input  logic             advance,
  output logic [OUT_W-1:0] rnd
);

  typedef logic [OUT_W-1:0] rom_t [2**RES_W];

  // 32-bit avalanche hash of (salt, residue index, residue value).
  function automatic logic [31:0] mix(input logic [31:0] salt, input int unsigned k,
                                      input int unsigned x);
    logic [31:0] h;
    h = (32'(x) * 32'h9E37_79B1) + (32'(k + 1) * 32'h85EB_CA77) + salt;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  function automatic rom_t make_rom(input int unsigned k);
    rom_t r;
    for (int unsigned x = 0; x < 2**RES_W; x++) begin
      r[x] = OUT_W'(mix(SALT, k, x) >> (32 - OUT_W));
    end
    return r;
  endfunction

  seed_t            res_q;
  logic [OUT_W-1:0] rom_out [NUM_RES];

  for (genvar k = 0; k < NUM_RES; k++) begin : g_res
    localparam logic [RES_W-1:0] PK = RES_W'(MODULI[k]);
    localparam logic [RES_W-1:0] SK = RES_W'(LOAD_SKIP % MODULI[k]);
    logic [RES_W:0] start_res;

    // seed residue advanced by LOAD_SKIP chips, reduced modulo p
    always_comb begin
      start_res = {1'b0, RES_W'(seed[k] % PK)} + {1'b0, SK};
      if (start_res >= {1'b0, PK}) start_res = start_res - {1'b0, PK};
    end

    localparam rom_t ROM = make_rom(k);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        res_q[k] <= '0;
      end else if (load) begin
        res_q[k] <= start_res[RES_W-1:0];
      end else if (advance) begin
        res_q[k] <= (res_q[k] == PK - 1'b1) ? '0 : res_q[k] + 1'b1;
      end
    end

    assign rom_out[k] = ROM[res_q[k]];
  end

  // ROM look-ups combined by XOR.
  always_comb begin
    rnd = '0;
    for (int k = 0; k < NUM_RES; k++) begin
      rnd = rnd ^ rom_out[k];
    end
  end

endmodule
