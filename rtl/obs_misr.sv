// obs_misr: W-bit multiple-input signature register that can also run as an
// autonomous LFSR.
//
// How it works: an internal-feedback (Galois) shift register whose stages
// shift from stage W-1 down to stage 0. The output of stage 0 is fed back to
// the input of stage W-1 and XORed into the stages selected by the
// characteristic polynomial; in MISR mode each stage also XORs one bit of the
// parallel data word (bit i into stage i). With POLY holding the
// coefficient of x^k in bit k, one step is
//     fb      = sig[0]
//     sig_nxt = (sig >> 1) ^ (fb ? reverse(POLY) : 0) ^ data
// The default polynomial is x^32+x^25+x^15+x^7+1.
//
// Modes (lfsr_mode): 1 = LFSR, the register steps on every clock with the
// data inputs ignored; 0 = MISR, the register steps only on clocks where
// in_valid is 1, absorbing in_data. seed_load loads `seed` (use it to start
// the LFSR from a non-zero state); clear returns the register to zero.
// Priority: seed_load, then clear, then stepping. The signature is the
// register itself, valid on the clock after the last absorbed word.
// Reset is asynchronous, active low, to zero.
//
// Taken from the design description: parallel inputs and outputs, the
// polynomial, the LFSR/MISR selection by one enable, the stage order and the
// stage-0 feedback into stage W-1 of the 16-bit register drawing. Own
// choices: the Galois form for every width, the seed and clear controls, and
// that the LFSR mode steps on every clock.
module obs_misr #(
  parameter int unsigned  W    = obs_pkg::SIG_W,
  parameter logic [W-1:0] POLY = W'(obs_pkg::POLY32)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         lfsr_mode,   // 1: LFSR, 0: MISR
  input  logic         seed_load,
  input  logic [W-1:0] seed,
  input  logic         clear,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic [W-1:0] signature
);

  logic [W-1:0] fb_mask;   // POLY bit-reversed: stage i takes coefficient of x^(W-1-i)
  logic [W-1:0] sig_nxt;

  always_comb begin
    for (int i = 0; i < W; i++) fb_mask[i] = POLY[W-1-i];
  end

  always_comb begin
    sig_nxt = (signature >> 1) ^ (signature[0] ? fb_mask : '0);
    if (!lfsr_mode) sig_nxt = sig_nxt ^ in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     signature <= '0;
    else if (seed_load)             signature <= seed;
    else if (clear)                 signature <= '0;
    else if (lfsr_mode || in_valid) signature <= sig_nxt;
  end

  // With the x^0 coefficient set, an LFSR step is invertible: a non-zero
  // state never steps to zero.
  a_lfsr_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (POLY[0] && lfsr_mode && !seed_load && !clear && signature != '0) |=> signature != '0);

endmodule
