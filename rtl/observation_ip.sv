// observation_ip: observation (test/debug) IP that turns the traffic on an
// N-bit bus into two W-bit signatures.
//
// How it works: each valid N-bit bus word enters the compressor, which folds
// it into one W-bit word (zero prefix, W-bit chunks, rotate-then-XOR chain).
// The folded word goes to two collectors side by side:
//   - the MISR, whose signature depends on the order of the words, and
//   - the data accumulation unit, whose sum does not.
// Comparing either signature with a golden value after a test tells a good
// device from a faulty one. The MISR can instead run as an LFSR
// (lfsr_mode = 1), stepping every clock and ignoring the data.
//
// Timing: a bus word sampled at clock edge t appears on comp_valid/comp_data
// after edge t and is absorbed into both signatures at edge t+1, so the
// signatures include it from edge t+1 on: two clocks from bus to signature.
//
// Interface: clear and seed_load/seed act on the collectors; comp_valid and
// comp_data bring the folded stream out for debug logic, which the design
// description names but does not define. Reset is asynchronous, active low.
//
// Taken from the design description: the block structure (compressor feeding
// MISR and data accumulation unit), the 32-bit signature width and
// polynomial of the updated design, and the updated compressor. Own choices:
// the default bus width of 66 bits (its worked example), the control ports
// and the pipeline register in the compressor.
module observation_ip #(
  parameter int unsigned  N    = obs_pkg::IN_W,
  parameter int unsigned  W    = obs_pkg::SIG_W,
  parameter logic [W-1:0] POLY = W'(obs_pkg::POLY32)
) (
  input  logic         clk,
  input  logic         rst_n,
  // observed traffic
  input  logic         in_valid,
  input  logic [N-1:0] in_data,
  // signature control
  input  logic         lfsr_mode,
  input  logic         seed_load,
  input  logic [W-1:0] seed,
  input  logic         clear,
  // compressed stream, for debug logic
  output logic         comp_valid,
  output logic [W-1:0] comp_data,
  // signatures
  output logic [W-1:0] misr_signature,
  output logic [W-1:0] accum_signature
);

  obs_compressor #(.N(N), .W(W)) u_comp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_data  (in_data),
    .out_valid(comp_valid),
    .out_data (comp_data)
  );

  obs_misr #(.W(W), .POLY(POLY)) u_misr (
    .clk      (clk),
    .rst_n    (rst_n),
    .lfsr_mode(lfsr_mode),
    .seed_load(seed_load),
    .seed     (seed),
    .clear    (clear),
    .in_valid (comp_valid),
    .in_data  (comp_data),
    .signature(misr_signature)
  );

  obs_data_accum #(.W(W)) u_accum (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .in_valid (comp_valid),
    .in_data  (comp_data),
    .accum    (accum_signature)
  );

endmodule
