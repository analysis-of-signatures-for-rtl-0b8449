// obs_compressor: folds an N-bit observed vector into one W-bit word.
//
// How it works: the input is extended with zeros on its most significant side
// to the next multiple of W (a 66-bit input becomes 96 bits, 30 zeros in
// front), then cut into K = ceil(N/W) chunks of W bits. The chunks are
// combined from the most significant one down to chunk 0 by a chain of
// "rotate the running word right by one bit, then XOR the next chunk":
//     acc = 0;  for i = K-1 .. 0:  acc = rotr1(acc) ^ chunk[i]
// The rotation is what distinguishes this compressor from a plain XOR fold:
// with a plain fold two equal chunks cancel and a non-zero input yields an
// all-zero (void) word, which downstream cannot be told apart from a reset
// signature register. With the rotation, two equal chunks only cancel when
// the chunk is invariant under a one-bit rotation (all zeros or all ones).
// The fold is still linear, so for N > W there remain 2^(N-W)-1 non-zero
// inputs that fold to zero (with two chunks: chunk0 = rotr1(chunk1)). The
// rotation moves the void set away from repeated data, the common case on a
// bus, but cannot empty it.
// Because the chain starts from zero, leading all-zero chunks do not change
// the result, so a narrower vector zero-extended to N bits folds to the same
// word as it would in a compressor sized exactly for it.
//
// Interface: in_valid/in_data are sampled every clock; out_valid/out_data
// show the folded word one clock later (registered output). Reset is
// asynchronous, active low, and clears out_valid and out_data.
//
// Taken from the design description: zero prefixing of a partial chunk,
// W-bit chunking, XOR combining, and the rotate-by-one before each XOR of the
// updated compressor (its running word has bit 0 moved to the top). Own
// choices: the chunk order (most significant first), the one-cycle
// registered output, and the reset behaviour.
module obs_compressor #(
  parameter int unsigned N = obs_pkg::IN_W,   // observed bus width
  parameter int unsigned W = obs_pkg::SIG_W   // compressed word width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  localparam int unsigned K = (N + W - 1) / W;   // number of W-bit chunks

  logic [K*W-1:0] padded;
  logic [W-1:0]   folded;

  // Zero prefix up to a whole number of chunks.
  always_comb begin
    padded         = '0;
    padded[N-1:0]  = in_data;
  end

  // Rotate-right-by-one / XOR chain, most significant chunk first.
  always_comb begin
    folded = '0;
    for (int i = K - 1; i >= 0; i--) begin
      folded = {folded[0], folded[W-1:1]} ^ padded[i*W +: W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= folded;
    end
  end

endmodule
