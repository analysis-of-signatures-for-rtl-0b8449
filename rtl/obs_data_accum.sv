// obs_data_accum: order-independent signature of the compressed stream.
//
// How it works: a W-bit accumulator adds every valid input word to the total
// of all earlier words, acc(n+1) = acc(n) + data(n), modulo 2^W. Because
// addition commutes, the same set of words gives the same result in any
// order, which complements the order-dependent MISR signature.
//
// Interface: in_valid/in_data are absorbed on the clock edge where in_valid
// is 1; accum shows the running total from the next clock. clear sets the
// total to zero. Reset is asynchronous, active low, to zero.
//
// Taken from the design description: the recurrence "data for cycle n+1 =
// data in cycle n + data till cycle n-1" and the order independence. Own
// choices: the "+" is read as binary addition with the carry out of bit W-1
// dropped; the clear input.
module obs_data_accum #(
  parameter int unsigned W = obs_pkg::SIG_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic [W-1:0] accum
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        accum <= '0;
    else if (clear)    accum <= '0;
    else if (in_valid) accum <= accum + in_data;
  end

endmodule
