// sc_counter: derandomizer that turns a bitstream back into a binary
// number by counting its ones.
//
// Every enabled cycle the count grows by the input bit. After 2^K enabled
// cycles the count divided by 2^K is the stream's probability; the count
// is K+1 bits wide so a stream of all ones (2^K) fits. clear zeroes it.
// The count is registered: a bit sampled at an edge is in the count after
// that edge.
module sc_counter
  import sc_pkg::*;
#(
  parameter int unsigned K = K_DEFAULT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic       bit_in,
  output logic [K:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              count <= '0;
    else if (clear)          count <= '0;
    else if (en && bit_in)   count <= count + (K+1)'(1);
  end

endmodule
