// mc_timer: the Macro-Cell's TIMER.
//
// An 8-bit counter advanced once per data word, i.e. at half the input clock
// (125 MHz, 8 ns per count), so it wraps every 256 x 8 ns = 2.048 us, the
// "2 usec" quoted for the original chip. Its value tags each word so that the relative
// time of zero-suppressed words can be rebuilt. `tag` is the value belonging
// to the word presented on the same clock as `ce`; the counter advances on
// that edge. `terminal` is high while tag is all ones: the word carrying that
// tag is the one at which the timer overflows, and the zero suppression
// always keeps it (as in the original design: address increment on TIMER overflow).
module mc_timer #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,        // one pulse per data word
  output logic [WIDTH-1:0] tag,
  output logic             terminal   // tag == 2**WIDTH-1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  tag <= '0;
    else if (ce) tag <= tag + 1'b1;
  end

  assign terminal = &tag;

endmodule
