// sync_2ff -- multi-flop synchroniser for a single-bit level crossing into
// the clock domain of clk.
//
// The input is sampled by a chain of STAGES flip-flops; the last one drives
// the output, so a change on d shows on q after STAGES rising edges of clk.
// The bridge carries its PENDWR, PENDRD and PDONE handshake levels through
// one of these in each direction. Reset (active low, asynchronous) clears
// the chain. STAGES = 2 is this design's choice.
module sync_2ff #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else        chain <= {chain[STAGES-2:0], d};
  end

  assign q = chain[STAGES-1];

  initial assert (STAGES >= 2) else $error("sync_2ff needs at least two stages");

endmodule
