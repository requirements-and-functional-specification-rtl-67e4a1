// sync_bits: brings asynchronous board-level status lines (DONE lines,
// power-good lines, CHIP_ENA, board ID straps) into the MCB clock domain.
//
// A chain of STAGES flip-flops per bit; the output follows the input STAGES
// clock edges later. Reset clears the chain. The specification does not
// describe synchronisation; this is a design choice so that the registers
// read by the MCB and the power-error detector see clean, clocked values.
module sync_bits #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [STAGES-1:0][WIDTH-1:0] chain;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) chain <= '0;
    else     chain <= {chain[STAGES-2:0], d};
  end

  assign q = chain[STAGES-1];

  initial assert (STAGES >= 2) else $error("sync_bits needs at least two stages");
endmodule
