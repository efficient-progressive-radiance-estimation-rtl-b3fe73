// delay_line: WIDTH-bit shift register of DEPTH stages (DEPTH >= 1).
//
// d presented before a rising edge appears on q DEPTH edges later.  Used in
// the PREU to carry operands and tags alongside the arithmetic units so that
// they meet the unit outputs in the right cycle.  No reset: contents are only
// meaningful together with a valid bit carried in a reset delay line.
module delay_line #(
    parameter int unsigned WIDTH = 32,
    parameter int unsigned DEPTH = 2
) (
    input  logic             clk,
    input  logic [WIDTH-1:0] d,
    output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] r [DEPTH];

  always_ff @(posedge clk) begin
    r[0] <= d;
    for (int i = 1; i < int'(DEPTH); i++) r[i] <= r[i-1];
  end

  assign q = r[DEPTH-1];

endmodule
