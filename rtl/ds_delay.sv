// ds_delay: delay line of DEPTH digit registers between two adders of the
// filter.
//
// A digit-serial sample occupies 2W/N cycles, so a delay of one sample in the
// inverted-form filter is a chain of 2W/N registers, each WIDTH bits wide
// (the digit width at that point of the adder chain).  q is d delayed by
// DEPTH rising clock edges.  The registers are cleared by the asynchronous
// active-low reset, so the filter starts from zero history; that reset is
// this implementation's choice.
module ds_delay #(
  parameter int WIDTH = 4,                // digit width at this point of the chain
  parameter int DEPTH = 4                 // 2W/N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] sr [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else begin
      sr[0] <= d;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  assign q = sr[DEPTH-1];

endmodule
