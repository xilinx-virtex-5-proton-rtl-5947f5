// tmr_voter: bitwise 2-of-3 majority voter used by the triple modular
// redundancy (TMR) in the DUT. Each output bit is the majority of the three
// corresponding input bits, so a single upset copy is outvoted.
// Purely combinational; WIDTH sets the bus width (default 1).
module tmr_voter #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);
  always_comb y = (a & b) | (a & c) | (b & c);
endmodule
