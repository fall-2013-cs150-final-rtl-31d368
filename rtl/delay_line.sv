// delay_line: clock-enabled shift register of DEPTH samples (the "SR"
// block of the Gaussian wrapper).
//
// Each cycle with ce high, q takes the sample that entered DEPTH enabled
// cycles earlier and d is stored. Built as a circular buffer (one array
// read and one write per enabled cycle) instead of DEPTH chained
// registers; the behaviour is that of a DEPTH-stage shift register whose
// last stage is q. q is registered and changes the cycle after ce.
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 802
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  always_ff @(posedge clk) begin
    if (ce) mem[ptr] <= d;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
      q   <= '0;
    end else if (ce) begin
      ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      q   <= mem[ptr];
    end
  end
endmodule
