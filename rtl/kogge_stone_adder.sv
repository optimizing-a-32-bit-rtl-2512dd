// kogge_stone_adder: parallel-prefix (Kogge-Stone) adder.
//
// Bit generate/propagate pairs are combined in log2(WIDTH) prefix levels; at
// level l every position i merges with position i-2^l, so every carry is
// ready after the same number of levels at the cost of many wires.  cin
// enters as the generate term below bit 0.  The ALU uses a 32-bit instance;
// the address incrementer uses another with cin tied low.  Combinational.
module kogge_stone_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             c_msb    // carry into the most significant bit
);
  localparam int LEVELS = $clog2(WIDTH);
  logic [WIDTH-1:0] g [LEVELS+1];
  logic [WIDTH-1:0] p [LEVELS+1];
  logic [WIDTH:0]   carry;

  always_comb begin
    g[0] = a & b;
    p[0] = a ^ b;
    // fold cin into bit 0's generate
    g[0][0] = (a[0] & b[0]) | (p[0][0] & cin);
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < WIDTH; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (1 << l)]);
          p[l+1][i] = p[l][i] & p[l][i - (1 << l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    carry[0] = cin;
    for (int i = 0; i < WIDTH; i++) carry[i+1] = g[LEVELS][i];
    sum    = (a ^ b) ^ carry[WIDTH-1:0];
    cout   = carry[WIDTH];
    c_msb  = carry[WIDTH-1];
  end
endmodule
