// ft_array_multiplier: WIDTH x WIDTH unsigned array multiplier built from
// self-repairing full adders (4 x 4 by default).
//
// Structure. WIDTH*WIDTH AND gates form the partial products
// pp[r][j] = a[j] & b[r]. Row 0 needs no adder: its lowest bit is p[0] and
// the rest is the running sum. Each of the WIDTH-1 following rows is a
// WIDTH-bit ripple-carry adder of self_repairing_fa cells that adds partial
// product row r to the running sum shifted down by one; the row's lowest sum
// bit is product bit p[r], and its carry out becomes the top bit of the next
// running sum. The last row's sum and carry form the upper half of the
// product. Cells that would be half adders are full adders with a carry in
// of 0, so the 4 x 4 multiplier has 16 AND gates and 12 adder cells.
//
// Fault tolerance. Every adder cell checks and repairs its own sum and carry
// (see self_repairing_fa), so a fault at any cell output -- or at both
// outputs of a cell, or in several cells at once -- never reaches the
// product. fs[k] and fc[k] report which cells saw a sum or carry fault.
//
// Interface:
//   a, b    operands, WIDTH bits each, unsigned
//   fault   fault at the outputs of adder cell k, k = (r-1)*WIDTH + j for
//           row r (1..WIDTH-1) and bit j (0..WIDTH-1); all FAULT_NONE in
//           normal use
//   p       product, 2*WIDTH bits
//   fs, fc  per-cell sum and carry fault flags, indexed like `fault`
// Timing: purely combinational; the critical path runs through the ripple
// carries of all WIDTH-1 rows.
//
// The AND-array plus self-repairing adders and the 4-bit size follow the
// published design; the ripple-row arrangement of the 12 cells, the fault
// port and the flag outputs are this design's choices.
module ft_array_multiplier
  import fa_fault_pkg::*;
#(
  parameter int unsigned WIDTH  = 4,
  localparam int unsigned NUM_FA = WIDTH * (WIDTH - 1)
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  fa_fault_t          fault [NUM_FA],
  output logic [2*WIDTH-1:0] p,
  output logic [NUM_FA-1:0]  fs,
  output logic [NUM_FA-1:0]  fc
);

  // Partial products: pp[r][j] = a[j] & b[r].
  logic [WIDTH-1:0] pp [WIDTH];

  // Running sum entering row r (already shifted down by one), and each
  // row's sum and carry outputs.
  logic [WIDTH-1:0] acc   [WIDTH];
  logic [WIDTH-1:0] rsum  [WIDTH];
  logic [WIDTH-1:0] rcarry[WIDTH];

  always_comb begin
    for (int r = 0; r < WIDTH; r++) begin
      pp[r] = a & {WIDTH{b[r]}};
    end
  end

  // Row 0: partial product 0 passes straight into the running sum.
  assign acc[0]    = pp[0];
  assign rsum[0]   = '0;
  assign rcarry[0] = '0;
  assign p[0]      = pp[0][0];

  for (genvar r = 1; r < WIDTH; r++) begin : g_row
    // Running sum for this row: previous row's upper bits shifted down, with
    // the previous row's carry out on top (0 after row 0).
    logic [WIDTH-1:0] in_sum;
    assign in_sum = {rcarry[r-1][WIDTH-1], acc[r-1][WIDTH-1:1]};

    for (genvar j = 0; j < WIDTH; j++) begin : g_bit
      localparam int unsigned K = (r - 1) * WIDTH + j;
      logic cin;
      if (j == 0) begin : g_first
        assign cin = 1'b0;
      end else begin : g_rest
        assign cin = rcarry[r][j-1];
      end

      self_repairing_fa u_fa (
        .a     (pp[r][j]),
        .b     (in_sum[j]),
        .cin   (cin),
        .fault (fault[K]),
        .sum   (rsum[r][j]),
        .cout  (rcarry[r][j]),
        .fs    (fs[K]),
        .fc    (fc[K])
      );
    end

    assign acc[r] = rsum[r];
    assign p[r]   = rsum[r][0];
  end

  // Upper half of the product: last row's remaining sum bits and carry out.
  assign p[2*WIDTH-1:WIDTH] = {rcarry[WIDTH-1][WIDTH-1], rsum[WIDTH-1][WIDTH-1:1]};

endmodule
