// reverser: turns a batch of S stream bits into S distinct S-bit messages.
//
// Each stream contributes one data bit. The reverser builds a table with one
// row per stream, the data bit in the rightmost column, and adds S-1
// auxiliary columns from right to left so that in the end all rows differ
// (the batch becomes a one-to-one map):
//   column 1: the first ceil(S/2) rows get 0, the others 1;
//   column c > 1: rows whose columns 0..c-1 equal those of other rows form a
//     group; in a group of n rows the first ceil(n/2) get 1 and the rest 0.
//     A row that is already unique gets the complement of its column c-1.
// Each split at least halves a group, so S-1 columns always suffice.
// Row i is the message of stream i; bit S-1 is sent first and bit 0 (the
// data bit) last. For S = 3 and data {1,1,1} it yields 101, 001, 011.
// How odd group sizes are halved, and applying the complement rule when all
// rows are already unique, are this design's reading of the construction.
// Purely combinational, O(S^3) bit comparisons.
module reverser #(
  parameter int unsigned S = 3    // streams in a batch, >= 1
) (
  input  logic [S-1:0]         data,   // bit i: data bit of stream i
  output logic [S-1:0][S-1:0]  msgs    // msgs[i]: message of stream i
);
  always_comb begin
    logic [S-1:0] mask;
    int unsigned  n, r;
    for (int i = 0; i < S; i++) begin
      msgs[i]    = '0;
      msgs[i][0] = data[i];
    end
    if (S >= 2) begin
      for (int i = 0; i < S; i++) msgs[i][1] = (i >= (S + 1) / 2);
    end
    for (int c = 2; c < S; c++) begin
      mask = S'((1 << c) - 1);             // columns 0..c-1 already built
      for (int i = 0; i < S; i++) begin
        n = 0;
        r = 0;
        for (int j = 0; j < S; j++) begin
          if ((msgs[j] & mask) == (msgs[i] & mask)) begin
            n++;
            if (j < i) r++;
          end
        end
        if (n == 1) msgs[i][c] = ~msgs[i][c-1];
        else        msgs[i][c] = (r < (n + 1) / 2);
      end
    end
  end
endmodule
