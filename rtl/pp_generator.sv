// pp_generator: partial product layer of the multiplier.
//
// How it works. An N x N array of two-input ANDs forms the unsigned partial
// product matrix: row r holds a & {N{b[r]}}, i.e. pp[r][c] = a[c] & b[r],
// and carries the weight 2^(r + c). Rows are delivered unshifted; the
// reduction tree applies the weight of each row.
//
// Interface: a, b (N bits each) -> pp, N rows of N bits (pp[r] = row r).
// Purely combinational.
//
// The AND-array generation of unsigned partial products follows the
// document; it names no Booth recoding for this design.
module pp_generator #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp
);

  always_comb begin
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) begin
        pp[r][c] = a[c] & b[r];
      end
    end
  end

endmodule
