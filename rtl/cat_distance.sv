// cat_distance: age of a block in CAT timestamp units.
//
// d = T_curr - T_st when T_curr >= T_st, else T_curr + 2^n - T_st, with n the
// timestamp width: the number of timestamp periods since the block was last
// touched, allowing for one wrap of the counter. Larger d means older.
// Combinational.
module cat_distance #(
  parameter int unsigned TS_W = elbow_pkg::TS_W
) (
  input  logic [TS_W-1:0] t_curr,
  input  logic [TS_W-1:0] t_st,
  output logic [TS_W-1:0] age
);
  logic [TS_W:0] wide;

  always_comb begin
    if (t_curr >= t_st) wide = {1'b0, t_curr} - {1'b0, t_st};
    else                wide = {1'b0, t_curr} + (TS_W+1)'(1 << TS_W) - {1'b0, t_st};
    age = wide[TS_W-1:0];
  end
endmodule
