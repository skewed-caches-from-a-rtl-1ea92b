// timestamp_array: per-bank store of CAT timestamps.
//
// A separate small array beside each way-bank holds one TS_W-bit timestamp
// per line (5 bits per 64-byte block, about 2% of the data array). A new
// timestamp simply overwrites the old one, so no read-modify-write is needed.
// Entries are not reset: a timestamp is only used for a valid line, and every
// fill writes it.
//
// Interface: en with we=0 reads entry idx into rts on the next cycle; en with
// we=1 writes wts. Single port.
module timestamp_array #(
  parameter int unsigned INDEX_W = elbow_pkg::INDEX_W,
  parameter int unsigned TS_W    = elbow_pkg::TS_W
) (
  input  logic               clk,
  input  logic               en,
  input  logic               we,
  input  logic [INDEX_W-1:0] idx,
  input  logic [TS_W-1:0]    wts,
  output logic [TS_W-1:0]    rts
);
  logic [TS_W-1:0] mem [1 << INDEX_W];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[idx] <= wts;
      else    rts      <= mem[idx];
    end
  end
endmodule
