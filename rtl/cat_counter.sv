// cat_counter: global Cache Allocation Tick counter.
//
// A k-bit counter, k = log2(blocks) + 2, that advances by one each time a new
// block is allocated in the cache (never on hits or on plain cycles), so the
// timestamp resolution follows the miss rate. Its TS_W most significant bits
// are the current timestamp written to any block that is accessed or filled.
// The counter wraps; distances are taken modulo 2^TS_W. The counter widths
// are the described ones; reset to zero is this design's choice.
//
// Interface: alloc is a one-cycle pulse per allocation; count/ts are
// registered and show the new value the cycle after the pulse. Reset to zero.
module cat_counter #(
  parameter int unsigned CAT_W = elbow_pkg::CAT_W,
  parameter int unsigned TS_W  = elbow_pkg::TS_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             alloc,
  output logic [CAT_W-1:0] count,
  output logic [TS_W-1:0]  ts
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (alloc) count <= count + 1'b1;
  end

  assign ts = count[CAT_W-1 -: TS_W];
endmodule
