// reloc_limiter: sliding-window budget for elbow relocations.
//
// Relocations cost a full block read and write, so at most MAX_RELOC of them
// are allowed in any WINDOW consecutive misses (16 in 64 by default, i.e. one
// per four misses on average). A shift register remembers, for each of the
// last WINDOW-1 misses, whether it relocated, and a counter holds how many
// ones it contains. `allow` is high while that count is below MAX_RELOC, so a
// relocation made now keeps the window including this miss within budget.
// The 16-in-64 budget is the described one; counting the current miss in the
// window is this design's choice.
//
// Interface: miss pulses once per replacement; relocated tells whether that
// replacement relocated (ignored without miss). allow is combinational from
// registers. Reset empties the window.
module reloc_limiter #(
  parameter int unsigned WINDOW    = elbow_pkg::RELOC_WINDOW,
  parameter int unsigned MAX_RELOC = elbow_pkg::RELOC_MAX
) (
  input  logic clk,
  input  logic rst_n,
  input  logic miss,
  input  logic relocated,
  output logic allow,
  output logic [$clog2(WINDOW+1)-1:0] in_window
);
  logic [WINDOW-2:0] hist;   // hist[0] is the most recent miss

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist      <= '0;
      in_window <= '0;
    end else if (miss) begin
      hist      <= {hist[WINDOW-3:0], relocated};
      in_window <= in_window + ($clog2(WINDOW+1))'(relocated)
                             - ($clog2(WINDOW+1))'(hist[WINDOW-2]);
    end
  end

  assign allow = (in_window < ($clog2(WINDOW+1))'(MAX_RELOC));
endmodule
