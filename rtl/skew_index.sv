// skew_index: the two XOR skewing functions of the 2-way skewed cache.
//
// Bank 0 is indexed by f1(A) = A1 ^ A2 and bank 1 by f2(A) = sigma(A1) ^ A2,
// where sigma is a one-bit rotation. A2 is the untranslated page-offset field
// b_12..b_6 (available early), A1 is a_7..a_1 from the translated part, and
// the translated bit a_0 is passed straight through as the index MSB. This
// restricted form is the one the design uses so that the XOR can be a fast
// pass-transistor gate whose early input is the page-offset bit; here it is
// plain combinational logic. Taking sigma as a left rotation and A1 as the
// rotated set are choices of this design.
//
// Interface: blk_addr is the byte address (offset bits ignored); idx0/idx1 are
// the bank indices. Purely combinational, no timing.
module skew_index #(
  parameter int unsigned ADDR_W   = elbow_pkg::ADDR_W,
  parameter int unsigned OFFSET_W = elbow_pkg::OFFSET_W,
  parameter int unsigned PAGE_W   = elbow_pkg::PAGE_W,
  parameter int unsigned XOR_W    = PAGE_W - OFFSET_W,
  parameter int unsigned INDEX_W  = XOR_W + 1
) (
  input  logic [ADDR_W-1:0]  blk_addr,
  output logic [INDEX_W-1:0] idx0,
  output logic [INDEX_W-1:0] idx1
);
  logic [XOR_W-1:0] a1, a2, a1_rot;
  logic             a0;

  always_comb begin
    a2     = blk_addr[PAGE_W-1:OFFSET_W];            // b_12..b_6
    a0     = blk_addr[PAGE_W];                       // a_0
    a1     = blk_addr[PAGE_W+XOR_W:PAGE_W+1];        // a_7..a_1
    a1_rot = {a1[XOR_W-2:0], a1[XOR_W-1]};           // sigma(A1)
    idx0   = {a0, a1 ^ a2};
    idx1   = {a0, a1_rot ^ a2};
  end
endmodule
