// alt_location: where else a resident block could live.
//
// A block at index idx of bank `bank` with stored tag `tag` (address bits
// a_18..a_0) has a unique address: the page-offset field b_12..b_6 is
// recovered by undoing that bank's skewing XOR, since A1 = a_7..a_1 is part of
// the tag. The recovered block address is then skewed again and the other
// bank's index is its alternate location. The elbow cache uses this to find
// the secondary replacement candidates and the target of a relocation.
// Storing all translated bits as the tag, and recovering the address from it,
// is this design's way of computing the alternate location.
//
// Interface: blk_addr is the reconstructed block address (offset bits zero),
// alt_idx the index in bank !bank. Combinational.
module alt_location #(
  parameter int unsigned ADDR_W   = elbow_pkg::ADDR_W,
  parameter int unsigned OFFSET_W = elbow_pkg::OFFSET_W,
  parameter int unsigned PAGE_W   = elbow_pkg::PAGE_W,
  parameter int unsigned XOR_W    = PAGE_W - OFFSET_W,
  parameter int unsigned INDEX_W  = XOR_W + 1,
  parameter int unsigned TAG_W    = ADDR_W - PAGE_W
) (
  input  logic               bank,
  input  logic [INDEX_W-1:0] idx,
  input  logic [TAG_W-1:0]   tag,
  output logic [ADDR_W-1:0]  blk_addr,
  output logic [INDEX_W-1:0] alt_idx
);
  logic [XOR_W-1:0]   a1, a1_rot, a2;
  logic [INDEX_W-1:0] i0, i1;

  always_comb begin
    a1       = tag[XOR_W:1];
    a1_rot   = {a1[XOR_W-2:0], a1[XOR_W-1]};
    a2       = idx[XOR_W-1:0] ^ (bank ? a1_rot : a1);
    blk_addr = {tag, a2, {OFFSET_W{1'b0}}};
  end

  skew_index #(
    .ADDR_W(ADDR_W), .OFFSET_W(OFFSET_W), .PAGE_W(PAGE_W),
    .XOR_W(XOR_W), .INDEX_W(INDEX_W)
  ) u_skew (
    .blk_addr(blk_addr), .idx0(i0), .idx1(i1)
  );

  assign alt_idx = bank ? i0 : i1;
endmodule
