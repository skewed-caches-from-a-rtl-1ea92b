// victim_select: elbow-cache replacement decision for one miss.
//
// Candidates: A and B are the blocks in the two slots the missing block X can
// use (bank 0 and bank 1); C is the block at A's alternate location (bank 1)
// and D the block at B's alternate location (bank 0). An empty primary slot
// is used first (bank 0 before bank 1). Otherwise the candidate with the
// largest CAT distance is the victim. If that is a secondary candidate, the
// primary whose alternate slot it holds is moved there and X takes the freed
// primary slot; this relocation is only made when the moved block is young
// (distance <= MAX_DIST) and the sliding-window limiter allows it. When it is
// refused the older primary is evicted instead. An empty secondary slot
// counts as older than any valid block. Ties go to bank 0 over bank 1 and
// to primaries over secondaries; these tie rules are choices of this design.
//
// Interface: valid/age indexed by elbow_pkg::cand_e. Outputs: victim,
// fill_bank (bank receiving X), relocate, and flags for statistics.
// Combinational.
module victim_select #(
  parameter int unsigned TS_W     = elbow_pkg::TS_W,
  parameter int unsigned MAX_DIST = elbow_pkg::RELOC_MAX_DIST
) (
  input  logic [3:0]           valid,
  input  logic [3:0][TS_W-1:0] age,
  input  logic                 reloc_allowed,
  output elbow_pkg::cand_e     victim,
  output logic                 fill_bank,
  output logic                 relocate,
  output logic                 fill_invalid,
  output logic                 reloc_by_age,
  output logic                 reloc_by_window
);
  import elbow_pkg::*;

  logic [TS_W:0] age_c, age_d, age_p, age_s;
  cand_e         prim, sec;
  logic          moved_young;

  always_comb begin
    victim          = CAND_A;
    fill_bank       = 1'b0;
    relocate        = 1'b0;
    fill_invalid    = 1'b0;
    reloc_by_age    = 1'b0;
    reloc_by_window = 1'b0;
    prim            = CAND_A;
    sec             = CAND_C;
    moved_young     = 1'b0;
    age_c = valid[CAND_C] ? {1'b0, age[CAND_C]} : {1'b1, {TS_W{1'b0}}};
    age_d = valid[CAND_D] ? {1'b0, age[CAND_D]} : {1'b1, {TS_W{1'b0}}};
    age_p = '0;
    age_s = '0;

    if (!valid[CAND_A]) begin
      victim       = CAND_A;
      fill_bank    = 1'b0;
      fill_invalid = 1'b1;
    end else if (!valid[CAND_B]) begin
      victim       = CAND_B;
      fill_bank    = 1'b1;
      fill_invalid = 1'b1;
    end else begin
      // oldest primary
      if (age[CAND_B] > age[CAND_A]) prim = CAND_B;
      else                             prim = CAND_A;
      age_p = {1'b0, age[prim]};
      // oldest secondary
      if (age_d > age_c) begin sec = CAND_D; age_s = age_d; end
      else               begin sec = CAND_C; age_s = age_c; end

      victim    = prim;
      fill_bank = (prim == CAND_B);

      if (age_s > age_p) begin
        // the block that would move: A for C, B for D
        moved_young = (sec == CAND_C) ? (age[CAND_A] <= TS_W'(MAX_DIST))
                                      : (age[CAND_B] <= TS_W'(MAX_DIST));
        if (moved_young && reloc_allowed) begin
          victim    = sec;
          relocate  = 1'b1;
          fill_bank = (sec == CAND_D);
        end else if (!moved_young) begin
          reloc_by_age = 1'b1;
        end else begin
          reloc_by_window = 1'b1;
        end
      end
    end
  end
endmodule
