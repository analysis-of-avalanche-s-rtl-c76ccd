// rim_diff: the RIM's diff and splice datapath.
//
// Diff compares the dirty version of a line with the clean copy kept in the
// Shared Buffer and returns a mask with one bit per word that changed. Splice
// takes an existing line and writes into it the words of an update whose mask
// bit is set, leaving the other words alone. The release state buffer uses the
// diff to build compressed update messages; a node receiving one splices it in.
// Both functions are purely combinational. The line is a 32-byte PA-RISC cache
// line of eight 32-bit words by default (word and line size are parameters);
// the document gives the function, the structure here is the obvious one.
module rim_diff #(
  parameter int unsigned WORDS  = 8,
  parameter int unsigned WORD_W = 32
) (
  input  logic [WORDS*WORD_W-1:0] diff_clean,
  input  logic [WORDS*WORD_W-1:0] diff_dirty,
  output logic [WORDS-1:0]        diff_mask,
  input  logic [WORDS*WORD_W-1:0] splice_base,
  input  logic [WORDS*WORD_W-1:0] splice_upd,
  input  logic [WORDS-1:0]        splice_mask,
  output logic [WORDS*WORD_W-1:0] splice_out
);
  always_comb begin
    for (int w = 0; w < WORDS; w++) begin
      diff_mask[w] = diff_clean[w*WORD_W +: WORD_W] != diff_dirty[w*WORD_W +: WORD_W];
      splice_out[w*WORD_W +: WORD_W] = splice_mask[w] ? splice_upd[w*WORD_W +: WORD_W]
                                                      : splice_base[w*WORD_W +: WORD_W];
    end
  end
endmodule
