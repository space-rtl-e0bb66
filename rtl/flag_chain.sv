// flag_chain: one flag bit per word and the select-mode multiplexer.
//
// The select vector is formed from the current flags by the select mode:
// all words, the flagged words f[w], the words before flagged words f[w+1],
// or the words after flagged words f[w-1]. f[-1] comes from `prev_in` (the
// previous chip, 0 for the first chip of an array) and f[WORDS] from
// `next_in` (the next chip). On the rising clock edge, flags whose `upd` bit
// is set take the matching bit of `nxt`. Flags reset to 0 (this design's
// choice). `first` and `last` are the flags of words 0 and WORDS-1, passed to
// the neighbouring chips.
module flag_chain
  import space_pkg::*;
#(
  parameter int unsigned WORDS = 148
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sel_e             sel_mode,
  input  logic             prev_in,   // f[-1]
  input  logic             next_in,   // f[WORDS]
  input  logic [WORDS-1:0] upd,
  input  logic [WORDS-1:0] nxt,
  output logic [WORDS-1:0] flags,
  output logic [WORDS-1:0] sel,
  output logic             first,
  output logic             last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flags <= '0;
    else        flags <= (flags & ~upd) | (nxt & upd);
  end

  logic [WORDS+1:0] ext;   // ext[w+1] = f[w], ext[0] = f[-1], ext[WORDS+1] = f[WORDS]
  assign ext = {next_in, flags, prev_in};

  always_comb begin
    unique case (sel_mode)
      SEL_ALL:     sel = '1;
      SEL_FLAGGED: sel = flags;
      SEL_BEFORE:  sel = ext[WORDS+1:2];
      SEL_AFTER:   sel = ext[WORDS-1:0];
    endcase
  end

  assign first = flags[0];
  assign last  = flags[WORDS-1];
endmodule
