// capp_array: the words of associative storage of one SPACE chip.
//
// Every word is compared in parallel with the search key under the Mask
// Register: bit i takes part only where mr[i]=1. A word whose EM bit (bit 35)
// is 1 is Exact and must match on all masked bits. A word with EM=0 is
// Masked: the top bit of each of its four data bytes (bits 7, 15, 23, 31)
// marks that byte as a stored don't care, and only the remaining bytes, the
// three tag bits and EM must match. Writes change only the bit columns where
// the Write-Enable Register is 1, in every word whose `wen` bit is set, on the
// rising clock edge. `match` is combinational from the stored words, the key
// and mr. Polarity of the stored don't-care bit (1 = don't care) is this
// design's choice. The storage has no reset, like a static cell array:
// software clears it with a write to all words.
module capp_array
  import space_pkg::*;
#(
  parameter int unsigned WORDS = 148
) (
  input  logic             clk,
  input  word_t            key,     // search key / write operand
  input  word_t            mr,      // mask register
  input  word_t            wr,      // write-enable register
  input  logic [WORDS-1:0] wen,     // words written this cycle
  output logic [WORDS-1:0] match,   // words matching the masked key
  output word_t            rd [WORDS]  // stored words, for reads
);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    for (int w = 0; w < WORDS; w++)
      if (wen[w]) mem[w] <= (mem[w] & ~wr) | (key & wr);
  end

  always_comb begin
    for (int w = 0; w < WORDS; w++) begin
      word_t diff;
      logic  ok;
      diff = (mem[w] ^ key) & mr;
      ok   = (diff[35:32] == '0);
      for (int b = 0; b < 4; b++) begin
        logic stored_dc;
        stored_dc = !mem[w][EM_BIT] && mem[w][8*b+7];
        ok = ok && (stored_dc || diff[8*b +: 8] == '0);
      end
      match[w] = ok;
    end
  end

  assign rd = mem;
endmodule
