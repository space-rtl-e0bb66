// space_ref_pkg: an instruction-level reference model of a SPACE array, for
// the testbenches.
//
// The model is a flat list of words, written straight from the instruction
// set rules rather than from the RTL: for each word a value, a flag, an
// "enabled" bit (its chip is selected) and its chip's own copy of the mask and
// write-enable registers. A flag read from a word of a disabled chip, or from
// beyond either end of the array, is 0. `exec` applies one instruction and
// returns what a read would put on the bus (all ones when nothing answers).
// It also counts the events the end-to-end tests must see at least once.
package space_ref_pkg;

  typedef logic [35:0] w36_t;

  // Opcode values {CD,RW,TS,SA}, written out from the opcode table.
  localparam logic [3:0] C_WWR = 4'b1000, C_WMR = 4'b1001, C_WBR = 4'b1010,
                         C_RWR = 4'b1100, C_RMR = 4'b1101, C_WFI = 4'b0011,
                         C_WAL = 4'b0010, C_RFI = 4'b0110, C_RST = 4'b0100,
                         C_SMO = 4'b0000, C_SMF = 4'b0001;
  localparam logic [3:0] OPCODES [11] = '{C_WWR, C_WMR, C_WBR, C_RWR, C_RMR,
                                         C_WFI, C_WAL, C_RFI, C_RST, C_SMO, C_SMF};

  function automatic logic [6:0] mk(logic [3:0] opc, logic [1:0] mode, logic nf);
    return {opc, mode, nf};
  endfunction

  function automatic bit is_read(logic [6:0] i);
    return i[5];
  endfunction

  // Random word whose bits vary only where they matter for matching: a few
  // data bits, every byte's top bit, a tag bit and EM.
  function automatic w36_t rand_word();
    w36_t v;
    v = '0;
    v[0]  = 1'($urandom); v[1]  = 1'($urandom); v[9]  = 1'($urandom);
    v[7]  = 1'($urandom); v[15] = 1'($urandom); v[23] = 1'($urandom);
    v[31] = 1'($urandom); v[32] = 1'($urandom); v[35] = 1'($urandom);
    v[20] = 1'($urandom);
    return v;
  endfunction

  // A full-width random word with mostly ones (for masks / write enables).
  function automatic w36_t rand_mask();
    w36_t v;
    v = {$urandom, $urandom};
    if ($urandom_range(0, 2) == 0) v = '1;
    return v;
  endfunction

  // Match rule for one stored word.
  function automatic bit word_match(w36_t v, w36_t key, w36_t m, output bit by_dc);
    w36_t d;
    bit   ok;
    d     = (v ^ key) & m;
    by_dc = 0;
    if (v[35]) return d == '0;
    ok = d[35:32] == '0;
    for (int b = 0; b < 4; b++) begin
      if (v[8*b+7]) begin
        if (d[8*b +: 8] != '0) by_dc = 1;
      end else if (d[8*b +: 8] != '0) ok = 0;
    end
    if (!ok) by_dc = 0;
    return ok;
  endfunction

  class space_ref;
    int   n, wpc;               // words, words per chip
    w36_t mem [];
    bit   f   [];
    bit   en  [];
    w36_t mr  [];
    w36_t wr  [];
    // event counters
    int   n_op [11];
    int   n_mode [4];
    int   n_cross_chip;         // a neighbour flag used across a chip boundary was 1
    int   n_smf_span;           // smf hits spread over more than one chip
    int   n_rfi_empty;          // rfi with nothing selected (all ones)
    int   n_first_later_chip;   // first selected word not in the first enabled chip
    int   n_stored_dc;          // a hit decided by a stored don't-care byte
    int   n_partition;          // some, not all, chips enabled
    int   n_nf0_search;         // search with NF=0 that cleared a flag

    function new(int words, int words_per_chip);
      n = words; wpc = words_per_chip;
      mem = new[n]; f = new[n]; en = new[n]; mr = new[n]; wr = new[n];
      foreach (mem[w]) begin mem[w] = '0; f[w] = 0; en[w] = 1; mr[w] = '1; wr[w] = '1; end
    endfunction

    function void set_enable(bit e []);
      bit some, all;
      some = 0; all = 1;
      foreach (en[w]) begin en[w] = e[w]; some |= e[w]; all &= e[w]; end
      if (some && !all) n_partition++;
    endfunction

    function bit fl(int w);
      if (w < 0 || w >= n) return 0;
      if (!en[w]) return 0;
      return f[w];
    endfunction

    function w36_t exec(logic [6:0] ins, w36_t d);
      logic [3:0] opc;
      logic [1:0] mode;
      bit         nf, any, found;
      bit         sel [], match [], hit [];
      int         first, op_idx, first_chip;
      w36_t       r;
      opc = ins[6:3]; mode = ins[2:1]; nf = ins[0];
      // don't-care bits of the table: rwr/rmr ignore TS, rfi/rst ignore SA, wbr ignores SA
      if (opc[3] && opc[2]) opc[1] = 0;
      if (!opc[3] && opc[2]) opc[0] = 0;
      if (opc[3] && !opc[2] && opc[1]) opc[0] = 0;
      op_idx = -1;
      foreach (OPCODES[k]) if (OPCODES[k] == opc) op_idx = k;
      if (op_idx < 0) $fatal(1, "bad opcode");
      n_op[op_idx]++;
      n_mode[mode]++;
      sel = new[n]; match = new[n]; hit = new[n];
      any = 0; first = -1; first_chip = -1;
      for (int w = 0; w < n; w++) begin
        bit dc;
        case (mode)
          2'b00: sel[w] = 1;
          2'b01: sel[w] = f[w];
          2'b10: begin
            sel[w] = fl(w + 1);
            if (sel[w] && (w + 1) % wpc == 0) n_cross_chip++;
          end
          default: begin
            sel[w] = fl(w - 1);
            if (sel[w] && w % wpc == 0) n_cross_chip++;
          end
        endcase
        sel[w] &= en[w];
        match[w] = word_match(mem[w], d, mr[w], dc);
        if (en[w] && first_chip < 0) first_chip = w / wpc;
        if (sel[w] && match[w] && dc && (opc == C_SMO || opc == C_SMF)) n_stored_dc++;
      end
      for (int w = 0; w < n; w++)
        if (sel[w] && (opc != C_SMF || match[w])) begin
          any = 1; if (first < 0) first = w;
        end
      r = '1;
      case (opc)
        C_WWR, C_WMR, C_WBR: for (int w = 0; w < n; w++) if (en[w]) begin
          if (opc != C_WMR) wr[w] = d;
          if (opc != C_WWR) mr[w] = d;
        end
        C_RWR, C_RMR: for (int w = n - 1; w >= 0; w--) if (en[w]) r = (opc == C_RWR) ? wr[w] : mr[w];
        C_RST: r = w36_t'(any);
        C_RFI: begin
          if (first >= 0) begin
            r = mem[first]; f[first] = nf;
            if (first / wpc != first_chip) n_first_later_chip++;
          end else n_rfi_empty++;
        end
        C_WAL, C_WFI: for (int w = 0; w < n; w++)
          if (sel[w] && (opc == C_WAL || w == first)) begin
            mem[w] = (mem[w] & ~wr[w]) | (d & wr[w]);
            f[w]   = nf;
          end
        default: begin  // searches
          bit seen;
          int c0, c1;
          seen = 0; c0 = -1; c1 = -1;
          for (int w = 0; w < n; w++) begin
            if (opc == C_SMO) hit[w] = sel[w] && match[w];
            else begin
              seen |= sel[w] && match[w];
              hit[w] = seen && en[w];
            end
            if (hit[w]) begin if (c0 < 0) c0 = w / wpc; c1 = w / wpc; end
          end
          if (opc == C_SMF && c1 != c0) n_smf_span++;
          for (int w = 0; w < n; w++) if (en[w]) begin
            if (nf) f[w] = hit[w];
            else if (hit[w]) begin
              if (f[w]) n_nf0_search++;
              f[w] = 0;
            end
          end
        end
      endcase
      return r;
    endfunction
  endclass

endpackage
