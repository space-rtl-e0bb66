// space_chip: one SPACE associative processor chip (148 words x 36 bits).
//
// The chip holds the CAPP word array, the flag chain, the Mask and
// Write-Enable registers and a priority resolution tree. It executes one
// instruction per rising clock edge while `cs` is high; with `cs` low it does
// nothing and drives none of its outputs, which splits a large array into
// independent banks.
//
// In each cycle the select vector is formed from the flags and the select
// mode, the array compares every word with `din` under mr, and the priority
// tree finds the first selected word (or, for smf, the first selected match).
// At the clock edge:
//   smo/smf  hits are the selected matches (smf: the first one and every word
//            after it); NF=1 sets hit flags and clears all others, NF=0 clears
//            hit flags and leaves the rest
//   wal/wfi  every selected word (wfi: the first) takes din in the columns
//            where wr=1 and its flag becomes NF
//   rfi      the first selected word is read out and its flag becomes NF
//   rst      the status bit says whether any word is selected
//   wwr/wmr/wbr load the registers; rwr/rmr read them
//
// Cascading: `req` (REQ pin) is high when the chip has a selected word (for
// smf, a selected match; for rwr/rmr, always); `prq` (PRQ pin) is high when a
// preceding chip requests, in which case this chip is not first. The flag
// chain crosses chips on the PRF/NXF pins, shown here as separate in/out/enable
// signals: in "after flagged" mode the chip takes f[-1] on PRF and drives its
// last flag on NXF; in "prior flagged" mode it takes f[N] on NXF and drives
// its first flag on PRF.
//
// Timing: read results appear on `dout`/`doe`/`stat` for the one cycle after
// the clock edge that executes the read; in every other cycle, and whenever
// `cs` is low, the chip drives nothing. `dout` is
// all ones whenever the chip does not drive, so the AND of several chips'
// `dout` models the pulled-up shared bus and gives all ones when no word is
// selected. The registered read output, the separate status bit and the
// synchronous clock (for the CE strobe) are this design's choices. The PCH
// precharge pin has no counterpart in this static logic.
module space_chip
  import space_pkg::*;
#(
  parameter int unsigned WORDS = 148,
  parameter int unsigned RADIX = 12
) (
  input  logic               clk,     // CE
  input  logic               rst_n,
  input  logic               cs,
  input  logic [INSTR_W-1:0] instr,
  input  word_t              din,
  output word_t              dout,
  output logic               doe,
  output logic               stat,    // rst result
  input  logic               prf_in,
  output logic               prf_out,
  output logic               prf_oe,
  input  logic               nxf_in,
  output logic               nxf_out,
  output logic               nxf_oe,
  output logic               req,
  input  logic               prq
);
  ctl_t ctl;
  space_decoder u_dec (.instr(instr), .ctl(ctl));

  word_t mr, wr;
  ctrl_regs u_regs (
    .clk(clk), .rst_n(rst_n), .en(cs), .op(ctl.op), .din(din), .mr(mr), .wr(wr)
  );

  logic [WORDS-1:0] match, wen, flags, sel, upd, nxt, treq, first, prior;
  logic             any, f_first, f_last;
  word_t            rd [WORDS];

  capp_array #(.WORDS(WORDS)) u_array (
    .clk(clk), .key(din), .mr(mr), .wr(wr), .wen(wen), .match(match), .rd(rd)
  );

  logic prev_f, next_f;
  assign prev_f = prf_in;
  assign next_f = nxf_in;

  flag_chain #(.WORDS(WORDS)) u_flags (
    .clk(clk), .rst_n(rst_n), .sel_mode(ctl.sel), .prev_in(prev_f),
    .next_in(next_f), .upd(upd), .nxt(nxt), .flags(flags), .sel(sel),
    .first(f_first), .last(f_last)
  );

  assign treq = (ctl.op == OP_SMF) ? (sel & match) : sel;

  priority_tree #(.N(WORDS), .RADIX(RADIX)) u_tree (
    .prq(prq), .req(treq), .first(first), .prior(prior), .any(any)
  );

  // Per-word update decisions.
  always_comb begin
    logic [WORDS-1:0] hit;
    upd = '0;
    nxt = '0;
    wen = '0;
    hit = '0;
    if (cs) begin
      unique case (ctl.op)
        OP_SMO, OP_SMF: begin
          hit = (ctl.op == OP_SMO) ? (sel & match) : (treq | prior);
          upd = ctl.nf ? '1  : hit;
          nxt = ctl.nf ? hit : '0;
        end
        OP_WAL: begin
          wen = sel;
          upd = sel;
          nxt = {WORDS{ctl.nf}};
        end
        OP_WFI: begin
          wen = first;
          upd = first;
          nxt = {WORDS{ctl.nf}};
        end
        OP_RFI: begin
          upd = first;
          nxt = {WORDS{ctl.nf}};
        end
        default: ;
      endcase
    end
  end

  // Read multiplexer: AND-OR of the first selected word.
  word_t rfi_word;
  always_comb begin
    rfi_word = '0;
    for (int w = 0; w < WORDS; w++)
      if (first[w]) rfi_word |= rd[w];
  end

  logic ctl_read;
  assign ctl_read = (ctl.op == OP_RWR) || (ctl.op == OP_RMR);
  assign req      = cs && (ctl_read || any);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '1;
      doe  <= 1'b0;
      stat <= 1'b0;
    end else begin
      dout <= '1;
      doe  <= 1'b0;
      stat <= 1'b0;
      if (cs) unique case (ctl.op)
        OP_RFI: if (any && !prq) begin
          dout <= rfi_word;
          doe  <= 1'b1;
        end
        OP_RWR: if (!prq) begin
          dout <= wr;
          doe  <= 1'b1;
        end
        OP_RMR: if (!prq) begin
          dout <= mr;
          doe  <= 1'b1;
        end
        OP_RST: stat <= any;
        default: ;
      endcase
    end
  end

  assign prf_out = f_first;
  assign nxf_out = f_last;
  assign prf_oe  = cs && (ctl.sel == SEL_BEFORE);
  assign nxf_oe  = cs && (ctl.sel == SEL_AFTER);
endmodule
