// space_decoder: turns a 7-bit SPACE instruction into the decoded control word.
//
// The opcode field {CD, RW, TS, SA} is decoded exactly as the SPACE opcode
// table gives it, including its don't-care bits: CD=1 selects the control
// registers (wwr, wmr, wbr, rwr, rmr), CD=0 the array. For array operations
// RW=1 is a read (TS=1 rfi, TS=0 rst), and RW=0 a write (TS=1: SA=1 wfi,
// SA=0 wal) or a search (TS=0: SA=0 smo, SA=1 smf). The select mode {AOF,PNF}
// and NF pass through unchanged. Purely combinational.
module space_decoder
  import space_pkg::*;
(
  input  logic [INSTR_W-1:0] instr,
  output ctl_t               ctl
);
  logic cd, rw, ts, sa;
  assign {cd, rw, ts, sa} = instr[6:3];

  always_comb begin
    ctl.sel = sel_e'(instr[2:1]);
    ctl.nf  = instr[0];
    if (cd) begin
      if (!rw) ctl.op = ts ? OP_WBR : (sa ? OP_WMR : OP_WWR);
      else     ctl.op = sa ? OP_RMR : OP_RWR;
    end else begin
      if (rw)      ctl.op = ts ? OP_RFI : OP_RST;
      else if (ts) ctl.op = sa ? OP_WFI : OP_WAL;
      else         ctl.op = sa ? OP_SMF : OP_SMO;
    end
  end
endmodule
