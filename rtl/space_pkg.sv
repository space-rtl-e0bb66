// space_pkg: types and constants shared by the SPACE associative processor.
//
// A SPACE instruction is 7 bits: a 4-bit opcode {CD, RW, TS, SA}, a 2-bit
// select mode {AOF, PNF} and the new-flag bit NF. The opcode values follow the
// SPACE opcode table; the order of the fields inside the 7-bit word
// ({CD,RW,TS,SA,AOF,PNF,NF}, MSB first) is this design's choice. Data words
// are 36 bits: four data bytes (bits 0-31), three tag bits (32-34) and the
// Exact/Masked bit EM (bit 35). In a Masked word (EM=0) the top bit of each
// data byte marks that byte as a stored don't care (1 = don't care, a choice
// of this design).
package space_pkg;

  localparam int unsigned DATA_W   = 36;   // associative word width
  localparam int unsigned INSTR_W  = 7;    // instruction width
  localparam int unsigned EM_BIT   = 35;   // Exact/Masked bit position

  typedef logic [DATA_W-1:0] word_t;

  // Operations named in the opcode table.
  typedef enum logic [3:0] {
    OP_WWR, OP_WMR, OP_WBR, OP_RWR, OP_RMR,   // control registers
    OP_WFI, OP_WAL,                           // writes
    OP_RFI, OP_RST,                           // reads
    OP_SMO, OP_SMF                            // searches
  } op_e;

  // Select modes {AOF, PNF}.
  typedef enum logic [1:0] {
    SEL_ALL     = 2'b00,   // '*' : every word
    SEL_FLAGGED = 2'b01,   // '@' : f[w]
    SEL_BEFORE  = 2'b10,   // '-' : f[w+1], the word before a flagged word
    SEL_AFTER   = 2'b11    // '+' : f[w-1], the word after a flagged word
  } sel_e;

  typedef struct packed {
    op_e  op;
    sel_e sel;
    logic nf;
  } ctl_t;

  // Raw opcode field values {CD,RW,TS,SA}; x bits of the table taken as 0.
  localparam logic [3:0] OPC_WWR = 4'b1000;
  localparam logic [3:0] OPC_WMR = 4'b1001;
  localparam logic [3:0] OPC_WBR = 4'b1010;
  localparam logic [3:0] OPC_RWR = 4'b1100;
  localparam logic [3:0] OPC_RMR = 4'b1101;
  localparam logic [3:0] OPC_WFI = 4'b0011;
  localparam logic [3:0] OPC_WAL = 4'b0010;
  localparam logic [3:0] OPC_RFI = 4'b0110;
  localparam logic [3:0] OPC_RST = 4'b0100;
  localparam logic [3:0] OPC_SMO = 4'b0000;
  localparam logic [3:0] OPC_SMF = 4'b0001;

  // Assemble an instruction word.
  function automatic logic [INSTR_W-1:0] mk_instr(logic [3:0] opc, sel_e sel, logic nf);
    return {opc, sel, nf};
  endfunction

endpackage
