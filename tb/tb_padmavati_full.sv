// tb_padmavati_full: the full-size array (16 boards of 6 modules of 12 chips
// of 148 words, 170496 words) with every parameter at its default. On every
// node at once: clear all words, flag them all, write a per-node key into
// every word whose successor is flagged (all but the last word, so the flag
// chain runs through every chip and module), read the one flagged word (the
// last word of the last chip: the priority resolution spans the whole board),
// search for the key and read the first hit, check the status, clear the hits
// with an NF=0 search and read all ones. Then every node runs a 16-bit
// vector-vector add (A + B into B, bit-serial, 9 instructions per bit) in all
// its words at once, and a search shows that every word holds the sum.
module tb_padmavati_full;
  import space_pkg::*;
  localparam int NODES = 16, MODS = 6;
  logic                          clk = 0, rst_n = 0;
  logic [NODES-1:0]              bus_valid = '0, bus_ready, bus_rvalid;
  logic [NODES-1:0][MODS-1:0]    bus_msel = '1;
  logic [NODES-1:0][INSTR_W-1:0] bus_instr = '0;
  word_t [NODES-1:0]             bus_wdata = '0, bus_rdata;
  int                            checks = 0, failures = 0;

  padmavati_space dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Issue one instruction on all nodes at once (operand per node) and, for a
  // read, return what each node answered two cycles after acceptance.
  task automatic all_nodes(logic [INSTR_W-1:0] i, word_t d [NODES], output word_t r [NODES]);
    @(negedge clk);
    for (int n = 0; n < NODES; n++) begin
      bus_valid[n] = 1; bus_instr[n] = i; bus_wdata[n] = d[n];
    end
    @(negedge clk);
    bus_valid = '0;
    if (i[5]) begin
      @(negedge clk);
      for (int n = 0; n < NODES; n++) begin
        checks++;
        if (!bus_rvalid[n]) begin failures++; $display("FAIL node %0d: no read data", n); end
        r[n] = bus_rdata[n];
      end
    end
  endtask

  task automatic expect_all(logic [INSTR_W-1:0] i, word_t d [NODES], word_t e [NODES], string what);
    word_t r [NODES];
    all_nodes(i, d, r);
    for (int n = 0; n < NODES; n++) begin
      checks++;
      if (r[n] != e[n]) begin failures++; $display("FAIL node %0d %s: %h exp %h", n, what, r[n], e[n]); end
    end
  endtask


  // Broadcast one instruction with the same operand to every node.
  task automatic bcast(logic [INSTR_W-1:0] i, word_t v);
    word_t d [NODES], r [NODES];
    foreach (d[n]) d[n] = v;
    all_nodes(i, d, r);
  endtask

  // One search/write pair of a bit-serial routine, on every node.
  task automatic pair(word_t key, word_t val);
    bcast(mk_instr(OPC_SMO, SEL_ALL, 1'b1), TAGV | EXACT | key);
    bcast(mk_instr(OPC_WAL, SEL_FLAGGED, 1'b0), TAGV | EXACT | val);
  endtask

  localparam word_t TAGM = 36'h3_0000_0000, TAGV = 36'h1_0000_0000, EXACT = 36'h8_0000_0000;
  localparam word_t CB   = 36'h4_0000_0000;                 // carry, bit 34
  function automatic word_t ab(int i); return word_t'(1) << i;        endfunction
  function automatic word_t bb(int i); return word_t'(1) << (16 + i); endfunction

  initial begin
    word_t d [NODES], r [NODES], key [NODES];
    word_t sum [NODES];
    int    n_add;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NODES; n++) begin
      d[n]   = '0;
      key[n] = {1'b1, 3'd5, 32'hC0DE_0000 + 32'(n)};   // Exact word, per-node value
    end
    all_nodes(mk_instr(OPC_WAL, SEL_ALL, 1'b0), d, r);        // clear every word, flags 0
    all_nodes(mk_instr(OPC_SMO, SEL_ALL, 1'b1), d, r);        // every word hits: all flags 1
    all_nodes(mk_instr(OPC_WAL, SEL_BEFORE, 1'b0), key, r);   // all but the last word take the key
    expect_all(mk_instr(OPC_RFI, SEL_FLAGGED, 1'b0), d, '{default: '0}, "last word, still 0");
    all_nodes(mk_instr(OPC_SMO, SEL_ALL, 1'b1), key, r);      // flag the key holders
    expect_all(mk_instr(OPC_RFI, SEL_FLAGGED, 1'b0), d, key, "first key holder");
    expect_all(mk_instr(OPC_RST, SEL_FLAGGED, 1'b0), d, '{default: word_t'(1)}, "status");
    all_nodes(mk_instr(OPC_SMO, SEL_ALL, 1'b0), key, r);      // NF=0: clear the hits' flags
    expect_all(mk_instr(OPC_RFI, SEL_FLAGGED, 1'b0), d, '{default: '1}, "nothing flagged");

    // 16-bit vector-vector add B = A + B in all 170496 words at once
    // (A = bits 15:0, B = 31:16, carry = bit 34, tag 01 in bits 33:32).
    for (int n = 0; n < NODES; n++) begin
      logic [15:0] a, b;
      logic [16:0] t;
      a = 16'($urandom); b = 16'($urandom);
      t = a + b;
      d[n]   = EXACT | TAGV | (word_t'(b) << 16) | word_t'(a);
      sum[n] = EXACT | TAGV | (word_t'(t[16]) << 34) | (word_t'(t[15:0]) << 16) | word_t'(a);
    end
    all_nodes(mk_instr(OPC_WBR, SEL_ALL, 1'b0), '{default: '1}, r);
    all_nodes(mk_instr(OPC_WAL, SEL_ALL, 1'b0), d, r);        // every word = {A, B}, carry 0
    n_add = 0;
    for (int i = 0; i < 16; i++) begin
      bcast(mk_instr(OPC_WBR, SEL_ALL, 1'b0), TAGM | ab(i) | bb(i) | CB);
      pair(CB,              bb(i));
      pair(bb(i) | CB,      CB);
      pair(ab(i) | bb(i),   ab(i) | CB);
      pair(ab(i),           ab(i) | bb(i));
      n_add += 9;
    end
    checks++;
    if (n_add != 144) failures++;
    // every word must now hold the sum: flag all, clear the flags of words
    // equal to the sum, and find nothing left
    all_nodes(mk_instr(OPC_WBR, SEL_ALL, 1'b0), '{default: '0}, r);
    all_nodes(mk_instr(OPC_SMO, SEL_ALL, 1'b1), d, r);        // mr = 0: all hit
    all_nodes(mk_instr(OPC_WMR, SEL_ALL, 1'b0), '{default: '1}, r);
    all_nodes(mk_instr(OPC_SMO, SEL_ALL, 1'b0), sum, r);      // clear the correct words
    expect_all(mk_instr(OPC_RST, SEL_FLAGGED, 1'b0), d, '{default: '0}, "words with a wrong sum");
    all_nodes(mk_instr(OPC_SMO, SEL_ALL, 1'b1), sum, r);
    expect_all(mk_instr(OPC_RFI, SEL_AFTER, 1'b0), d, sum, "second word holds the sum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
