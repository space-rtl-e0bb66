// tb_space_workloads: bit-serial arithmetic written as SPACE instruction
// sequences, run on one node of a scaled array (2 modules x 2 chips x 6 words
// = 24 words), with the results checked against integer arithmetic and the
// instruction counts checked against the routine lengths derived below.
//
// Word layout (Exact words, EM=1): A = bits 15:0, B = bits 31:16, tag =
// bits 33:32, carry C = bit 34. Routines act only on words whose tag is 01;
// the rest must come through unchanged. Every routine loads mr and wr with
// one wbr holding the tag columns and the columns it touches, so a write also
// rewrites the tag and read-only columns with the values they already hold.
//   36b search            smo                                        1
//   1b AND (B &= A)       wbr; smo {A=0,B=1}; wal @ {B=0}            3
//   1b OR (B |= A)        wbr; smo {A=1,B=0}; wal @ {B=1}            3
//   1b XOR (B ^= A)       wbr; 2 x (smo; wal @) with a marker bit;
//                         wbr; smo; wal @ to clear the markers       8
//   1b half add           clear C (3); wbr; 2 x (smo; wal @)         8
//   1b full add, scalar   wbr; 2 x (smo; wal @)                      5
//   1b full add, vector   wbr; 4 x (smo; wal @)                      9
//   16b add, scalar       clear C (3) + 16 x 5                      83
//   16b add, vector       clear C (3) + 16 x 9                     147
//   16b max / min         16 x (wmr; smo; rst)                      48
//   16b <, scalar         set E=1,R=0 (4) + 16 x (wbr; smo; wal @)  52
//   15b < and =, vector  set E=1,R=0 (4) + 15 x (wbr; 2 x pair)    79
//   8b x 8b multiply      clear P (4) + 8 x (8 x 9 + carry out 3)  604
// The order of the (smo; wal) pairs is chosen so that a word changed by one
// pair never matches a later pair.
module tb_space_workloads;
  import space_pkg::*;
  localparam int MODS = 2, CH = 2, W = 6, N = MODS * CH * W;
  logic                      clk = 0, rst_n = 0;
  logic [0:0]                bus_valid = '0, bus_ready, bus_rvalid;
  logic [0:0][MODS-1:0]      bus_msel = '1;
  logic [0:0][INSTR_W-1:0]   bus_instr = '0;
  word_t [0:0]               bus_wdata = '0, bus_rdata;
  int                        checks = 0, failures = 0, n_instr = 0, n_bus = 0;

  padmavati_space #(.NODES(1), .MODS(MODS), .CHIPS(CH), .WORDS(W), .RADIX(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int C_BIT = 34;
  localparam word_t TAGM = 36'h3_0000_0000;   // tag columns
  localparam word_t TAGV = 36'h1_0000_0000;   // tag value 01
  localparam word_t EXACT = 36'h8_0000_0000;

  function automatic word_t abit(int i); return word_t'(1) << i;        endfunction
  function automatic word_t bbit(int i); return word_t'(1) << (16 + i); endfunction
  function automatic word_t cbit();      return word_t'(1) << C_BIT;    endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Issue one instruction; counts instructions and bus cycles.
  task automatic op(logic [3:0] opc, sel_e s, logic nf, word_t d, output word_t r);
    @(negedge clk);
    bus_valid[0] = 1; bus_instr[0] = mk_instr(opc, s, nf); bus_wdata[0] = d;
    n_instr++;
    #1;
    while (!bus_ready[0]) begin @(negedge clk); n_bus++; #1; end
    @(negedge clk);
    n_bus++;
    bus_valid[0] = 0;
    r = '1;
    if (opc[2]) begin      // RW: wait for the data
      while (!bus_rvalid[0]) begin @(negedge clk); n_bus++; end
      r = bus_rdata[0];
    end
  endtask

  word_t gold [N];
  word_t r;

  // Load every word: flag all, then wfi @ c writes them in order.
  task automatic load();
    op(OPC_WBR, SEL_ALL, 0, '1, r);
    op(OPC_WAL, SEL_ALL, 1, '0, r);
    foreach (gold[k]) op(OPC_WFI, SEL_FLAGGED, 0, gold[k], r);
  endtask

  // Read every word back in order and compare.
  task automatic verify(string what);
    op(OPC_WMR, SEL_ALL, 0, '0, r);        // all don't care: every word hits
    op(OPC_SMO, SEL_ALL, 1, '0, r);
    foreach (gold[k]) begin
      op(OPC_RFI, SEL_FLAGGED, 0, '0, r);
      check(r == gold[k], $sformatf("%s: word %0d = %h exp %h", what, k, r, gold[k]));
    end
    op(OPC_RFI, SEL_FLAGGED, 0, '0, r);
    check(r == '1, {what, ": all words read"});
  endtask

  function automatic bit is_tagged(word_t v); return (v & TAGM) == TAGV; endfunction
  function automatic logic [15:0] fa(word_t v); return v[15:0];  endfunction
  function automatic logic [15:0] fb(word_t v); return v[31:16]; endfunction

  task automatic fresh();
    foreach (gold[k]) begin
      gold[k] = EXACT | {$urandom, $urandom} & 36'h0_FFFF_FFFF;
      gold[k][33:32] = ($urandom_range(0, 3) == 0) ? 2'b10 : 2'b01;
      gold[k][C_BIT] = 1'($urandom);
    end
    load();
  endtask

  // pair: search key {tag, pattern} then write {tag, new values}
  task automatic pair(word_t key, word_t val);
    op(OPC_SMO, SEL_ALL, 1, TAGV | EXACT | key, r);
    op(OPC_WAL, SEL_FLAGGED, 0, TAGV | EXACT | val, r);
  endtask

  task automatic clear_carry();
    op(OPC_WBR, SEL_ALL, 0, TAGM | cbit(), r);
    pair(cbit(), '0);
  endtask

  task automatic full_add_vv(int i);
    op(OPC_WBR, SEL_ALL, 0, TAGM | abit(i) | bbit(i) | cbit(), r);
    pair(cbit(),                 bbit(i));                   // 001 -> B=1 C=0
    pair(bbit(i) | cbit(),       cbit());                    // 011 -> B=0 C=1
    pair(abit(i) | bbit(i),      abit(i) | cbit());          // 110 -> B=0 C=1
    pair(abit(i),                abit(i) | bbit(i));         // 100 -> B=1 C=0
  endtask

  task automatic full_add_sv(int i, bit s);
    op(OPC_WBR, SEL_ALL, 0, TAGM | bbit(i) | cbit(), r);
    if (!s) begin
      pair(cbit(),           bbit(i));                       // B=0 C=1 -> B=1 C=0
      pair(bbit(i) | cbit(), cbit());                        // B=1 C=1 -> B=0 C=1
    end else begin
      pair(bbit(i),          cbit());                        // B=1 C=0 -> B=0 C=1
      pair('0,               bbit(i));                       // B=0 C=0 -> B=1 C=0
    end
  endtask

  initial begin
    int c0;
    logic [15:0] s16, mx, mn;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 36b search
    fresh();
    op(OPC_WMR, SEL_ALL, 0, '1, r);
    c0 = n_instr;
    op(OPC_SMO, SEL_ALL, 1, gold[N/2], r);
    check(n_instr - c0 == 1, "36b search: 1 instruction");
    op(OPC_RFI, SEL_FLAGGED, 1, '0, r);
    check(r == gold[N/2], "36b search finds the word");

    // 1b AND, vector-vector, bit 3
    fresh();
    c0 = n_instr;
    op(OPC_WBR, SEL_ALL, 0, TAGM | abit(3) | bbit(3), r);
    pair(bbit(3), '0);
    check(n_instr - c0 == 3, "1b AND: 3 instructions");
    foreach (gold[k]) if (is_tagged(gold[k])) gold[k][19] = gold[k][19] & gold[k][3];
    verify("1b AND");

    // 1b OR, vector-vector, bit 4: B |= A
    fresh();
    c0 = n_instr;
    op(OPC_WBR, SEL_ALL, 0, TAGM | abit(4) | bbit(4), r);
    pair(abit(4), abit(4) | bbit(4));
    check(n_instr - c0 == 3, "1b OR: 3 instructions");
    foreach (gold[k]) if (is_tagged(gold[k])) gold[k][20] = gold[k][20] | gold[k][4];
    verify("1b OR");

    // 1b XOR, vector-vector, bit 6: B ^= A, carry column used as a marker (starts 0)
    fresh();
    foreach (gold[k]) gold[k][C_BIT] = 1'b0;
    load();
    c0 = n_instr;
    op(OPC_WBR, SEL_ALL, 0, TAGM | abit(6) | bbit(6) | cbit(), r);
    pair(abit(6),                   abit(6) | bbit(6) | cbit());   // 1 0 -> B=1, marked
    pair(abit(6) | bbit(6),         abit(6));                      // 1 1 unmarked -> B=0
    op(OPC_WBR, SEL_ALL, 0, TAGM | cbit(), r);
    pair(cbit(), '0);                                             // clear the markers
    check(n_instr - c0 == 8, "1b XOR: 8 instructions");
    foreach (gold[k]) if (is_tagged(gold[k])) gold[k][22] = gold[k][22] ^ gold[k][6];
    verify("1b XOR");

    // 1b half add, vector-vector, bit 7: B = A ^ B, C = A & B (old C ignored)
    fresh();
    c0 = n_instr;
    op(OPC_WBR, SEL_ALL, 0, TAGM | cbit(), r);
    pair(cbit(), '0);                                             // C = 0
    op(OPC_WBR, SEL_ALL, 0, TAGM | abit(7) | bbit(7) | cbit(), r);
    pair(abit(7) | bbit(7),         abit(7) | cbit());             // 1 1 -> B=0 C=1
    pair(abit(7),                   abit(7) | bbit(7));            // 1 0 -> B=1
    check(n_instr - c0 == 8, "1b half add: 8 instructions");
    foreach (gold[k]) if (is_tagged(gold[k])) begin
      gold[k][C_BIT] = gold[k][7] & gold[k][23];
      gold[k][23]    = gold[k][7] ^ gold[k][23];
    end
    verify("1b half add");

    // 1b full add, vector-vector, bit 5
    fresh();
    c0 = n_instr;
    full_add_vv(5);
    check(n_instr - c0 == 9, "1b full add vv: 9 instructions");
    foreach (gold[k]) if (is_tagged(gold[k])) begin
      int t;
      t = gold[k][5] + gold[k][21] + gold[k][C_BIT];
      gold[k][21] = t[0]; gold[k][C_BIT] = t[1];
    end
    verify("1b full add vv");

    // 1b full add, scalar-vector, both scalar values
    for (int s = 0; s < 2; s++) begin
      fresh();
      c0 = n_instr;
      full_add_sv(2, s[0]);
      check(n_instr - c0 == 5, "1b full add sv: 5 instructions");
      foreach (gold[k]) if (is_tagged(gold[k])) begin
        int t;
        t = s + gold[k][18] + gold[k][C_BIT];
        gold[k][18] = t[0]; gold[k][C_BIT] = t[1];
      end
      verify("1b full add sv");
    end

    // 16b add, vector-vector: B = A + B
    fresh();
    c0 = n_instr;
    clear_carry();
    for (int i = 0; i < 16; i++) full_add_vv(i);
    check(n_instr - c0 == 147, "16b add vv: 147 instructions");
    foreach (gold[k]) if (is_tagged(gold[k])) begin
      logic [16:0] t;
      t = fa(gold[k]) + fb(gold[k]);
      gold[k][31:16] = t[15:0]; gold[k][C_BIT] = t[16];
    end
    verify("16b add vv");

    // 16b add, scalar-vector: B = B + s
    fresh();
    s16 = 16'($urandom);
    c0 = n_instr;
    clear_carry();
    for (int i = 0; i < 16; i++) full_add_sv(i, s16[i]);
    check(n_instr - c0 == 83, "16b add sv: 83 instructions");
    foreach (gold[k]) if (is_tagged(gold[k])) begin
      logic [16:0] t;
      t = fb(gold[k]) + s16;
      gold[k][31:16] = t[15:0]; gold[k][C_BIT] = t[16];
    end
    verify("16b add sv");

    // 16b <, scalar-vector: R (bit 1) = (B < s); E (bit 0) = "prefix still equal"
    fresh();
    s16 = 16'($urandom);
    foreach (gold[k]) if (is_tagged(gold[k]) && $urandom_range(0, 2) == 0) gold[k][31:16] = s16;  // some equal
    foreach (gold[k]) if (is_tagged(gold[k]) && $urandom_range(0, 3) == 0) gold[k][31:16] = s16 ^ 16'(1 << $urandom_range(0, 15));
    load();
    c0 = n_instr;
    op(OPC_WMR, SEL_ALL, 0, TAGM, r);
    op(OPC_SMO, SEL_ALL, 1, TAGV | EXACT, r);
    op(OPC_WWR, SEL_ALL, 0, abit(0) | abit(1), r);
    op(OPC_WAL, SEL_FLAGGED, 0, abit(0), r);                   // E=1, R=0
    for (int i = 15; i >= 0; i--) begin
      if (s16[i]) begin
        op(OPC_WBR, SEL_ALL, 0, TAGM | abit(0) | abit(1) | bbit(i), r);
        pair(abit(0), abit(1));                                   // E=1 B=0 -> less
      end else begin
        op(OPC_WBR, SEL_ALL, 0, TAGM | abit(0) | bbit(i), r);
        pair(abit(0) | bbit(i), bbit(i));                         // E=1 B=1 -> greater
      end
    end
    check(n_instr - c0 == 52, "16b < sv: 52 instructions");
    foreach (gold[k]) if (is_tagged(gold[k])) begin
      gold[k][1] = fb(gold[k]) < s16;
      gold[k][0] = fb(gold[k]) == s16;
    end
    verify("16b < sv");

    // 15b < and =, vector-vector on A[14:0] and B[14:0]: R (bit 15) = (A < B),
    // E (carry column) = (A == B); 16 bits need one more column than the layout has
    fresh();
    foreach (gold[k]) if (is_tagged(gold[k]) && $urandom_range(0, 2) == 0) gold[k][30:16] = gold[k][14:0];
    foreach (gold[k]) if (is_tagged(gold[k]) && $urandom_range(0, 3) == 0)
      gold[k][30:16] = gold[k][14:0] ^ 15'(1 << $urandom_range(0, 14));
    load();
    c0 = n_instr;
    op(OPC_WMR, SEL_ALL, 0, TAGM, r);
    op(OPC_SMO, SEL_ALL, 1, TAGV | EXACT, r);
    op(OPC_WWR, SEL_ALL, 0, abit(15) | cbit(), r);
    op(OPC_WAL, SEL_FLAGGED, 0, cbit(), r);                    // E=1, R=0
    for (int i = 14; i >= 0; i--) begin
      op(OPC_WBR, SEL_ALL, 0, TAGM | abit(15) | cbit() | abit(i) | bbit(i), r);
      pair(cbit() | bbit(i),   abit(15) | bbit(i));            // E, A=0 B=1 -> less
      pair(cbit() | abit(i),   abit(i));                       // E, A=1 B=0 -> greater
    end
    check(n_instr - c0 == 79, "15b < and = vv: 79 instructions");
    foreach (gold[k]) if (is_tagged(gold[k])) begin
      gold[k][15]    = gold[k][14:0] < gold[k][30:16];
      gold[k][C_BIT] = gold[k][14:0] == gold[k][30:16];
    end
    verify("15b < and = vv");

    // 8b x 8b multiply, vector-vector: P (bits 31:16) = A[7:0] * A[15:8]
    fresh();
    foreach (gold[k]) gold[k][C_BIT] = 1'b0;
    load();
    c0 = n_instr;
    op(OPC_WMR, SEL_ALL, 0, TAGM, r);
    op(OPC_SMO, SEL_ALL, 1, TAGV | EXACT, r);
    op(OPC_WWR, SEL_ALL, 0, 36'h0_FFFF_0000, r);
    op(OPC_WAL, SEL_FLAGGED, 0, '0, r);                         // P = 0
    for (int j = 0; j < 8; j++) begin
      for (int i = 0; i < 8; i++) begin                         // P[j+7:j] += B when A_j
        word_t aj, bi, pi;
        aj = abit(j); bi = abit(8 + i); pi = bbit(j + i);
        op(OPC_WBR, SEL_ALL, 0, TAGM | aj | bi | pi | cbit(), r);
        pair(aj | cbit(),            aj | pi);
        pair(aj | pi | cbit(),       aj | cbit());
        pair(aj | bi | pi,           aj | bi | cbit());
        pair(aj | bi,                aj | bi | pi);
      end
      op(OPC_WBR, SEL_ALL, 0, TAGM | bbit(j + 8) | cbit(), r);  // carry into the clear bit above
      pair(cbit(), bbit(j + 8));
    end
    check(n_instr - c0 == 604, "8x8 multiply: 604 instructions");
    foreach (gold[k]) if (is_tagged(gold[k])) gold[k][31:16] = 16'(gold[k][7:0]) * 16'(gold[k][15:8]);
    verify("8x8 multiply");

    // find 16b max and min of B over the tagged words
    fresh();
    mx = '0; mn = '1;
    foreach (gold[k]) if (is_tagged(gold[k])) begin
      if (fb(gold[k]) > mx) mx = fb(gold[k]);
      if (fb(gold[k]) < mn) mn = fb(gold[k]);
    end
    for (int pass = 0; pass < 2; pass++) begin
      logic [15:0] v;
      word_t m;
      v = '0; m = TAGM;
      c0 = n_instr;
      for (int i = 15; i >= 0; i--) begin
        m |= bbit(i);
        op(OPC_WMR, SEL_ALL, 0, m, r);
        op(OPC_SMO, SEL_ALL, 1, TAGV | (word_t'(v) << 16) | (pass == 0 ? bbit(i) : '0), r);
        op(OPC_RST, SEL_FLAGGED, 0, '0, r);
        v[i] = (pass == 0) ? r[0] : !r[0];
      end
      check(n_instr - c0 == 48, "16b max/min: 48 instructions");
      check(v == (pass == 0 ? mx : mn), $sformatf("%s = %h exp %h", pass == 0 ? "max" : "min", v, pass == 0 ? mx : mn));
    end

    $display("instructions %0d, bus cycles %0d", n_instr, n_bus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
