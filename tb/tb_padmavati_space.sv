// tb_padmavati_space: end-to-end test of the whole array, scaled to two nodes
// of two modules of two 4-word chips. Each node's bus gets its own random
// stream of instructions and module subsets at the same time, and every read
// is compared with a per-node reference model, with its timing. The test
// counts how often each mechanism of the design happened (every opcode and
// select mode, searches that clear flags, stored don't-care hits, flag-chain
// transfers and smf hit runs across chips, the priority choice of a later
// chip, reads with nothing selected, module subsets, read stalls and
// pipelined writes) and fails any that never did.
module tb_padmavati_space;
  import space_ref_pkg::*;
  localparam int NODES = 2, MODS = 2, CH = 2, W = 4, N = MODS * CH * W;
  localparam int STEPS = 6000;
  logic                        clk = 0, rst_n = 0;
  logic [NODES-1:0]            bus_valid = '0, bus_ready, bus_rvalid;
  logic [NODES-1:0][MODS-1:0]  bus_msel = '0;
  logic [NODES-1:0][6:0]       bus_instr = '0;
  w36_t [NODES-1:0]            bus_wdata = '0, bus_rdata;
  int                          checks = 0, failures = 0, cycle = 0;
  int                          n_stall = 0, n_b2b = 0, n_both = 0;

  padmavati_space #(.NODES(NODES), .MODS(MODS), .CHIPS(CH), .WORDS(W), .RADIX(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (STEPS * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  typedef struct { int at; w36_t v; } pend_t;
  space_ref m [NODES];
  pend_t    q [NODES][$];
  bit       stalled [NODES], last_w [NODES];

  task automatic rand_req(int n, bit all);
    int k;
    k = $urandom_range(0, 99);
    if      (k < 30) bus_instr[n] = mk(($urandom_range(0, 1) ? C_SMO : C_SMF), 2'($urandom), 1'($urandom));
    else if (k < 50) bus_instr[n] = mk(($urandom_range(0, 1) ? C_WAL : C_WFI), 2'($urandom), 1'($urandom));
    else if (k < 72) bus_instr[n] = mk(C_RFI, 2'($urandom), 1'($urandom));
    else if (k < 80) bus_instr[n] = mk(C_RST, 2'($urandom), 1'($urandom));
    else             bus_instr[n] = mk(OPCODES[$urandom_range(0, 4)], 2'($urandom), 1'($urandom));
    bus_wdata[n] = (bus_instr[n][6:3] inside {C_WWR, C_WMR, C_WBR}) ? rand_mask() : rand_word();
    bus_msel[n]  = (all || $urandom_range(0, 2) == 0) ? '1 : MODS'($urandom);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NODES; n++) begin
      m[n] = new(N, W);
      bus_valid[n] = 1; bus_instr[n] = mk(C_WAL, 2'b00, 0); bus_wdata[n] = '0; bus_msel[n] = '1;
      stalled[n] = 0; last_w[n] = 0;
    end
    for (int t = 0; t < STEPS; t++) begin
      for (int n = 0; n < NODES; n++) begin
        if (q[n].size() > 0 && q[n][0].at == cycle) begin
          check(bus_rvalid[n], "read data two cycles after acceptance");
          check(bus_rdata[n] == q[n][0].v, $sformatf("node %0d rdata %h exp %h", n, bus_rdata[n], q[n][0].v));
          void'(q[n].pop_front());
        end else check(!bus_rvalid[n], "no unexpected rvalid");
      end
      #1;
      if (&(bus_valid & bus_ready)) n_both++;
      for (int n = 0; n < NODES; n++) begin
        if (bus_valid[n] && !bus_ready[n]) n_stall++;
        if (bus_valid[n] && bus_ready[n]) begin
          bit en [];
          en = new[N];
          foreach (en[w]) en[w] = bus_msel[n][w / (CH * W)];
          m[n].set_enable(en);
          if (is_read(bus_instr[n])) q[n].push_back('{cycle + 2, m[n].exec(bus_instr[n], bus_wdata[n])});
          else void'(m[n].exec(bus_instr[n], bus_wdata[n]));
          if (last_w[n] && !is_read(bus_instr[n])) n_b2b++;
        end
        last_w[n]  = bus_valid[n] && bus_ready[n] && !is_read(bus_instr[n]);
        stalled[n] = bus_valid[n] && !bus_ready[n];
      end
      @(negedge clk);
      cycle++;
      for (int n = 0; n < NODES; n++) begin
        check(bus_ready[n] == !(q[n].size() > 0 && q[n][$].at == cycle + 1), "ready");
        if (!stalled[n]) begin
          if ($urandom_range(0, 4) == 0) bus_valid[n] = 0;
          else begin
            bus_valid[n] = 1;
            rand_req(n, t < STEPS / 4);
          end
        end
      end
    end
    // every mechanism must have happened on some node
    begin
      int op [11], md [4];
      int xchip = 0, span = 0, later = 0, empty = 0, dc = 0, part = 0, nf0 = 0;
      string names [11] = '{"wwr", "wmr", "wbr", "rwr", "rmr", "wfi", "wal", "rfi", "rst", "smo", "smf"};
      for (int n = 0; n < NODES; n++) begin
        for (int k = 0; k < 11; k++) op[k] += m[n].n_op[k];
        for (int k = 0; k < 4; k++)  md[k] += m[n].n_mode[k];
        xchip += m[n].n_cross_chip; span += m[n].n_smf_span; later += m[n].n_first_later_chip;
        empty += m[n].n_rfi_empty;  dc += m[n].n_stored_dc;  part += m[n].n_partition;
        nf0   += m[n].n_nf0_search;
      end
      for (int k = 0; k < 11; k++) check(op[k] > 0, {"opcode ", names[k], " used"});
      for (int k = 0; k < 4; k++)  check(md[k] > 0, "select mode used");
      check(xchip > 0, "flag chain across chips");
      check(span > 0,  "smf hit run across chips");
      check(later > 0, "priority picked a later chip");
      check(empty > 0, "rfi with nothing selected");
      check(dc > 0,    "stored don't-care hit");
      check(part > 0,  "module subset");
      check(nf0 > 0,   "NF=0 search cleared flags");
      check(n_stall > 0, "read stall");
      check(n_b2b > 0, "pipelined writes");
      check(n_both > 0, "nodes working at once");
      $display("ops wwr..smf: %p  modes: %p", op, md);
      $display("cross=%0d span=%0d later=%0d empty=%0d dc=%0d part=%0d nf0=%0d stall=%0d b2b=%0d both=%0d",
               xchip, span, later, empty, dc, part, nf0, n_stall, n_b2b, n_both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
