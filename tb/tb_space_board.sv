// tb_space_board: a board of three modules (two 4-word chips each) driven
// through its bus interface with random requests and random module subsets,
// compared with the reference model. Checks the handshake timing too: every
// read returns exactly two cycles after it was accepted, the bus is not ready
// in the cycle after a read is accepted, and other requests are accepted
// back to back.
module tb_space_board;
  import space_ref_pkg::*;
  localparam int MODS = 3, CH = 2, W = 4, N = MODS * CH * W;
  logic            clk = 0, rst_n = 0, bus_valid = 0, bus_ready, bus_rvalid;
  logic [MODS-1:0] bus_msel = '0;
  logic [6:0]      bus_instr = '0;
  w36_t            bus_wdata = '0, bus_rdata;
  int              checks = 0, failures = 0, cycle = 0;
  int              n_stall = 0, n_b2b = 0;

  space_board #(.MODS(MODS), .CHIPS(CH), .WORDS(W), .RADIX(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  space_ref m;
  typedef struct { int at; w36_t v; } pend_t;
  pend_t q [$];

  function automatic void rand_req(bit all);
    int k;
    k = $urandom_range(0, 99);
    if      (k < 30) bus_instr = mk(($urandom_range(0, 1) ? C_SMO : C_SMF), 2'($urandom), 1'($urandom));
    else if (k < 50) bus_instr = mk(($urandom_range(0, 1) ? C_WAL : C_WFI), 2'($urandom), 1'($urandom));
    else if (k < 72) bus_instr = mk(C_RFI, 2'($urandom), 1'($urandom));
    else if (k < 80) bus_instr = mk(C_RST, 2'($urandom), 1'($urandom));
    else             bus_instr = mk(OPCODES[$urandom_range(0, 4)], 2'($urandom), 1'($urandom));
    bus_wdata = (bus_instr[6:3] inside {C_WWR, C_WMR, C_WBR}) ? rand_mask() : rand_word();
    bus_msel  = (all || $urandom_range(0, 2) == 0) ? '1 : MODS'($urandom);
  endfunction

  initial begin
    bit last_acc_write, stalled;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m = new(N, W);
    // clear every word
    bus_valid = 1; bus_instr = mk(C_WAL, 2'b00, 0); bus_wdata = '0; bus_msel = '1;
    last_acc_write = 0; stalled = 0;
    for (int t = 0; t < 8000; t++) begin
      bit en [];
      // responses due this cycle
      if (q.size() > 0 && q[0].at == cycle) begin
        check(bus_rvalid, "read data two cycles after acceptance");
        check(bus_rdata == q[0].v, $sformatf("rdata %h exp %h", bus_rdata, q[0].v));
        void'(q.pop_front());
      end else check(!bus_rvalid, "no unexpected rvalid");
      #1;
      if (bus_valid) begin
        if (!bus_ready) n_stall++;
        else begin
          en = new[N];
          foreach (en[w]) en[w] = bus_msel[w / (CH * W)];
          m.set_enable(en);
          if (is_read(bus_instr)) q.push_back('{cycle + 2, m.exec(bus_instr, bus_wdata)});
          else void'(m.exec(bus_instr, bus_wdata));
          if (last_acc_write) n_b2b++;
        end
      end
      last_acc_write = bus_valid && bus_ready && !is_read(bus_instr);
      stalled = bus_valid && !bus_ready;
      @(negedge clk);
      cycle++;
      // ready is low exactly while an accepted read executes
      check(bus_ready == !(q.size() > 0 && q[$].at == cycle + 1), "ready");
      if (!stalled) begin
        if ($urandom_range(0, 4) == 0) bus_valid = 0;
        else begin
          bus_valid = 1;
          rand_req(t < 2000);
        end
      end
      #0;
    end
    check(n_stall > 0, "read stalls happened");
    check(n_b2b > 0, "back-to-back writes accepted");
    check(m.n_partition > 0, "module subsets used");
    check(m.n_cross_chip > 0, "flag chain crossed chips");
    check(m.n_smf_span > 0, "smf across chips");
    check(m.n_first_later_chip > 0, "first word in a later chip");
    $display("stall=%0d b2b=%0d part=%0d cross=%0d span=%0d later=%0d", n_stall, n_b2b,
             m.n_partition, m.n_cross_chip, m.n_smf_span, m.n_first_later_chip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
