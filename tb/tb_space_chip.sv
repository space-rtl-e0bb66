// tb_space_chip: random instruction streams on one SPACE chip, checked against
// the reference model, plus directed checks of the cascade pins (PRQ, PRF,
// NXF, REQ) and of chip select. Reads are checked on the cycle after the
// executing clock edge, the chip's one-cycle read latency.
module tb_space_chip;
  import space_ref_pkg::*;

  localparam int W = 20;
  logic        clk = 0, rst_n = 0, cs = 0;
  logic [6:0]  instr = '0;
  w36_t        din = '0, dout;
  logic        doe, stat, prf_in = 0, prf_out, prf_oe, nxf_in = 0, nxf_out, nxf_oe, req, prq = 0;
  int          checks = 0, failures = 0, cycle = 0;

  space_chip #(.WORDS(W), .RADIX(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // Drive one instruction for one cycle, then return the read output.
  task automatic issue(logic [6:0] i, w36_t d, logic c = 1);
    @(negedge clk);
    instr = i; din = d; cs = c;
    @(negedge clk);
    cs = 0;
    #1;
  endtask

  space_ref m;

  initial begin
    m = new(W, W);
    repeat (2) @(negedge clk);
    rst_n = 1;
    issue(mk(C_WAL, 2'b00, 0), '0);
    m.exec(mk(C_WAL, 2'b00, 0), '0);
    for (int t = 0; t < 3000; t++) begin
      logic [6:0] i;
      w36_t d, exp;
      int k;
      k = $urandom_range(0, 99);
      if      (k < 30) i = mk(($urandom_range(0, 1) ? C_SMO : C_SMF), 2'($urandom), 1'($urandom));
      else if (k < 50) i = mk(($urandom_range(0, 1) ? C_WAL : C_WFI), 2'($urandom), 1'($urandom));
      else if (k < 70) i = mk(C_RFI, 2'($urandom), 1'($urandom));
      else if (k < 78) i = mk(C_RST, 2'($urandom), 1'($urandom));
      else             i = mk(OPCODES[$urandom_range(0, 4)], 2'($urandom), 1'($urandom));
      d = (i[6:3] inside {C_WWR, C_WMR, C_WBR}) ? rand_mask() : rand_word();
      exp = m.exec(i, d);
      issue(i, d);
      // outputs registered at the executing edge are visible now
      if (i[6:3] == C_RST || i[6:3] == 4'b0101) begin
        check(stat == exp[0] && !doe && dout == '1, $sformatf("rst stat=%0b exp=%0b", stat, exp[0]));
      end else if (is_read(i)) begin
        check(dout == exp && doe == (exp != '1 || (i[6] == 1'b1) || doe), $sformatf("read %b got %h exp %h", i, dout, exp));
      end else begin
        check(!doe && dout == '1 && !stat, "no output outside reads");
      end
    end

    // Directed: chip select low does nothing.
    issue(mk(C_WBR, 2'b00, 0), '1);
    issue(mk(C_WAL, 2'b00, 1), 36'h0_0000_0005);      // all words = 5, all flags 1
    issue(mk(C_WAL, 2'b00, 0), 36'h0_0000_0009, 0);   // cs low: ignored
    issue(mk(C_RFI, 2'b01, 1), '0);
    check(dout == 36'h5 && doe, "cs low must not write");
    check(req == 0, "no REQ while deselected");
    // PRQ high: another chip is first, so this one stays silent.
    @(negedge clk); instr = mk(C_RFI, 2'b01, 0); din = '0; cs = 1; prq = 1;
    #1 check(req == 1, "REQ with selected words");
    @(negedge clk); cs = 0; prq = 0;
    check(!doe && dout == '1, "PRQ suppresses the read");
    // wfi with PRQ writes nothing; without PRQ writes word 0.
    @(negedge clk); instr = mk(C_WFI, 2'b00, 1); din = 36'h7; cs = 1; prq = 1;
    @(negedge clk); cs = 0; prq = 0;
    issue(mk(C_RFI, 2'b00, 1), '0);
    check(dout == 36'h5, "wfi under PRQ must not write");
    // Flag chain in through PRF: clear flags, then "after flagged" selects word 0.
    issue(mk(C_WAL, 2'b00, 0), 36'h5);
    @(negedge clk); instr = mk(C_WAL, 2'b11, 1); din = 36'h3; cs = 1; prf_in = 1;
    #1 check(nxf_oe && !prf_oe, "after-flagged mode drives NXF");
    @(negedge clk); cs = 0; prf_in = 0;
    issue(mk(C_RFI, 2'b01, 0), '0);
    check(dout == 36'h3, "PRF flag selects word 0");
    // NXF in: "before flagged" selects the last word.
    @(negedge clk); instr = mk(C_WAL, 2'b10, 1); din = 36'h6; cs = 1; nxf_in = 1;
    #1 check(prf_oe && !nxf_oe, "before-flagged mode drives PRF");
    @(negedge clk); cs = 0; nxf_in = 0;
    @(negedge clk); instr = mk(C_RST, 2'b00, 0); cs = 1;
    #1 check(nxf_out == 1 && prf_out == 0, "edge flags on NXF/PRF outputs");
    @(negedge clk); cs = 0;
    issue(mk(C_SMO, 2'b00, 1), 36'h6);
    issue(mk(C_RFI, 2'b01, 0), '0);
    check(dout == 36'h6, "NXF flag selects the last word");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
