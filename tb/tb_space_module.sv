// tb_space_module: a module of three 5-word chips driven with random
// instruction streams and compared with the reference model as one 15-word
// array. Searches, flag-chain selects and the first-word choice must cross
// chip boundaries, and a read with nothing selected must return all ones;
// each of these is counted and must happen.
module tb_space_module;
  import space_ref_pkg::*;
  localparam int CH = 3, W = 5;
  logic        clk = 0, rst_n = 0, cs = 0;
  logic [6:0]  instr = '0;
  w36_t        din = '0, dout;
  logic        doe, stat, prf_out, prf_oe, nxf_out, nxf_oe, req;
  int          checks = 0, failures = 0;

  space_module #(.CHIPS(CH), .WORDS(W), .RADIX(2)) dut (
    .clk, .rst_n, .cs, .instr, .din, .dout, .doe, .stat,
    .prf_in(1'b0), .prf_out, .prf_oe, .nxf_in(1'b0), .nxf_out, .nxf_oe, .req, .prq(1'b0)
  );

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  space_ref m;

  initial begin
    m = new(CH * W, W);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); instr = mk(C_WAL, 2'b00, 0); din = '0; cs = 1;
    void'(m.exec(instr, din));
    for (int t = 0; t < 5000; t++) begin
      w36_t exp;
      int   k;
      @(negedge clk);
      k = $urandom_range(0, 99);
      if      (k < 30) instr = mk(($urandom_range(0, 1) ? C_SMO : C_SMF), 2'($urandom), 1'($urandom));
      else if (k < 50) instr = mk(($urandom_range(0, 1) ? C_WAL : C_WFI), 2'($urandom), 1'($urandom));
      else if (k < 72) instr = mk(C_RFI, 2'($urandom), 1'($urandom));
      else if (k < 80) instr = mk(C_RST, 2'($urandom), 1'($urandom));
      else             instr = mk(OPCODES[$urandom_range(0, 4)], 2'($urandom), 1'($urandom));
      din = (instr[6:3] inside {C_WWR, C_WMR, C_WBR}) ? rand_mask() : rand_word();
      cs  = ($urandom_range(0, 9) != 0);
      if (cs) exp = m.exec(instr, din);
      else    exp = '1;
      @(negedge clk);
      if (instr[6:4] == 3'b010) check(stat == (cs ? exp[0] : 1'b0) && dout == '1, "rst status");
      else if (is_read(instr)) check(dout == exp, $sformatf("read %b got %h exp %h", instr, dout, exp));
      else check(dout == '1 && !doe, "idle bus");
      cs = 0;
    end
    check(m.n_cross_chip > 0,       "flag chain crossed a chip boundary");
    check(m.n_smf_span > 0,         "smf hits spanned chips");
    check(m.n_first_later_chip > 0, "first selected word in a later chip");
    check(m.n_rfi_empty > 0,        "rfi with nothing selected");
    $display("cross=%0d smf_span=%0d later=%0d empty=%0d", m.n_cross_chip, m.n_smf_span,
             m.n_first_later_chip, m.n_rfi_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
