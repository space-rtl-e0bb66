// tb_ctrl_regs: loads the mask and write-enable registers with wwr, wmr and
// wbr (and with the enable low) and checks both after every edge.
module tb_ctrl_regs;
  import space_pkg::*;
  logic  clk = 0, rst_n = 0, en = 0;
  op_e   op = OP_SMO;
  word_t din = '0, mr, wr, emr, ewr;
  int    checks = 0, failures = 0;

  ctrl_regs dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    emr = '1; ewr = '1;
    @(negedge clk);
    checks++; if (mr != '1 || wr != '1) failures++;
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      op_e ops [5] = '{OP_WWR, OP_WMR, OP_WBR, OP_RWR, OP_WAL};
      op  = ops[$urandom_range(0, 4)];
      en  = 1'($urandom);
      din = {$urandom, $urandom};
      if (en && (op == OP_WWR || op == OP_WBR)) ewr = din;
      if (en && (op == OP_WMR || op == OP_WBR)) emr = din;
      @(negedge clk);
      checks++;
      if (mr != emr || wr != ewr) begin
        failures++;
        $display("FAIL op=%s en=%0b mr=%h/%h wr=%h/%h", op.name(), en, mr, emr, wr, ewr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
