// tb_space_decoder: every one of the 128 instruction words is decoded and
// compared with the opcode and select-mode tables, don't-care bits included.
module tb_space_decoder;
  import space_pkg::*;
  logic [6:0] instr;
  ctl_t       ctl;
  int         checks = 0, failures = 0;

  space_decoder dut (.instr(instr), .ctl(ctl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected operation, read off the opcode table row by row.
  function automatic op_e expect_op(logic [3:0] o);
    casez (o)
      4'b1000: return OP_WWR;
      4'b1001: return OP_WMR;
      4'b101?: return OP_WBR;
      4'b11?0: return OP_RWR;
      4'b11?1: return OP_RMR;
      4'b0011: return OP_WFI;
      4'b0010: return OP_WAL;
      4'b011?: return OP_RFI;
      4'b010?: return OP_RST;
      4'b0000: return OP_SMO;
      default: return OP_SMF;   // 0001
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 128; i++) begin
      instr = 7'(i);
      #1;
      checks++;
      if (ctl.op != expect_op(instr[6:3]) || ctl.sel != sel_e'(instr[2:1]) || ctl.nf != instr[0]) begin
        failures++;
        $display("FAIL instr=%b op=%s sel=%0d nf=%0b", instr, ctl.op.name(), ctl.sel, ctl.nf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
