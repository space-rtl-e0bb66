// ctrl_regs: the Mask Register (mr) and Write-Enable Register (wr).
//
// wwr loads wr, wmr loads mr and wbr loads both from the same 36-bit operand
// in one cycle. mr[i]=0 makes search-key bit i a don't care; wr[i]=1 lets
// writes change bit column i. Both registers are loaded on the rising clock
// edge when `en` is high (chip selected and an instruction present). Reset
// value all ones (every key bit compared, every column written) is this
// design's choice.
module ctrl_regs
  import space_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  op_e   op,
  input  word_t din,
  output word_t mr,
  output word_t wr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mr <= '1;
      wr <= '1;
    end else if (en) begin
      if (op == OP_WMR || op == OP_WBR) mr <= din;
      if (op == OP_WWR || op == OP_WBR) wr <= din;
    end
  end
endmodule
